// tb_slot_timer: checks the slot/window time base against a cycle counter.
// Every clock, phase, slot_in_win and the three strobes are compared with
// values derived from the number of clocks since reset (t mod 12, t/12 mod 2).
module tb_slot_timer;
  localparam int unsigned CPS = 12;
  localparam int unsigned K   = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(CPS)-1:0] phase;
  logic [0:0] slot_in_win;
  logic slot_start, win_start, dep_issue;
  int checks = 0, failures = 0;
  int n_slot = 0, n_win = 0;

  slot_timer #(.CLK_PER_SLOT(CPS), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 5 * CPS * K + 7; t++) begin
      int unsigned ph, sl;
      ph = t % CPS;
      sl = (t / CPS) % K;
      #1;
      check(phase == ph, "phase");
      check(slot_in_win == sl[0], "slot_in_win");
      check(slot_start == (ph == 0), "slot_start");
      check(win_start == (ph == 0 && sl == 0), "win_start");
      check(dep_issue == (ph == 1), "dep_issue");
      if (slot_start) n_slot++;
      if (win_start) n_win++;
      @(posedge clk);
    end
    // 5*K*CPS+7 clocks starting at a window start: 11 slots, 6 windows
    check(n_slot == 11, "slot count");
    check(n_win == 6, "window count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
