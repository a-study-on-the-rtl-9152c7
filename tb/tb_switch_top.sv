// tb_switch_top: end-to-end test of the switch at reduced size.
//
// Part 1, pipeline latency: a single cell entering an empty switch in slot 0
// must leave in slot 4 with K = 2 (and in slot 2 with K = 1, the
// one-slot-per-schedule case), at clock 3 of that slot.
// Part 2, traffic: a 4-port switch with K = 2 and 16-cell queues runs a hot
// spot phase (all inputs to output 0, filling those queues until cells are
// dropped) followed by uniform random traffic at 95 % load, then drains.  The
// scoreboard in switch_env checks every cell and the requests, and counts
// that each mechanism of the switch occurred.
module tb_switch_top;
  localparam int unsigned N = 4, PW = 2, W = 96, CPS = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- latency instances (K = 2 and K = 1) ----------------
  logic [N-1:0]  l_in_valid = '0;
  logic [PW-1:0] l_in_dest [N];
  logic [W-1:0]  l_in_cell [N];
  logic [N-1:0]  l2_drop, l1_drop, l2_ov, l1_ov;
  logic [W-1:0]  l2_oc [N];
  logic [W-1:0]  l1_oc [N];
  logic l2_ss, l2_ws, l1_ss, l1_ws;

  switch_top #(.N(N), .K(2), .DEPTH(16), .CELL_W(W), .CLK_PER_SLOT(CPS)) dut_lat2 (
    .clk, .rst_n, .in_valid(l_in_valid), .in_dest(l_in_dest), .in_cell(l_in_cell),
    .in_drop(l2_drop), .out_valid(l2_ov), .out_cell(l2_oc), .slot_start(l2_ss), .win_start(l2_ws));
  switch_top #(.N(N), .K(1), .DEPTH(16), .CELL_W(W), .CLK_PER_SLOT(CPS)) dut_lat1 (
    .clk, .rst_n, .in_valid(l_in_valid), .in_dest(l_in_dest), .in_cell(l_in_cell),
    .in_drop(l1_drop), .out_valid(l1_ov), .out_cell(l1_oc), .slot_start(l1_ss), .win_start(l1_ws));

  // ---------------- traffic instance ----------------
  logic [N-1:0]  t_in_valid, t_drop, t_ov;
  logic [PW-1:0] t_in_dest [N];
  logic [W-1:0]  t_in_cell [N];
  logic [W-1:0]  t_oc [N];
  logic t_ss, t_ws;
  bit   env_done;
  int   env_checks, env_failures;

  switch_top #(.N(N), .K(2), .DEPTH(16), .CELL_W(W), .CLK_PER_SLOT(CPS)) dut (
    .clk, .rst_n, .in_valid(t_in_valid), .in_dest(t_in_dest), .in_cell(t_in_cell),
    .in_drop(t_drop), .out_valid(t_ov), .out_cell(t_oc), .slot_start(t_ss), .win_start(t_ws));

  switch_env #(.NAME("traffic"), .N(N), .K(2), .CELL_W(W), .SLOTS(3000), .LOAD_PCT(95),
               .HOT_SLOTS(60), .DRAIN_SLOTS(2000)) env (
    .clk, .rst_n, .in_valid(t_in_valid), .in_dest(t_in_dest), .in_cell(t_in_cell),
    .in_drop(t_drop), .out_valid(t_ov), .out_cell(t_oc), .slot_start(t_ss), .win_start(t_ws),
    .req(dut.req), .nx_valid(dut.nx_in_valid), .nx_dest(dut.nx_in),
    .finished(env_done), .checks(env_checks), .failures(env_failures));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end

  // latency measurement on both instances (they share the time base)
  initial begin
    int slot, ph, dep2, dep1, ph2, ph1;
    for (int i = 0; i < N; i++) begin
      l_in_dest[i] = '0;
      l_in_cell[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // the first clock after reset is clock 0 of slot 0 of window 0
    slot = 0; ph = 0; dep2 = -1; dep1 = -1; ph2 = -1; ph1 = -1;
    check(l2_ws && l1_ws, "window start after reset");
    l_in_valid[0] = 1'b1;
    l_in_dest[0]  = PW'(1);
    l_in_cell[0]  = W'(96'hABCD_0123_4567_89AB);
    for (int c = 0; c < 8 * CPS; c++) begin
      @(posedge clk);
      #1;
      l_in_valid = '0;
      if (l2_ss) begin slot++; ph = 0; end else ph++;
      if (l2_ov[1] && dep2 < 0) begin dep2 = slot; ph2 = ph; end
      if (l1_ov[1] && dep1 < 0) begin dep1 = slot; ph1 = ph; end
    end
    check(dep2 == 4 && ph2 == 3, "K=2: first departure in slot 4");
    check(dep1 == 2 && ph1 == 3, "K=1: first departure in slot 2");
    check(l2_oc[1] == W'(96'hABCD_0123_4567_89AB), "K=2: cell content");
    check(l1_oc[1] == W'(96'hABCD_0123_4567_89AB), "K=1: cell content");
    $display("first departure: K=2 slot %0d clock %0d, K=1 slot %0d clock %0d", dep2, ph2, dep1, ph1);
    wait (env_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end
endmodule
