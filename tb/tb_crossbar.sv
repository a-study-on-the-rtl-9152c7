// tb_crossbar: random partial permutations and random input valids; every
// output is compared one clock later with the cell of the input it selects.
module tb_crossbar;
  localparam int unsigned N = 8, W = 32, PW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  sel_valid = '0;
  logic [PW-1:0] sel_in [N];
  logic [N-1:0]  in_valid = '0;
  logic [W-1:0]  in_cell [N];
  logic [N-1:0]  out_valid;
  logic [W-1:0]  out_cell [N];
  int checks = 0, failures = 0;

  crossbar #(.N(N), .CELL_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    logic [N-1:0]  exp_v;
    logic [W-1:0]  exp_c [N];
    for (int j = 0; j < N; j++) begin
      sel_in[j] = '0;
      in_cell[j] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) perm[j] = j;
      perm.shuffle();
      for (int j = 0; j < N; j++) begin
        sel_in[j]    = PW'(perm[j]);
        sel_valid[j] = ($urandom_range(0, 3) != 0);
        in_valid[j]  = ($urandom_range(0, 3) != 0);
        in_cell[j]   = $urandom;
      end
      for (int j = 0; j < N; j++) begin
        exp_v[j] = sel_valid[j] && in_valid[perm[j]];
        exp_c[j] = in_cell[perm[j]];
      end
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out_valid[j] != exp_v[j] || (exp_v[j] && out_cell[j] != exp_c[j])) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
