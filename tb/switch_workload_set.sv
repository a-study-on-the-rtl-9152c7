// switch_workload_set: one traffic type of the switch's evaluation at full
// port count and queue depth (8 ports, 2048-cell queues, 424-bit cells, 12
// clocks per slot), for schedule granularities K = 1 (one schedule per slot,
// for comparison), 2, 4 and 8 at offered loads of 90 %, 94 % and 98 %.
// BURST = 0 gives random uniform traffic, BURST = 8 on/off bursty traffic
// with a mean burst of 8 cells.  Each of the 12 switches runs SLOTS slots of
// traffic and then drains; switch_env checks every cell and prints carried
// load, mean delay and mean input-queue length.  all_done, checks and
// failures summarise the 12 runs.
module switch_workload_set #(
  parameter int unsigned BURST = 0,
  parameter int unsigned SLOTS = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output bit   all_done,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = 8, PW = 3, W = 424, DEPTH = 2048;
  localparam int unsigned NK = 4, NL = 3;
  localparam int unsigned KS    [NK] = '{1, 2, 4, 8};
  localparam int unsigned LOADS [NL] = '{90, 94, 98};
  localparam int unsigned NRUN = NK * NL;

  bit done_v [NRUN];
  int chk_v  [NRUN];
  int fail_v [NRUN];

  for (genvar k = 0; k < NK; k++) begin : g_k
    for (genvar l = 0; l < NL; l++) begin : g_l
      localparam int unsigned R = k * NL + l;
      logic [N-1:0]  in_valid, in_drop, out_valid;
      logic [PW-1:0] in_dest [N];
      logic [W-1:0]  in_cell [N];
      logic [W-1:0]  out_cell [N];
      logic slot_start, win_start;

      switch_top #(.N(N), .K(KS[k]), .DEPTH(DEPTH), .CELL_W(W), .CLK_PER_SLOT(12)) dut (.*);

      switch_env #(.NAME("workload"), .N(N), .K(KS[k]), .CELL_W(W), .SLOTS(SLOTS),
                   .LOAD_PCT(LOADS[l]), .BURST(BURST), .HOT_SLOTS(0),
                   .DRAIN_SLOTS(20000), .REQUIRE_ALL(1'b0), .CHECK_THR(1'b1)) env (
        .clk, .rst_n, .in_valid, .in_dest, .in_cell, .in_drop, .out_valid, .out_cell,
        .slot_start, .win_start,
        .req(dut.req), .nx_valid(dut.nx_in_valid), .nx_dest(dut.nx_in),
        .finished(done_v[R]), .checks(chk_v[R]), .failures(fail_v[R]));
    end
  end

  always_comb begin
    all_done = 1'b1;
    checks   = 0;
    failures = 0;
    for (int r = 0; r < NRUN; r++) begin
      all_done &= done_v[r];
      checks   += chk_v[r];
      failures += fail_v[r];
    end
  end
endmodule
