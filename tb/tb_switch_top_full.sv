// tb_switch_top_full: the switch at its default size (8 ports, K = 2,
// 2048-cell queues, 424-bit cells, 12 clocks per slot), end to end.
//
// Traffic: 2600 slots of hot-spot load (every input sends to output 0 in
// every slot, so the queues for output 0 fill up and cells are dropped),
// then 1000 slots of uniform random traffic at 90 % load, then the switch
// drains.  switch_env checks every cell, the requests at each window start
// and the pipeline latency, and requires each mechanism of the switch to
// have occurred.
module tb_switch_top_full;
  localparam int unsigned N = 8, PW = 3, W = 424;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  in_valid, in_drop, out_valid;
  logic [PW-1:0] in_dest [N];
  logic [W-1:0]  in_cell [N];
  logic [W-1:0]  out_cell [N];
  logic slot_start, win_start;
  bit   env_done;
  int   env_checks, env_failures;

  switch_top dut (.*);

  switch_env #(.NAME("full-size"), .N(N), .K(2), .CELL_W(W), .SLOTS(3600), .LOAD_PCT(90),
               .HOT_SLOTS(2600), .DRAIN_SLOTS(20000)) env (
    .clk, .rst_n, .in_valid, .in_dest, .in_cell, .in_drop, .out_valid, .out_cell,
    .slot_start, .win_start,
    .req(dut.req), .nx_valid(dut.nx_in_valid), .nx_dest(dut.nx_in),
    .finished(env_done), .checks(env_checks), .failures(env_failures));

  initial begin
    // 3600 traffic slots + up to 20000 drain slots of 12 clocks
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env_checks, env_failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (env_done);
    $display("TB_RESULT checks=%0d failures=%0d", env_checks, env_failures);
    $finish;
  end
endmodule
