// tb_switch_bursty: uniform bursty traffic (mean burst 8 cells) at offered
// loads of 90 %, 94 % and 98 % on the full-size switch, for K = 1, 2, 4 and 8
// cells per schedule (see switch_workload_set).  Runs are 3000 slots long,
// far shorter than a statistical evaluation, so the printed delays and queue
// lengths are indicative; the checks are on cell integrity, order, latency,
// requests, zero drops, and a carried load (during the run, while the queues
// still fill) within 15 % of the offered load.
module tb_switch_bursty;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bit all_done;
  int checks, failures;

  switch_workload_set #(.BURST(8), .SLOTS(3000)) set (.clk, .rst_n, .all_done, .checks, .failures);

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (all_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
