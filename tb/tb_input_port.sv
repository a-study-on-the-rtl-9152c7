// tb_input_port: random arrivals, departures and scheduler matches on a small
// input port (4 queues of 8 cells, a window start every 8 clocks), checked
// clock by clock against a model made of one SystemVerilog queue per VOQ plus
// the per-window credit rule: occupancy, requests (including the cells
// reserved for the queue just matched), drops on a full queue, reads refused
// once the window's credit is used, and the order and content of departing
// cells.
module tb_input_port;
  localparam int unsigned N = 4, K = 2, DEPTH = 8, W = 32, PW = 2, CW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic win_start = 1'b0;
  logic          in_valid = 1'b0;
  logic [PW-1:0] in_dest = '0;
  logic [W-1:0]  in_cell = '0;
  logic          in_drop;
  logic          next_valid = 1'b0;
  logic [PW-1:0] next_dest = '0;
  logic [N-1:0]  req;
  logic          dep_en = 1'b0;
  logic [PW-1:0] dep_dest = '0;
  logic          dep_valid;
  logic [W-1:0]  dep_cell;
  logic [CW-1:0] occ [N];

  int checks = 0, failures = 0;
  int n_drop = 0, n_dep = 0, n_both = 0, n_reserved = 0, n_refused = 0;
  int m_elig [N];
  int m_credit = 0;
  bit act_valid = 0;
  logic [PW-1:0] act = '0;
  logic [W-1:0] q [N][$];

  input_port #(.N(N), .K(K), .DEPTH(DEPTH), .CELL_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit            exp_rd, exp_drop;
    logic [W-1:0]  exp_cell;
    int            seq;
    int            in_bias;
    seq = 1;
    for (int j = 0; j < N; j++) m_elig[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      // phases of heavier arrival and heavier departure fill and drain queues
      in_bias = ((t / 500) % 2 == 0) ? 3 : 1;
      win_start  = (t % 8 == 0);
      in_valid   = ($urandom_range(0, 3) < in_bias);
      in_dest    = PW'($urandom_range(0, N - 1));
      in_cell    = seq;
      dep_en     = !win_start && act_valid && ($urandom_range(0, 3) >= in_bias);
      dep_dest   = act;
      next_valid = ($urandom_range(0, 3) != 0);
      next_dest  = PW'($urandom_range(0, N - 1));
      #1;
      for (int j = 0; j < N; j++) begin
        bit exp_req;
        int cr;
        cr = (m_elig[j] > K) ? K : m_elig[j];
        check(occ[j] == CW'(q[j].size()), "occupancy");
        if (next_valid && next_dest == j) exp_req = (q[j].size() > cr);
        else exp_req = (q[j].size() > 0);
        check(req[j] == exp_req, "request");
        if (next_valid && next_dest == j && q[j].size() > 0 && !exp_req) n_reserved++;
      end
      exp_drop = in_valid && (q[in_dest].size() == DEPTH);
      check(in_drop == exp_drop, "drop");
      exp_rd = dep_en && (m_credit > 0);
      if (dep_en && m_credit == 0 && q[dep_dest].size() > 0) n_refused++;
      if (exp_rd) exp_cell = q[dep_dest].pop_front();
      if (win_start) begin
        m_credit = !next_valid ? 0 : (m_elig[next_dest] > K) ? K : m_elig[next_dest];
        for (int j = 0; j < N; j++) m_elig[j] = q[j].size();
        act_valid = next_valid;
        act       = next_dest;
      end else if (exp_rd) begin
        m_credit--;
        m_elig[dep_dest]--;
      end
      if (in_valid && !exp_drop) begin
        q[in_dest].push_back(in_cell);
        seq++;
      end
      if (exp_drop) n_drop++;
      if (exp_rd && in_valid && !exp_drop && in_dest == dep_dest) n_both++;
      @(posedge clk);
      #1;
      check(dep_valid == exp_rd, "dep_valid");
      if (exp_rd) begin
        n_dep++;
        check(dep_cell == exp_cell, "dep_cell");
      end
    end
    check(n_drop > 0, "a full queue was seen");
    check(n_both > 0, "arrival and departure on one queue in one clock");
    check(n_reserved > 0, "reservation suppressed a request");
    check(n_refused > 0, "read refused without credit");
    $display("departures=%0d drops=%0d same-queue read+write=%0d reserved=%0d refused=%0d",
             n_dep, n_drop, n_both, n_reserved, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
