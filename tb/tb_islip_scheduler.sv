// tb_islip_scheduler: compares the lane-shared scheduler with a plain,
// fully parallel iSLIP reference written in the testbench.
//
// Three instances get the same random request matrices: the default one
// (N = 8, K = 2, so 4 arbiter lanes), one with 8 lanes (one pass per step,
// as a K = 1 scheduler) and one with a single lane.  Each has its own
// reference pointer state.  Checked per schedule: the matching seen from the
// inputs and from the outputs, and the number of clocks from start to done,
// 2 * ITER * N / LANES.  Request densities range from sparse to full.
module tb_islip_scheduler;
  localparam int unsigned N = 8, PW = 3, ITER = 3;
  localparam int unsigned NDUT = 3;
  localparam int unsigned LANES_OF [NDUT] = '{4, 8, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] req [N];

  logic          busy [NDUT];
  logic          done [NDUT];
  logic [N-1:0]  imv  [NDUT];
  logic [PW-1:0] im   [NDUT][N];
  logic [N-1:0]  omv  [NDUT];
  logic [PW-1:0] om   [NDUT][N];

  islip_scheduler dut0 (
    .clk, .rst_n, .start, .req, .busy(busy[0]), .done(done[0]),
    .in_match_valid(imv[0]), .in_match(im[0]), .out_match_valid(omv[0]), .out_match(om[0]));
  islip_scheduler #(.N(N), .K(1)) dut1 (
    .clk, .rst_n, .start, .req, .busy(busy[1]), .done(done[1]),
    .in_match_valid(imv[1]), .in_match(im[1]), .out_match_valid(omv[1]), .out_match(om[1]));
  islip_scheduler #(.N(N), .K(2), .LANES(1), .ITER(ITER)) dut2 (
    .clk, .rst_n, .start, .req, .busy(busy[2]), .done(done[2]),
    .in_match_valid(imv[2]), .in_match(im[2]), .out_match_valid(omv[2]), .out_match(om[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int late_matches = 0, contended = 0;

  // reference pointer state, one set per instance
  int gp [NDUT][N];
  int ap [NDUT][N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Parallel iSLIP: m_in[i] = matched output or -1.
  task automatic ref_islip(input int d, output int m_in [N], output int m_out [N],
                           output int late);
    int gnt [N];
    late = 0;
    for (int n = 0; n < N; n++) begin
      m_in[n]  = -1;
      m_out[n] = -1;
    end
    for (int it = 0; it < ITER; it++) begin
      for (int o = 0; o < N; o++) begin
        gnt[o] = -1;
        if (m_out[o] < 0)
          for (int s = 0; s < N; s++) begin
            int i = (gp[d][o] + s) % N;
            if (gnt[o] < 0 && req[i][o] && m_in[i] < 0) gnt[o] = i;
          end
      end
      for (int i = 0; i < N; i++) begin
        if (m_in[i] >= 0) continue;
        for (int s = 0; s < N; s++) begin
          int o = (ap[d][i] + s) % N;
          if (m_in[i] < 0 && gnt[o] == i) begin
            m_in[i]  = o;
            m_out[o] = i;
            if (it == 0) begin
              ap[d][i] = (o + 1) % N;
              gp[d][o] = (i + 1) % N;
            end else begin
              late++;
            end
          end
        end
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_in [N];
    int m_out [N];
    int late;
    int lat [NDUT];
    bit seen [NDUT];
    for (int d = 0; d < NDUT; d++)
      for (int n = 0; n < N; n++) begin
        gp[d][n] = 0;
        ap[d][n] = 0;
      end
    for (int n = 0; n < N; n++) req[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 400; round++) begin
      int dens;
      dens = round % 10;
      @(negedge clk);
      for (int i = 0; i < N; i++)
        for (int o = 0; o < N; o++)
          req[i][o] = ($urandom_range(0, 9) <= dens);
      for (int o = 0; o < N; o++) begin
        int c;
        c = 0;
        for (int i = 0; i < N; i++) c += req[i][o];
        if (c > 1) contended++;
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int d = 0; d < NDUT; d++) begin
        seen[d] = 0;
        lat[d]  = 0;
      end
      // count clocks after the start edge until done
      for (int c = 1; c <= 60; c++) begin
        @(posedge clk);
        #1;
        for (int d = 0; d < NDUT; d++)
          if (done[d] && !seen[d]) begin
            seen[d] = 1;
            lat[d]  = c;
          end
      end
      for (int d = 0; d < NDUT; d++) begin
        ref_islip(d, m_in, m_out, late);
        if (d == 0) late_matches += late;
        check(seen[d] && lat[d] == 2 * ITER * (N / LANES_OF[d]), "done latency");
        for (int n = 0; n < N; n++) begin
          check(imv[d][n] == (m_in[n] >= 0) && (m_in[n] < 0 || im[d][n] == PW'(m_in[n])),
                "input-side match");
          check(omv[d][n] == (m_out[n] >= 0) && (m_out[n] < 0 || om[d][n] == PW'(m_out[n])),
                "output-side match");
        end
        check(!busy[d], "idle after done");
      end
    end
    check(late_matches > 0, "matches found after the first iteration");
    check(contended > 0, "output contention");
    $display("late matches=%0d contended outputs=%0d", late_matches, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
