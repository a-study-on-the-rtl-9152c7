// switch_env: traffic source and scoreboard for switch_top, shared by the
// end-to-end testbenches.
//
// Source: once per time slot (at clock 1 of the slot, the clock on which the
// switch also reads departing cells) every input may offer one cell.  Modes:
//   uniform  - a cell with probability LOAD_PCT %, destination uniform;
//   bursty   - two-state (on/off) Markov source per input: bursts of mean
//              length BURST cells to one uniformly chosen output, idle gaps
//              sized for an average load of LOAD_PCT %;
//   hot spot - the first HOT_SLOTS slots every input sends to output 0,
//              which overloads that output and fills its queues.
// Each cell carries source, destination, sequence number, arrival slot and a
// payload pattern computed from them.
//
// Scoreboard: per (input, output) pair a queue of the sequence numbers that
// were accepted (not flagged on in_drop).  Every departing cell must be the
// head of its pair's queue, carry the right output and an intact payload,
// leave no earlier than two schedule windows after the window it arrived in,
// and no output or input may carry two cells in one slot.  At every window
// start the requests of the switch are compared with the scoreboard: a pair
// requests if it holds cells, more than K of them if it is the pair matched
// for the coming window.  After SLOTS slots the source stops and the switch
// must drain completely.
//
// Every window, each matched input must send between 1 and K cells, all from
// its matched queue, and an unmatched input none.
//
// Mechanism counters (each must be non-zero when REQUIRE_ALL is set): cells
// dropped at a full queue, K cells of one queue sent in one window, a matched
// queue with fewer than K covered cells, an output requested by several
// inputs, a request held back because its cells are already promised, and an
// arrival and a departure on one queue in one slot.
module switch_env #(
  parameter string       NAME        = "env",
  parameter int unsigned N           = 4,
  parameter int unsigned K           = 2,
  parameter int unsigned CELL_W      = 96,
  parameter int unsigned SLOTS       = 1000,
  parameter int unsigned LOAD_PCT    = 90,
  parameter int unsigned BURST       = 0,
  parameter int unsigned HOT_SLOTS   = 0,
  parameter int unsigned DRAIN_SLOTS = 100000,
  parameter bit          REQUIRE_ALL = 1'b1,
  parameter bit          CHECK_THR   = 1'b0,
  localparam int unsigned PW         = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N-1:0]      in_valid,
  output logic [PW-1:0]     in_dest  [N],
  output logic [CELL_W-1:0] in_cell  [N],
  input  logic [N-1:0]      in_drop,
  input  logic [N-1:0]      out_valid,
  input  logic [CELL_W-1:0] out_cell [N],
  input  logic              slot_start,
  input  logic              win_start,
  input  logic [N-1:0]      req      [N],
  input  logic [N-1:0]      nx_valid,
  input  logic [PW-1:0]     nx_dest  [N],
  output bit                finished,
  output int                checks,
  output int                failures
);

  int expq [N][N][$];
  int arrq [N][N][$];
  int pend [N][N];
  int seqn [N][N];
  int last_arr_slot [N][N];
  int last_dep_win  [N][N];
  int run           [N][N];
  int last_out_slot [N];
  int last_src_slot [N];
  bit burst_on [N];
  int burst_dst [N];

  longint n_sent = 0, n_drop = 0, n_deliv = 0, n_deliv_traffic = 0;
  longint n_kburst = 0, n_contend = 0, n_reserved = 0, n_same = 0;
  longint lat_sum = 0;
  longint n_partial = 0;
  bit act_v [N];
  int act_d [N];
  int sent_win [N];
  longint iq_sum = 0;
  int slot = -1;
  int ph = 0;

  function automatic logic [CELL_W-1:0] make_cell(int s, int d, int q, int a);
    logic [CELL_W-1:0] c;
    logic [31:0] h;
    h = 32'(s * 1000003 + d * 7919 + q * 2654435761);
    for (int b = 0; b < CELL_W; b += 32) c[b +: 32] = h ^ 32'(b * 40503);
    c[7:0]   = 8'(s);
    c[15:8]  = 8'(d);
    c[47:16] = 32'(q);
    c[79:48] = 32'(a);
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s FAIL %s at %0t (slot %0d)", NAME, what, $time, slot);
    end
  endtask

  function automatic bool_pending_zero();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (pend[i][j] != 0) return 0;
    return 1;
  endfunction

  function automatic bit start_burst();
    return $urandom_range(0, LOAD_PCT + BURST * (100 - LOAD_PCT) - 1) < LOAD_PCT;
  endfunction

  function automatic int pick_dest(int i);
    int r;
    if (slot < int'(HOT_SLOTS)) return 0;
    if (BURST == 0) begin
      r = int'($urandom_range(0, 99));
      if (r >= int'(LOAD_PCT)) return -1;
      r = int'($urandom_range(0, N - 1));
      return r;
    end
    // on/off source: a burst ends after each cell with probability 1/BURST;
    // idle periods are geometric with P(start) = LOAD / (LOAD + BURST * (100 - LOAD))
    // per decision, which may also start a new burst right after the last one
    if (burst_on[i]) begin
      int d;
      d = burst_dst[i];
      if ($urandom_range(0, BURST - 1) == 0) begin
        burst_on[i] = start_burst();
        burst_dst[i] = $urandom_range(0, N - 1);
      end
      return d;
    end
    burst_on[i]  = start_burst();
    burst_dst[i] = $urandom_range(0, N - 1);
    return -1;
  endfunction

  initial begin
    int traffic_end;
    bit draining;
    finished = 0;
    checks   = 0;
    failures = 0;
    in_valid = '0;
    for (int i = 0; i < N; i++) begin
      in_dest[i] = '0;
      in_cell[i] = '0;
      last_out_slot[i] = -1;
      act_v[i] = 0;
      act_d[i] = 0;
      sent_win[i] = 0;
      last_src_slot[i] = -1;
      burst_on[i] = 0;
      burst_dst[i] = 0;
      for (int j = 0; j < N; j++) begin
        pend[i][j] = 0;
        seqn[i][j] = 0;
        last_arr_slot[i][j] = -1;
        last_dep_win[i][j] = -1;
        run[i][j] = 0;
      end
    end
    traffic_end = int'(SLOTS);
    @(posedge rst_n);
    #1;
    forever begin
      if (slot_start) begin
        slot++;
        ph = 0;
        if (slot < int'(SLOTS))
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) iq_sum += pend[i][j];
      end else begin
        ph++;
      end
      draining = (slot >= traffic_end);

      // ---- departures ----
      for (int j = 0; j < N; j++) begin
        if (out_valid[j]) begin
          int s, d, q, a;
          s = int'(out_cell[j][7:0]);
          d = int'(out_cell[j][15:8]);
          q = int'(out_cell[j][47:16]);
          a = int'(out_cell[j][79:48]);
          check(d == j, "cell on the wrong output");
          check(s < N, "bad source field");
          if (s < N && d == j) begin
            check(expq[s][d].size() > 0 && expq[s][d][0] == q, "cell order or loss");
            if (expq[s][d].size() > 0) begin
              void'(expq[s][d].pop_front());
              void'(arrq[s][d].pop_front());
            end
            pend[s][d]--;
            check(out_cell[j] == make_cell(s, d, q, a), "payload");
            check(slot / int'(K) >= a / int'(K) + 2, "left before its schedule window");
            lat_sum += slot - a;
            check(last_out_slot[j] != slot, "two cells on one output in one slot");
            check(last_src_slot[s] != slot, "two cells from one input in one slot");
            last_out_slot[j] = slot;
            last_src_slot[s] = slot;
            if (last_arr_slot[s][d] == slot) n_same++;
            if (last_dep_win[s][d] == slot / int'(K)) run[s][d]++;
            else run[s][d] = 1;
            last_dep_win[s][d] = slot / int'(K);
            if (run[s][d] == int'(K)) n_kburst++;
            n_deliv++;
            if (!draining) n_deliv_traffic++;
            check(act_v[s] && act_d[s] == d, "cell from a pair that is not matched");
            sent_win[s]++;
          end
        end
      end

      // ---- requests at the window start ----
      if (win_start && slot >= 0) begin
        // close the window that just ended: a matched pair sends 1..K cells
        for (int i = 0; i < N; i++) begin
          if (act_v[i]) begin
            check(sent_win[i] >= 1 && sent_win[i] <= int'(K), "cells per matched window");
            if (sent_win[i] < int'(K)) n_partial++;
          end else begin
            check(sent_win[i] == 0, "cells from an unmatched input");
          end
          sent_win[i] = 0;
          act_v[i] = nx_valid[i];
          act_d[i] = int'(nx_dest[i]);
        end
        for (int j = 0; j < N; j++) begin
          int c;
          c = 0;
          for (int i = 0; i < N; i++) c += int'(req[i][j]);
          if (c > 1) n_contend++;
        end
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            bit mine, exp_req;
            int old, cr;
            // cells that took part in the previous schedule and are still here
            old = 0;
            foreach (arrq[i][j][e]) begin
              if (old > int'(K) || arrq[i][j][e] / int'(K) >= slot / int'(K) - 1) break;
              old++;
            end
            cr      = (old > int'(K)) ? int'(K) : old;
            mine    = nx_valid[i] && (nx_dest[i] == PW'(j));
            exp_req = mine ? (pend[i][j] > cr) : (pend[i][j] > 0);
            check(req[i][j] == exp_req, "request");
            if (mine && pend[i][j] > 0 && !req[i][j]) n_reserved++;
          end
      end

      // ---- arrivals at clock 1 of each slot ----
      in_valid = '0;
      if (ph == 1 && !draining && slot >= 0) begin
        for (int i = 0; i < N; i++) begin
          int d;
          d = pick_dest(i);
          if (d >= 0) begin
            in_valid[i] = 1'b1;
            in_dest[i]  = PW'(d);
            in_cell[i]  = make_cell(i, d, seqn[i][d], slot);
          end
        end
        #1;
        for (int i = 0; i < N; i++) begin
          if (in_valid[i]) begin
            int d;
            d = int'(in_dest[i]);
            n_sent++;
            if (in_drop[i]) begin
              n_drop++;
            end else begin
              expq[i][d].push_back(seqn[i][d]);
              arrq[i][d].push_back(slot);
              pend[i][d]++;
              last_arr_slot[i][d] = slot;
            end
            seqn[i][d]++;
          end
        end
      end

      if (draining && ph == 0 && bool_pending_zero()) break;
      if (slot > traffic_end + int'(DRAIN_SLOTS)) begin
        check(0, "switch did not drain");
        break;
      end
      @(posedge clk);
      #1;
    end

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(expq[i][j].size() == 0, "cells left behind");
    check(n_deliv + n_drop == n_sent, "cell conservation");
    if (REQUIRE_ALL) begin
      check(n_drop > 0, "mechanism: drop at a full queue");
      check(n_kburst > 0, "mechanism: K cells per schedule");
      check(n_contend > 0, "mechanism: output contention");
      check(n_reserved > 0, "mechanism: K-cell reservation");
      check(n_same > 0, "mechanism: arrival and departure on one queue in one slot");
      check(n_partial > 0, "mechanism: matched queue with fewer than K covered cells");
    end
    if (CHECK_THR) begin
      check(n_drop == 0, "no drops expected at this load");
      check(real'(n_deliv_traffic) / real'(N * traffic_end) >
            real'(n_sent) / real'(N * traffic_end) - 0.15, "throughput follows the offered load");
    end
    $display("%s K=%0d burst=%0d load=%0d%%: slots=%0d sent=%0d dropped=%0d delivered=%0d offered=%0.3f throughput=%0.3f mean_delay_slots=%0.1f mean_iq_cells_per_input=%0.1f",
             NAME, K, BURST, LOAD_PCT, traffic_end, n_sent, n_drop, n_deliv,
             real'(n_sent) / real'(N * traffic_end),
             real'(n_deliv_traffic) / real'(N * traffic_end),
             (n_deliv > 0) ? real'(lat_sum) / real'(n_deliv) : 0.0,
             real'(iq_sum) / real'(N * traffic_end));
    $display("%s: K-cell runs=%0d partial windows=%0d contended outputs=%0d reserved=%0d same-slot arrival/departure=%0d",
             NAME, n_kburst, n_partial, n_contend, n_reserved, n_same);
    finished = 1;
  end

endmodule
