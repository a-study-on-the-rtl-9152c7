// islip_scheduler: central iSLIP arbiter that builds one input/output
// matching per schedule window of K time slots.
//
// iSLIP: every iteration has a grant step, in which each unmatched output
// grants one of the unmatched inputs requesting it, round-robin from its grant
// pointer, and an accept step, in which each unmatched input accepts one of
// the grants it received, round-robin from its accept pointer.  Pointers move
// to one past the partner only for grants accepted in the first iteration.
//
// Because the switch allows K time slots for each schedule, the scheduler
// does not need N grant and N accept arbiters working in parallel.  It has
// LANES of each (default N/K) and runs every step as N/LANES passes: in pass
// p, lane l serves output (grant step) or input (accept step) p*LANES+l.  The
// decisions of one step depend only on the state at the start of that step,
// so the result is the same as that of a fully parallel iSLIP; only the
// number of arbiters and the number of clocks change.  Sharing the arbiters in
// this way is this design's reading of the claim that the scheduler area
// shrinks by about 1/K when it is given K slots.
//
// Timing: start (one clock) latches req; the matching is ready after
// 2 * ITER * (N/LANES) further clocks, when done pulses for one clock and the
// result outputs change.  The outputs keep the last matching until the next
// done, so they can be used while a new schedule is computed.  With the
// defaults (N = 8, K = 2, LANES = 4, ITER = 3) that is 12 clocks, within the
// K * 12 = 24 clocks of a window.  busy is 1 from the clock after start until
// done.  A start while busy is ignored.
//
// req[i][j] = 1: input i has a cell for output j.
// in_match_valid[i]/in_match[i]: output matched to input i.
// out_match_valid[j]/out_match[j]: input matched to output j.
module islip_scheduler #(
  parameter int unsigned N     = switch_pkg::DEF_N,
  parameter int unsigned K     = switch_pkg::DEF_K,
  parameter int unsigned LANES = (N / K > 0) ? N / K : 1,
  parameter int unsigned ITER  = switch_pkg::DEF_ITER,
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  req [N],
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  in_match_valid,
  output logic [PW-1:0] in_match [N],
  output logic [N-1:0]  out_match_valid,
  output logic [PW-1:0] out_match [N]
);

  localparam int unsigned PASSES = N / LANES;
  localparam int unsigned PSW    = (PASSES > 1) ? $clog2(PASSES) : 1;
  localparam int unsigned ITW    = (ITER > 1) ? $clog2(ITER) : 1;

  if (N % LANES != 0) begin : g_lane_check
    $error("islip_scheduler: N must be a multiple of LANES");
  end

  typedef enum logic [1:0] {S_IDLE, S_GRANT, S_ACCEPT} state_t;

  state_t         state;
  logic [PSW-1:0] pass;
  logic [ITW-1:0] iter;

  logic [N-1:0]  req_q [N];
  logic [N-1:0]  mi, mo;              // matched inputs / outputs, this schedule
  logic [PW-1:0] w_in  [N];           // working matching, per input
  logic [PW-1:0] w_out [N];           // working matching, per output
  logic [PW-1:0] gptr  [N];           // grant pointer of each output
  logic [PW-1:0] aptr  [N];           // accept pointer of each input
  logic          gv    [N];           // grant issued by output o in this iteration
  logic [PW-1:0] gi    [N];           // input granted by output o

  // ---- shared arbiter lanes ----
  logic [PW-1:0] lane_idx [LANES];    // output (grant) or input (accept) of lane l
  logic [N-1:0]  g_req    [LANES];
  logic [PW-1:0] g_ptr    [LANES];
  logic          g_v      [LANES];
  logic [PW-1:0] g_idx    [LANES];
  logic [N-1:0]  a_req    [LANES];
  logic [PW-1:0] a_ptr    [LANES];
  logic          a_v      [LANES];
  logic [PW-1:0] a_idx    [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      lane_idx[l] = PW'(int'(pass) * LANES + l);
      g_ptr[l]    = gptr[lane_idx[l]];
      a_ptr[l]    = aptr[lane_idx[l]];
      for (int i = 0; i < N; i++)
        g_req[l][i] = req_q[i][lane_idx[l]] && !mi[i] && !mo[lane_idx[l]];
      for (int o = 0; o < N; o++)
        a_req[l][o] = gv[o] && (gi[o] == lane_idx[l]) && !mi[lane_idx[l]];
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    rr_arbiter #(.N(N)) u_grant (
      .req(g_req[l]), .ptr(g_ptr[l]), .gnt_valid(g_v[l]), .gnt_idx(g_idx[l])
    );
    rr_arbiter #(.N(N)) u_accept (
      .req(a_req[l]), .ptr(a_ptr[l]), .gnt_valid(a_v[l]), .gnt_idx(a_idx[l])
    );
  end

  // ---- matching after the current accept pass ----
  logic [N-1:0]  mi_n, mo_n;
  logic [PW-1:0] w_in_n  [N];
  logic [PW-1:0] w_out_n [N];

  always_comb begin
    mi_n    = mi;
    mo_n    = mo;
    w_in_n  = w_in;
    w_out_n = w_out;
    if (state == S_ACCEPT) begin
      for (int l = 0; l < LANES; l++) begin
        if (a_v[l]) begin
          mi_n[lane_idx[l]]    = 1'b1;
          mo_n[a_idx[l]]       = 1'b1;
          w_in_n[lane_idx[l]]  = a_idx[l];
          w_out_n[a_idx[l]]    = lane_idx[l];
        end
      end
    end
  end

  logic last_pass;
  assign last_pass = (pass == PSW'(PASSES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      pass            <= '0;
      iter            <= '0;
      done            <= 1'b0;
      mi              <= '0;
      mo              <= '0;
      in_match_valid  <= '0;
      out_match_valid <= '0;
      for (int n = 0; n < N; n++) begin
        req_q[n]     <= '0;
        w_in[n]      <= '0;
        w_out[n]     <= '0;
        gptr[n]      <= '0;
        aptr[n]      <= '0;
        gv[n]        <= 1'b0;
        gi[n]        <= '0;
        in_match[n]  <= '0;
        out_match[n] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            req_q <= req;
            mi    <= '0;
            mo    <= '0;
            pass  <= '0;
            iter  <= '0;
            state <= S_GRANT;
          end
        end
        S_GRANT: begin
          for (int l = 0; l < LANES; l++) begin
            gv[lane_idx[l]] <= g_v[l];
            gi[lane_idx[l]] <= g_idx[l];
          end
          if (last_pass) begin
            pass  <= '0;
            state <= S_ACCEPT;
          end else begin
            pass <= pass + 1'b1;
          end
        end
        S_ACCEPT: begin
          mi    <= mi_n;
          mo    <= mo_n;
          w_in  <= w_in_n;
          w_out <= w_out_n;
          if (iter == '0) begin
            for (int l = 0; l < LANES; l++) begin
              if (a_v[l]) begin
                aptr[lane_idx[l]] <= PW'((int'(a_idx[l]) + 1) % N);
                gptr[a_idx[l]]    <= PW'((int'(lane_idx[l]) + 1) % N);
              end
            end
          end
          if (!last_pass) begin
            pass <= pass + 1'b1;
          end else if (iter == ITW'(ITER - 1)) begin
            in_match_valid  <= mi_n;
            out_match_valid <= mo_n;
            in_match        <= w_in_n;
            out_match       <= w_out_n;
            done            <= 1'b1;
            state           <= S_IDLE;
          end else begin
            pass  <= '0;
            iter  <= iter + 1'b1;
            state <= S_GRANT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
