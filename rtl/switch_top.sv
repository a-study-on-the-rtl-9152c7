// switch_top: input-queued cell switch with one schedule every K time slots.
//
// Each of the N inputs keeps one virtual output queue (VOQ) per output in a
// dual-port memory.  A central iSLIP scheduler computes an input/output
// matching once per window of K cell time slots, and during the next window
// every matched input sends up to K cells, one per slot, from the matched
// queue through the crossbar.  The scheduler therefore has K slots instead of
// one to finish, which lets it use fewer, time-shared arbiters.
//
// Pipeline (one stage = one window of K slots):
//   window w    cells arrive and are written to their VOQs
//   window w+1  requests are sampled at the first clock and scheduled
//   window w+2  the matched VOQs send their cells
// With K = 2 a cell that arrives in slot 0 leaves at the earliest in slot 4,
// and with K = 1 in slot 2.
//
// Interface:
//   in_valid[i], in_dest[i], in_cell[i]  one arriving cell on input i; at
//       most one per input per slot is the link rate (more are stored, but
//       the switch is dimensioned for one).  The cell is taken on the clock
//       where in_valid[i] is 1.
//   in_drop[i]   1 in the same clock when that cell was dropped (VOQ full).
//   out_valid[j], out_cell[j]  a departing cell on output j, valid for one
//       clock at clock 3 of a slot (clock 1: VOQ read, 2: crossbar input).
//   slot_start, win_start  time base: clock 0 of a slot / of a window.
//
// The numbers N = 8, DEPTH = 2048, K = 2 and 12 clocks per slot are those of
// the reference configuration.  The cell width, the number of iSLIP
// iterations, the arbiter lane count, the exact clocks at which cells are
// read and forwarded, the credit and request rules of input_port (a schedule
// covers only the cells present when its requests were sampled) and the
// dropping of cells for a full VOQ are this design's choices.
//
// rst_n is used both as the asynchronous reset of the flops and as the
// disable condition of the assertion at the end; lint may flag this mix,
// which is intended.
module switch_top #(
  parameter int unsigned N            = switch_pkg::DEF_N,
  parameter int unsigned K            = switch_pkg::DEF_K,
  parameter int unsigned DEPTH        = switch_pkg::DEF_DEPTH,
  parameter int unsigned CELL_W       = switch_pkg::DEF_CELL_W,
  parameter int unsigned CLK_PER_SLOT = switch_pkg::DEF_CLK_PER_SLOT,
  parameter int unsigned LANES        = (N / K > 0) ? N / K : 1,
  parameter int unsigned ITER         = switch_pkg::DEF_ITER,
  localparam int unsigned PW          = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      in_valid,
  input  logic [PW-1:0]     in_dest  [N],
  input  logic [CELL_W-1:0] in_cell  [N],
  output logic [N-1:0]      in_drop,
  output logic [N-1:0]      out_valid,
  output logic [CELL_W-1:0] out_cell [N],
  output logic              slot_start,
  output logic              win_start
);

  localparam int unsigned SCHED_CLKS = 1 + 2 * ITER * (N / LANES);

  if (CLK_PER_SLOT < 3) begin : g_slot_check
    $error("switch_top: CLK_PER_SLOT must be at least 3");
  end
  if (SCHED_CLKS > K * CLK_PER_SLOT) begin : g_budget_check
    $error("switch_top: the schedule does not fit in K time slots");
  end

  // ---- time base ----
  logic [$clog2(CLK_PER_SLOT)-1:0]    phase;
  logic [(K > 1 ? $clog2(K) : 1)-1:0] slot_in_win;
  logic                               dep_issue;

  slot_timer #(.CLK_PER_SLOT(CLK_PER_SLOT), .K(K)) u_timer (
    .clk, .rst_n, .phase, .slot_in_win, .slot_start, .win_start, .dep_issue
  );

  // ---- scheduler ----
  logic [N-1:0]  req [N];
  logic          sched_busy, sched_done;
  logic [N-1:0]  nx_in_valid, nx_out_valid;
  logic [PW-1:0] nx_in  [N];
  logic [PW-1:0] nx_out [N];

  islip_scheduler #(.N(N), .K(K), .LANES(LANES), .ITER(ITER)) u_sched (
    .clk, .rst_n,
    .start           (win_start),
    .req             (req),
    .busy            (sched_busy),
    .done            (sched_done),
    .in_match_valid  (nx_in_valid),
    .in_match        (nx_in),
    .out_match_valid (nx_out_valid),
    .out_match       (nx_out)
  );

  // ---- matching used for the departures of the current window ----
  logic [N-1:0]  act_in_valid, act_out_valid;
  logic [PW-1:0] act_in  [N];
  logic [PW-1:0] act_out [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_in_valid  <= '0;
      act_out_valid <= '0;
      for (int n = 0; n < N; n++) begin
        act_in[n]  <= '0;
        act_out[n] <= '0;
      end
    end else if (win_start) begin
      act_in_valid  <= nx_in_valid;
      act_out_valid <= nx_out_valid;
      act_in        <= nx_in;
      act_out       <= nx_out;
    end
  end

  // ---- input ports ----
  logic [N-1:0]      dep_valid;
  logic [CELL_W-1:0] dep_cell [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [$clog2(DEPTH + 1)-1:0] occ [N];
    input_port #(.N(N), .K(K), .DEPTH(DEPTH), .CELL_W(CELL_W)) u_port (
      .clk, .rst_n, .win_start,
      .in_valid   (in_valid[i]),
      .in_dest    (in_dest[i]),
      .in_cell    (in_cell[i]),
      .in_drop    (in_drop[i]),
      .next_valid (nx_in_valid[i]),
      .next_dest  (nx_in[i]),
      .req        (req[i]),
      .dep_en     (dep_issue && act_in_valid[i]),
      .dep_dest   (act_in[i]),
      .dep_valid  (dep_valid[i]),
      .dep_cell   (dep_cell[i]),
      .occ        (occ)
    );
  end

  // ---- switch fabric ----
  crossbar #(.N(N), .CELL_W(CELL_W)) u_xbar (
    .clk, .rst_n,
    .sel_valid (act_out_valid),
    .sel_in    (act_out),
    .in_valid  (dep_valid),
    .in_cell   (dep_cell),
    .out_valid (out_valid),
    .out_cell  (out_cell)
  );

  // The scheduler must be idle again when the next window starts.
  property p_sched_in_time;
    @(posedge clk) disable iff (!rst_n) win_start |-> !sched_busy;
  endproperty
  a_sched_in_time: assert property (p_sched_in_time);

endmodule
