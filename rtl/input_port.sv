// input_port: one input of the switch with its N virtual output queues.
//
// An arriving cell is written to the queue of its destination output (the
// demultiplexer at each input of the switch), so a cell waiting for a busy
// output never blocks cells for other outputs.  The queues live in one
// dual-port memory (voq_mem) split into N fixed regions of DEPTH cells, each
// used as a circular buffer with its own head pointer, tail pointer and
// occupancy counter.  A cell for a full queue is dropped and flagged on
// in_drop (the handling of a full queue is this design's choice).
//
// Which cells a schedule covers: a schedule is computed from the queues as
// they are at the start of its window (win_start), and the cells it sends
// leave in the window after that.  elig[j] counts the cells of queue j that
// were present at the last window start and have not left yet.  When a new
// window starts, the matched queue of the schedule just finished
// (next_valid/next_dest) is given credit = min(K, elig[next_dest]) cells for
// this window, and elig is reloaded with the occupancy.  So only cells that
// took part in a schedule leave, at most K per schedule, as in the
// arrival / schedule / departure pipeline.
//
// Requests: req[j] tells the scheduler that queue j holds cells that are not
// already promised to the coming window: occ[j] > 0, or occ[j] > credit it is
// about to receive if j is next_dest.  A granted queue therefore always has
// at least one cell for its departure window.
//
// Departure: when dep_en is 1 for a clock and credit is left, the head cell of
// queue dep_dest is read and appears on dep_cell with dep_valid = 1 on the
// next clock, for one clock; dep_dest must be the queue of next_dest from
// the last window start.  An arrival and a departure may happen in the same
// clock, also on the same queue.  dep_en must not be 1 on a win_start clock.
//
// DEPTH must be a power of two.
module input_port #(
  parameter int unsigned N      = switch_pkg::DEF_N,
  parameter int unsigned K      = switch_pkg::DEF_K,
  parameter int unsigned DEPTH  = switch_pkg::DEF_DEPTH,
  parameter int unsigned CELL_W = switch_pkg::DEF_CELL_W,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned QW    = $clog2(DEPTH),
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              win_start,
  // cell arrival
  input  logic              in_valid,
  input  logic [PW-1:0]     in_dest,
  input  logic [CELL_W-1:0] in_cell,
  output logic              in_drop,
  // scheduler side
  input  logic              next_valid,
  input  logic [PW-1:0]     next_dest,
  output logic [N-1:0]      req,
  // cell departure
  input  logic              dep_en,
  input  logic [PW-1:0]     dep_dest,
  output logic              dep_valid,
  output logic [CELL_W-1:0] dep_cell,
  // status
  output logic [CW-1:0]     occ [N]
);

  logic [QW-1:0] head [N];
  logic [QW-1:0] tail [N];
  logic [CW-1:0] elig [N];
  logic [CW-1:0] credit;
  logic [CW-1:0] next_credit;

  // cells the schedule that just finished may send in the coming window
  assign next_credit = !next_valid              ? '0 :
                       (elig[next_dest] > CW'(K)) ? CW'(K) : elig[next_dest];

  logic wr, rd;
  assign wr      = in_valid && (occ[in_dest] != CW'(DEPTH));
  assign in_drop = in_valid && (occ[in_dest] == CW'(DEPTH));
  assign rd      = dep_en && (credit != '0);

  voq_mem #(.ADDR_W(PW + QW), .DATA_W(CELL_W)) u_mem (
    .clk   (clk),
    .we    (wr),
    .waddr ({in_dest, tail[in_dest]}),
    .wdata (in_cell),
    .re    (rd),
    .raddr ({dep_dest, head[dep_dest]}),
    .rdata (dep_cell)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) begin
        head[j] <= '0;
        tail[j] <= '0;
        occ[j]  <= '0;
        elig[j] <= '0;
      end
      credit    <= '0;
      dep_valid <= 1'b0;
    end else begin
      dep_valid <= rd;
      if (wr) tail[in_dest] <= tail[in_dest] + 1'b1;
      if (rd) head[dep_dest] <= head[dep_dest] + 1'b1;
      if (win_start)  credit <= next_credit;
      else if (rd)    credit <= credit - 1'b1;
      for (int j = 0; j < N; j++) begin
        unique case ({wr && (in_dest == PW'(j)), rd && (dep_dest == PW'(j))})
          2'b10:   occ[j] <= occ[j] + 1'b1;
          2'b01:   occ[j] <= occ[j] - 1'b1;
          default: occ[j] <= occ[j];
        endcase
        if (win_start)                         elig[j] <= occ[j];
        else if (rd && dep_dest == PW'(j))     elig[j] <= elig[j] - 1'b1;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      if (next_valid && next_dest == PW'(j)) req[j] = (occ[j] > next_credit);
      else                                   req[j] = (occ[j] != '0);
    end
  end

  a_no_read_at_window_start: assert property (
    @(posedge clk) disable iff (!rst_n) !(win_start && dep_en));

  if ((DEPTH & (DEPTH - 1)) != 0) begin : g_depth_check
    $error("input_port: DEPTH must be a power of two");
  end

endmodule
