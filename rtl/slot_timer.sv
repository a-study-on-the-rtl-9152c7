// slot_timer: time base of the three-stage (arrival, schedule, departure)
// switch pipeline.
//
// The clock is divided into cell time slots of CLK_PER_SLOT clocks, and K
// consecutive slots form one schedule window.  A schedule is started at the
// first clock of each window and must be finished by the next one; the
// matching it produces is used for the cell departures of the following
// window.  This gives the pipeline of the reference timing diagram: with K = 1
// a cell arriving in slot 0 is scheduled in slot 1 and leaves in slot 2, with
// K = 2 cells arriving in slots 0 and 1 are scheduled in slots 2..3 and leave
// in slots 4..5.
//
// Outputs (all registered, valid from the clock after reset is released):
//   phase       clock index inside the current slot, 0..CLK_PER_SLOT-1
//   slot_in_win slot index inside the current window, 0..K-1
//   slot_start  1 on clock 0 of every slot
//   win_start   1 on clock 0 of slot 0 of every window
//   dep_issue   1 on clock 1 of every slot: the clock on which input ports read
//               the cell that departs in this slot (a design choice; it keeps
//               the read away from the window boundary, where requests are
//               sampled).
// CLK_PER_SLOT must be at least 2.
module slot_timer #(
  parameter int unsigned CLK_PER_SLOT = switch_pkg::DEF_CLK_PER_SLOT,
  parameter int unsigned K            = switch_pkg::DEF_K
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  output logic [$clog2(CLK_PER_SLOT)-1:0]           phase,
  output logic [(K > 1 ? $clog2(K) : 1)-1:0]        slot_in_win,
  output logic                                      slot_start,
  output logic                                      win_start,
  output logic                                      dep_issue
);

  localparam int unsigned PW = $clog2(CLK_PER_SLOT);
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= '0;
      slot_in_win <= '0;
    end else if (phase == PW'(CLK_PER_SLOT - 1)) begin
      phase <= '0;
      if (slot_in_win == SW'(K - 1)) slot_in_win <= '0;
      else                           slot_in_win <= slot_in_win + 1'b1;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  assign slot_start = (phase == '0);
  assign win_start  = (phase == '0) && (slot_in_win == '0);
  assign dep_issue  = (phase == PW'(1));

endmodule
