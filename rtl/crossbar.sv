// crossbar: N x N switch fabric.
//
// Each output j is connected to the input sel_in[j] when sel_valid[j] is 1,
// and forwards the cell that input presents (in_valid/in_cell).  The setting
// is the matching of the current departure window, so at most one input is
// connected to each output and, for a valid matching, each input to at most
// one output.  Outputs are registered: a cell presented on one clock appears
// on out_cell with out_valid = 1 on the next clock.  An output that is not
// connected, or whose input presents nothing, shows out_valid = 0 and keeps
// its last out_cell.
module crossbar #(
  parameter int unsigned N      = switch_pkg::DEF_N,
  parameter int unsigned CELL_W = switch_pkg::DEF_CELL_W,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      sel_valid,
  input  logic [PW-1:0]     sel_in    [N],
  input  logic [N-1:0]      in_valid,
  input  logic [CELL_W-1:0] in_cell   [N],
  output logic [N-1:0]      out_valid,
  output logic [CELL_W-1:0] out_cell  [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      for (int j = 0; j < N; j++) out_cell[j] <= '0;
    end else begin
      for (int j = 0; j < N; j++) begin
        out_valid[j] <= sel_valid[j] && in_valid[sel_in[j]];
        if (sel_valid[j] && in_valid[sel_in[j]]) out_cell[j] <= in_cell[sel_in[j]];
      end
    end
  end

endmodule
