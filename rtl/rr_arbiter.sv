// rr_arbiter: round-robin arbiter used by the iSLIP scheduler.
//
// Picks the first requester at or after position ptr, wrapping around
// (positions ptr, ptr+1, ..., N-1, 0, ..., ptr-1).  Purely combinational:
// gnt_valid is 1 when any request is set and gnt_idx is then the winner.
// The pointer is kept and updated by the caller, which is how iSLIP moves its
// grant and accept pointers only after an accepted grant.
module rr_arbiter #(
  parameter int unsigned N  = switch_pkg::DEF_N,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [PW-1:0] ptr,
  output logic          gnt_valid,
  output logic [PW-1:0] gnt_idx
);

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int k = 0; k < N; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(ptr) + k) % N);
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt_idx   = PW'(idx);
      end
    end
  end

endmodule
