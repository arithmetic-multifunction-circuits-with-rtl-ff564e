// incpp: incrementer post-processing unit.
//
// Given the operand i and the position p of its trailing zero (increment) or trailing
// one (decrement), inverts bits 0..p: j = i ^ mask, the mask coming from incmg.
// Combinational: the mask generator's H-1 stages plus one XOR. Follows the document.
module incpp #(
  parameter int unsigned H = 4
) (
  input  logic [2**H-1:0] i,
  input  logic [H-1:0]    p,
  output logic [2**H-1:0] j
);
  logic [2**H-1:0] v;
  incmg #(.H(H)) u_mg (.p(p), .v(v));
  assign j = i ^ v;
endmodule
