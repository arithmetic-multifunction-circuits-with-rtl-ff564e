// incdec: fast incrementer / decrementer for a 2**H-bit operand.
//
// Incrementing inverts the trailing ones and the first zero above them; decrementing
// inverts the trailing zeros and the first one. The generalized comparator / LDD (clddg)
// in flip mode (F=1), LDD mode (C/L=0), with Inv = inc finds that trailing zero or one;
// incpp inverts bits 0..p. nov is the detector's E: 0 when i is all ones (inc) or all
// zeros (dec), i.e. on overflow, in which case j wraps to all zeros / all ones.
// Combinational, about 2H gate stages. Follows the document; the wrap is a consequence
// of this design's flip-mode select.
module incdec #(
  parameter int unsigned H = 4
) (
  input  logic [2**H-1:0] i,
  input  logic            inc,
  output logic [2**H-1:0] j,
  output logic            nov
);
  logic [H-1:0] p;
  clddg #(.H(H)) u_det (.i(i), .f(1'b1), .inv(inc), .cl(1'b0), .p(p), .e(nov));
  incpp #(.H(H)) u_pp  (.i(i), .p(p), .j(j));
endmodule
