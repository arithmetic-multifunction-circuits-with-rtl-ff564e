// clddg_fb: foundation block of the generalized comparator / lead-digit detector.
//
// Takes one bit pair (a = A_n on the odd position, b = B_n on the even position).
// Inv inverts both bits. With C/L=0 the block is a 2-bit lead-digit detector
// (E = a|b); with C/L=1 the AND gate a.b.C/L forces E to 0 when both bits are 1, so
// E = a^b, the "bits differ" foundation of the comparator. P is the position of the
// selected bit inside the pair: a for leading (F=0), not b for trailing (F=1).
// Combinational. Gates follow the document; the F multiplexer's inputs are chosen so
// that P is the true position in both directions.
module clddg_fb (
  input  logic a,
  input  logic b,
  input  logic f,
  input  logic inv,
  input  logic cl,
  output logic p,
  output logic e
);
  logic ai, bi, any1, both;
  assign ai   = inv ? ~a : a;
  assign bi   = inv ? ~b : b;
  assign any1 = ai | bi;
  assign both = ai & bi & cl;
  assign e    = both ? 1'b0 : any1;
  assign p    = f ? ~bi : ai;
endmodule
