// mf1_fb: foundation block of the four-way multifunction tree (one bit pair).
//
// a = A_n (odd input), b = B_n (even input). Both are XORed with Inv. An OR and an AND
// (the AND also gated by C/L) of the pair are combined by an XOR: with C/L=0 this is
// a|b (lead-digit existence), with C/L=1 it is a^b (comparator existence, or the bit's
// propagate). A final XOR with Add turns it into the not-propagate XNOR(a,b) for
// addition, so epn is E (Add=0) or not-P (Add=1). pg is the generate a.b (Add=1) or the
// position of the chosen bit within the pair (Add=0): a for leading (F=0), not b for
// trailing (F=1).
// Combinational, three gate stages. Gates follow the document; the F multiplexer's inputs
// are this design's reading (true position in both directions).
module mf1_fb
  import arith_pkg::*;
(
  input  logic     a,
  input  logic     b,
  input  mf_ctrl_t ctrl,
  output logic     pg,
  output logic     epn
);
  logic ai, bi, any1, both, pos;
  assign ai   = a ^ ctrl.inv;
  assign bi   = b ^ ctrl.inv;
  assign any1 = ai | bi;
  assign both = ai & bi & ctrl.cl;
  assign epn  = (any1 ^ both) ^ ctrl.add;
  assign pos  = ctrl.f ? ~bi : ai;
  assign pg   = ctrl.add ? both : pos;
endmodule
