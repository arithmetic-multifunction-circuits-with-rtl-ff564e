// mf1: recursive four-way multifunction tree over 2**H inputs.
//
// One tree serves four functions:
//  * lead/trail-digit detection and comparison (Add=0): p is the position of the found
//    digit and e = pn[top] says one exists, exactly as the generalized comparator / LDD;
//  * carry generation for addition (Add=1, C/L=1, F=0, Inv=0): the inputs are A (odd
//    bits) and B (even bits) of two 2**(H-1)-bit operands and (g, pn) at position k is
//    the (generate, not-propagate) of the dyadic group ending at bit k, the up-sweep of
//    a Brent-Kung adder (bkutr completes the other prefixes).
// Each level joins two half trees. One OR gate gives both E and the top not-propagate.
// One select (upper E for F=0, complement of the lower E for F=1) drives the
// multiplexer that gives the top generate, which is also position bit P0; the same
// select is the new position msb and drives the multiplexers of the middle position
// bits. The other generate / not-propagate bits pass through from the two halves.
// Combinational, H stages.
// Sharing of the OR and of the top multiplexer follows the document; which position bit
// rides on the top generate (P0) and the flip-mode select are this design's reading.
// Lint note: Verilator, when it lints this self-instantiating module as a top of its
// own, does not elaborate the child copies and so reports the sub-tree nets as
// undriven and the inputs as unused. Instantiated from a parent, or synthesized, the
// tree is complete; the warnings stand for that reason.
module mf1
  import arith_pkg::*;
#(
  parameter int unsigned H = 5
) (
  input  logic [2**H-1:0]     i,
  input  mf_ctrl_t            ctrl,
  output logic [H-1:0]        p,
  output logic [2**(H-1)-1:0] g,
  output logic [2**(H-1)-1:0] pn
);
  if (H == 1) begin : g_fb
    mf1_fb u_fb (.a(i[1]), .b(i[0]), .ctrl(ctrl), .pg(g[0]), .epn(pn[0]));
    assign p[0] = g[0];
  end else begin : g_rec
    localparam int unsigned HALF = 2**(H-2);
    logic [H-2:0]    p_hi, p_lo;  // bit 0 equals the subtree's top generate and is taken from there
    logic [HALF-1:0] g_hi, g_lo, pn_hi, pn_lo;
    logic            sel;
    mf1 #(.H(H-1)) u_hi (.i(i[2**H-1:2**(H-1)]), .ctrl(ctrl), .p(p_hi), .g(g_hi), .pn(pn_hi));
    mf1 #(.H(H-1)) u_lo (.i(i[2**(H-1)-1:0]),    .ctrl(ctrl), .p(p_lo), .g(g_lo), .pn(pn_lo));
    assign sel = ctrl.f ? ~pn_lo[HALF-1] : pn_hi[HALF-1];
    // top position: shared OR (E / not-propagate) and shared multiplexer (G / P0)
    assign pn[2*HALF-1] = pn_hi[HALF-1] | pn_lo[HALF-1];
    assign g[2*HALF-1]  = sel ? g_hi[HALF-1] : g_lo[HALF-1];
    // lower half and the rest of the upper half pass through
    assign g[HALF-1:0]  = g_lo;
    assign pn[HALF-1:0] = pn_lo;
    if (H > 2) begin : g_pass
      assign g[2*HALF-2:HALF]  = g_hi[HALF-2:0];
      assign pn[2*HALF-2:HALF] = pn_hi[HALF-2:0];
    end
    assign p[H-1] = sel;
    assign p[0]   = g[2*HALF-1];
    if (H > 2) begin : g_pmid
      assign p[H-2:1] = sel ? p_hi[H-2:1] : p_lo[H-2:1];
    end
  end
endmodule
