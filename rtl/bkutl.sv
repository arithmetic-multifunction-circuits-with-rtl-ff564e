// bkutl: "left" Brent-Kung upper tree, the part of the down-sweep that serves a block
// which does not start at bit 0.
//
// Inputs are the dyadic group values (g_in, pn_in) of the 2**H-1 positions of a
// 2**H-position block below its top, plus the prefix (cg_in, cpn_in) of everything below
// the block. Outputs are the full prefixes of those positions. The middle position is
// combined with the incoming prefix by one Delta' cell; that result is both its output
// and the incoming prefix of the upper half; the lower half reuses the incoming prefix
// (the flow-through cell). Both halves are again bkutl. The block's top position is
// handled by the caller. Combinational, at most H Delta' stages.
// Structure follows the document; the port widths (2**H-1 positions) are this design's.
module bkutl
  import arith_pkg::*;
#(
  parameter int unsigned H = 3
) (
  input  logic [2**H-2:0] g_in,
  input  logic [2**H-2:0] pn_in,
  input  logic            cg_in,
  input  logic            cpn_in,
  output logic [2**H-2:0] g,
  output logic [2**H-2:0] pn
);
  localparam int unsigned MID = 2**(H-1) - 1;
  gp_t m;
  assign m = delta_p('{g: g_in[MID], np: pn_in[MID]}, '{g: cg_in, np: cpn_in});
  assign g[MID]  = m.g;
  assign pn[MID] = m.np;
  if (H > 1) begin : g_rec
    bkutl #(.H(H-1)) u_lo (.g_in(g_in[MID-1:0]), .pn_in(pn_in[MID-1:0]),
                           .cg_in(cg_in), .cpn_in(cpn_in),
                           .g(g[MID-1:0]), .pn(pn[MID-1:0]));
    bkutl #(.H(H-1)) u_hi (.g_in(g_in[2**H-2:MID+1]), .pn_in(pn_in[2**H-2:MID+1]),
                           .cg_in(m.g), .cpn_in(m.np),
                           .g(g[2**H-2:MID+1]), .pn(pn[2**H-2:MID+1]));
  end
endmodule
