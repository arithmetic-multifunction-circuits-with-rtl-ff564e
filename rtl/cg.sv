// cg: recursive (Sklansky) carry generator for two 2**(H-1)-bit operands.
//
// For every bit k it gives the prefix generate g[k] (the carry out of bits 0..k with no
// carry in) and the prefix not-propagate pn[k] (0 when all of bits 0..k propagate).
// The foundation block of one bit is pn = XNOR(A,B), g = A.B. Each level joins two
// half-width generators: the lower half passes through, and every bit of the upper half
// is combined with the top bit of the lower half by the Delta' operator (a multiplexer
// for g selected by the upper bit's pn, an OR for pn). This places Delta' nodes between
// the branches of the dyadic tree, giving a Sklansky prefix structure with H-1 levels.
// Combinational. Follows the document; no carry input and no sum stage are described,
// so none are built.
// Lint note: Verilator, when it lints this self-instantiating module as a top of its
// own, does not elaborate the child copies and so reports the sub-tree nets as
// undriven and the inputs as unused. Instantiated from a parent, or synthesized, the
// tree is complete; the warnings stand for that reason.
module cg
  import arith_pkg::*;
#(
  parameter int unsigned H = 5
) (
  input  logic [2**(H-1)-1:0] a,
  input  logic [2**(H-1)-1:0] b,
  output logic [2**(H-1)-1:0] g,
  output logic [2**(H-1)-1:0] pn
);
  if (H == 1) begin : g_fb
    assign pn[0] = ~(a[0] ^ b[0]);
    assign g[0]  = a[0] & b[0];
  end else begin : g_rec
    localparam int unsigned HALF = 2**(H-2);
    logic [HALF-1:0] g_hi, pn_hi, g_lo, pn_lo;
    cg #(.H(H-1)) u_hi (.a(a[2*HALF-1:HALF]), .b(b[2*HALF-1:HALF]), .g(g_hi), .pn(pn_hi));
    cg #(.H(H-1)) u_lo (.a(a[HALF-1:0]),      .b(b[HALF-1:0]),      .g(g_lo), .pn(pn_lo));
    assign g[HALF-1:0]  = g_lo;
    assign pn[HALF-1:0] = pn_lo;
    for (genvar k = 0; k < HALF; k++) begin : g_node
      gp_t r;
      assign r = delta_p('{g: g_hi[k], np: pn_hi[k]}, '{g: g_lo[HALF-1], np: pn_lo[HALF-1]});
      assign g[HALF+k]  = r.g;
      assign pn[HALF+k] = r.np;
    end
  end
endmodule
