// clddg: recursive generalized comparator / lead-digit detector, 2**H inputs.
//
// Modes (F, Inv, C/L):
//   C/L=0: find the leading (F=0) or trailing (F=1) one (Inv=0) or zero (Inv=1) of i.
//   C/L=1: i holds A on odd bits and B on even bits; find the most (F=0) or least (F=1)
//          significant bit where they differ. With F=0, p[0]=1 means A>B (Inv=0) or
//          A<B (Inv=1); e=0 means A=B.
// p is the bit position of the found digit, e=1 when one exists. Each level combines
// two half-width trees with an OR (E), a multiplexer choosing which subtree's E is the
// select (upper E for F=0, complement of the lower E for F=1) and a position multiplexer.
// Only the foundation blocks (clddg_fb) depend on the comparator/LDD choice.
// Combinational, H multiplexer stages plus the foundation.
// The complemented select for F=1 is this design's choice (see clddg_fb): it keeps p the
// true position and gives p = all ones when e=0 in flip mode.
// Lint note: Verilator, when it lints this self-instantiating module as a top of its
// own, does not elaborate the child copies and so reports the sub-tree nets as
// undriven and the inputs as unused. Instantiated from a parent, or synthesized, the
// tree is complete; the warnings stand for that reason.
module clddg #(
  parameter int unsigned H = 4
) (
  input  logic [2**H-1:0] i,
  input  logic            f,
  input  logic            inv,
  input  logic            cl,
  output logic [H-1:0]    p,
  output logic            e
);
  if (H == 1) begin : g_fb
    clddg_fb u_fb (.a(i[1]), .b(i[0]), .f(f), .inv(inv), .cl(cl), .p(p[0]), .e(e));
  end else begin : g_rec
    logic [H-2:0] p_hi, p_lo;
    logic         e_hi, e_lo, sel;
    clddg #(.H(H-1)) u_hi (.i(i[2**H-1:2**(H-1)]), .f(f), .inv(inv), .cl(cl), .p(p_hi), .e(e_hi));
    clddg #(.H(H-1)) u_lo (.i(i[2**(H-1)-1:0]),    .f(f), .inv(inv), .cl(cl), .p(p_lo), .e(e_lo));
    assign sel = f ? ~e_lo : e_hi;
    assign e   = e_hi | e_lo;
    assign p   = {sel, sel ? p_hi : p_lo};
  end
endmodule
