// incmg: increment / decrement mask generator, H-bit position to 2**H-bit mask.
//
// v[k] = 1 for every k <= p: the bits an increment (p = trailing-zero position) or a
// decrement (p = trailing-one position) must invert. Recursive: the mask for p[H-1:0]
// is {p[H-1] & m, p[H-1] | m} where m is the half-width mask of p[H-2:0]; the first
// stage maps p[0] to {p[0], 1'b1}. One AND or OR gate per mask bit and level.
// Combinational, H-1 gate stages. Structure follows the document.
// Lint note: Verilator, when it lints this self-instantiating module as a top of its
// own, does not elaborate the child copies and so reports the sub-tree nets as
// undriven and the inputs as unused. Instantiated from a parent, or synthesized, the
// tree is complete; the warnings stand for that reason.
module incmg #(
  parameter int unsigned H = 5
) (
  input  logic [H-1:0]    p,
  output logic [2**H-1:0] v
);
  if (H == 1) begin : g_first
    assign v = {p[0], 1'b1};
  end else begin : g_rec
    logic [2**(H-1)-1:0] m;
    incmg #(.H(H-1)) u_sub (.p(p[H-2:0]), .v(m));
    assign v = {m & {2**(H-1){p[H-1]}}, m | {2**(H-1){p[H-1]}}};
  end
endmodule
