// ldd: recursive leading-one detector for a 2**H-bit operand.
//
// E is 1 when any input bit is 1; P is the bit position of the most significant 1
// (0 when E=0). The circuit is a dyadic tree: the 2-bit foundation block gives P=I1,
// E=I1|I0; every level above combines two half-width detectors with one OR gate (E)
// and one multiplexer selected by the upper half's E (the new P msb is that E, the
// lower P bits come from the upper half if it holds a 1, else from the lower half).
// All outputs settle after H gate stages, every element has fan-in 2.
// Purely combinational. Structure follows the document; P=0 when E=0 is this design's
// choice for the don't-care of the truth table.
// Lint note: Verilator, when it lints this self-instantiating module as a top of its
// own, does not elaborate the child copies and so reports the sub-tree nets as
// undriven and the inputs as unused. Instantiated from a parent, or synthesized, the
// tree is complete; the warnings stand for that reason.
module ldd #(
  parameter int unsigned H = 4
) (
  input  logic [2**H-1:0] i,
  output logic [H-1:0]    p,
  output logic            e
);
  if (H == 1) begin : g_fb
    assign p[0] = i[1];
    assign e    = i[1] | i[0];
  end else begin : g_rec
    logic [H-2:0] p_hi, p_lo;
    logic         e_hi, e_lo;
    ldd #(.H(H-1)) u_hi (.i(i[2**H-1:2**(H-1)]), .p(p_hi), .e(e_hi));
    ldd #(.H(H-1)) u_lo (.i(i[2**(H-1)-1:0]),    .p(p_lo), .e(e_lo));
    assign e = e_hi | e_lo;
    assign p = {e_hi, e_hi ? p_hi : p_lo};
  end
endmodule
