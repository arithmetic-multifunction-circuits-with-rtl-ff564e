// bkutr: "right" Brent-Kung upper tree: the adder post-processing that turns the dyadic
// (up-sweep) group values of a 2**H-position prefix tree into the prefixes of all
// positions.
//
// After the dyadic tree, position k holds the group ending at k whose size is 2 to the
// number of trailing ones of k; positions 2**j-1 already hold full prefixes. bkutr
// recurses on the lower half, passes the top position through, and hands the
// positions 2**(H-1) .. 2**H-2 to a bkutl whose incoming prefix is the (already
// complete) lower-half top, a flow-through cell. The second tree grows down from the
// dyadic tree, which gives the Brent-Kung structure: fan-out bounded, H-1 extra levels.
// Combinational. Structure follows the document.
module bkutr #(
  parameter int unsigned H = 4
) (
  input  logic [2**H-1:0] g_in,
  input  logic [2**H-1:0] pn_in,
  output logic [2**H-1:0] g,
  output logic [2**H-1:0] pn
);
  if (H == 0) begin : g_one
    assign g  = g_in;
    assign pn = pn_in;
  end else begin : g_rec
    localparam int unsigned HALF = 2**(H-1);
    bkutr #(.H(H-1)) u_lo (.g_in(g_in[HALF-1:0]), .pn_in(pn_in[HALF-1:0]),
                           .g(g[HALF-1:0]), .pn(pn[HALF-1:0]));
    assign g[2*HALF-1]  = g_in[2*HALF-1];
    assign pn[2*HALF-1] = pn_in[2*HALF-1];
    if (H > 1) begin : g_up
      bkutl #(.H(H-1)) u_hi (.g_in(g_in[2*HALF-2:HALF]), .pn_in(pn_in[2*HALF-2:HALF]),
                             .cg_in(g_in[HALF-1]), .cpn_in(pn_in[HALF-1]),
                             .g(g[2*HALF-2:HALF]), .pn(pn[2*HALF-2:HALF]));
    end
  end
endmodule
