// mf4_unit: four-way multifunction arithmetic circuit on a 2**H-bit input.
//
// One recursive tree (mf1) is shared by four functions chosen by ctrl:
//   add F inv cl
//    0  0  0   0   leading-one detection          -> p, e
//    0  0  0   1   comparison, A on odd / B on even bits: p[0]=1 if A>B, e=0 if A=B
//    0  0  1   0   leading-zero detection; (0,0,1,1) inverted comparison: p[0]=1 if A<B
//    0  1  x   0   trailing one (inv=0) / zero (inv=1) detection
//    0  1  x   1   position of the least significant differing bit
//    0  1  1   0   increment:  y = i + 1, e = 0 on overflow
//    0  1  0   0   decrement:  y = i - 1, e = 0 on underflow
//    1  0  0   1   addition:   y = A + B (2**(H-1)-bit operands, carry out in
//                               y[2**(H-1)], bits above 0)
// Behind the tree sit two post-processing units: the inc/dec mask generator (incmg),
// fed by the position p, and the adder post-processing (bkutr, the second Brent-Kung
// tree), fed by the tree's dyadic generate / not-propagate buses. A multiplexer selected
// by C/L picks (i, mask) or (propagate, carry) and a row of XOR gates forms y: inverting
// bits 0..p for inc/dec, and sum = propagate ^ carry for addition. The adder buses are
// 2**(H-1) wide and are padded to 2**H: propagate with 0s, carry shifted up one bit with
// a 0 carry into bit 0, so the bit above the sum is the carry out.
// Combinational; the adder path is H + (H-2) + 1 prefix/XOR stages deep.
// The structure follows the document. The bitwise propagate A_k^B_k for the sum is taken
// from the operand bits, and the padding convention, are this design's choices.
module mf4_unit
  import arith_pkg::*;
#(
  parameter int unsigned H = 5
) (
  input  logic [2**H-1:0] i,
  input  mf_ctrl_t        ctrl,
  output logic [H-1:0]    p,
  output logic            e,
  output logic [2**H-1:0] y
);
  localparam int unsigned N = 2**H;     // tree inputs
  localparam int unsigned W = 2**(H-1); // adder operand width

  logic [W-1:0] g_d, pn_d, g_pre, pn_pre, prop;
  logic [N-1:0] mask, x_a, x_b;

  mf1 #(.H(H)) u_tree (.i(i), .ctrl(ctrl), .p(p), .g(g_d), .pn(pn_d));
  assign e = pn_d[W-1];

  incmg #(.H(H)) u_mask (.p(p), .v(mask));

  // the prefix not-propagate (pn_pre) is not needed by the sum and stays unused
  bkutr #(.H(H-1)) u_add (.g_in(g_d), .pn_in(pn_d), .g(g_pre), .pn(pn_pre));

  for (genvar k = 0; k < W; k++) begin : g_prop
    assign prop[k] = i[2*k+1] ^ i[2*k];
  end

  // output multiplexer (C/L) and XOR stage
  always_comb begin
    if (ctrl.cl) begin
      x_a = N'(prop);
      x_b = N'({g_pre, 1'b0});
    end else begin
      x_a = i;
      x_b = mask;
    end
    y = x_a ^ x_b;
  end
endmodule
