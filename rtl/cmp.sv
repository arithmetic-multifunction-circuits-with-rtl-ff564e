// cmp: recursive magnitude comparator for two unsigned 2**(H-1)-bit operands.
//
// The two operands are interlaced (A_k on bit 2k+1, B_k on bit 2k) and fed to a
// lead-digit tree whose foundation block is an XOR: it finds the most significant
// position where A and B differ. The least significant bit of that position says which
// operand has the 1 there: odd (gt=1) means A>B, even means B>A. ne (the tree's E) is 0
// when A=B. Only the P0 multiplexer chain and the OR tree of the detector remain.
// Combinational, H gate stages. Structure follows the document.
// Lint note: Verilator, when it lints this self-instantiating module as a top of its
// own, does not elaborate the child copies and so reports the sub-tree nets as
// undriven and the inputs as unused. Instantiated from a parent, or synthesized, the
// tree is complete; the warnings stand for that reason.
module cmp #(
  parameter int unsigned H = 4
) (
  input  logic [2**(H-1)-1:0] a,
  input  logic [2**(H-1)-1:0] b,
  output logic                gt,
  output logic                ne
);
  if (H == 1) begin : g_fb
    assign ne = a[0] ^ b[0];
    assign gt = a[0];
  end else begin : g_rec
    logic gt_hi, gt_lo, ne_hi, ne_lo;
    cmp #(.H(H-1)) u_hi (.a(a[2**(H-1)-1:2**(H-2)]), .b(b[2**(H-1)-1:2**(H-2)]), .gt(gt_hi), .ne(ne_hi));
    cmp #(.H(H-1)) u_lo (.a(a[2**(H-2)-1:0]),        .b(b[2**(H-2)-1:0]),        .gt(gt_lo), .ne(ne_lo));
    assign ne = ne_hi | ne_lo;
    assign gt = ne_hi ? gt_hi : gt_lo;
  end
endmodule
