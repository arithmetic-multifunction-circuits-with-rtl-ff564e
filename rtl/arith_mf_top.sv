// arith_mf_top: the recursive arithmetic circuits side by side.
//
// The main design is the four-way multifunction circuit (mf4_unit, 2**MF_H inputs):
// lead/trail digit detection, comparison, increment/decrement and addition from one
// shared recursive tree. Next to it stand the simpler recursive circuits it grows from,
// each usable on its own with its own ports: a leading-one detector (ldd), a magnitude
// comparator (cmp), the generalized comparator / lead-digit detector with flip and invert
// (clddg), a fast incrementer/decrementer (incdec) and a Sklansky carry generator (cg).
// Everything is combinational; there is no clock. See each module for its modes and
// timing. The default sizes of the stand-alone circuits are those of the document's
// examples where it gives one (16-bit LDD, 8-bit comparator, 16-bit carry generator);
// the others are this design's choice.
module arith_mf_top
  import arith_pkg::*;
#(
  parameter int unsigned MF_H   = 5,
  parameter int unsigned LDD_H  = 4,
  parameter int unsigned CMP_H  = 4,
  parameter int unsigned CLDD_H = 4,
  parameter int unsigned INC_H  = 4,
  parameter int unsigned CG_H   = 5
) (
  // four-way multifunction circuit
  input  logic [2**MF_H-1:0]    mf_i,
  input  mf_ctrl_t              mf_ctrl,
  output logic [MF_H-1:0]       mf_p,
  output logic                  mf_e,
  output logic [2**MF_H-1:0]    mf_y,
  // leading-one detector
  input  logic [2**LDD_H-1:0]   ldd_i,
  output logic [LDD_H-1:0]      ldd_p,
  output logic                  ldd_e,
  // comparator
  input  logic [2**(CMP_H-1)-1:0] cmp_a,
  input  logic [2**(CMP_H-1)-1:0] cmp_b,
  output logic                  cmp_gt,
  output logic                  cmp_ne,
  // generalized comparator / LDD
  input  logic [2**CLDD_H-1:0]  cl_i,
  input  logic                  cl_f,
  input  logic                  cl_inv,
  input  logic                  cl_cl,
  output logic [CLDD_H-1:0]     cl_p,
  output logic                  cl_e,
  // incrementer / decrementer
  input  logic [2**INC_H-1:0]   id_i,
  input  logic                  id_inc,
  output logic [2**INC_H-1:0]   id_j,
  output logic                  id_nov,
  // Sklansky carry generator
  input  logic [2**(CG_H-1)-1:0] cg_a,
  input  logic [2**(CG_H-1)-1:0] cg_b,
  output logic [2**(CG_H-1)-1:0] cg_g,
  output logic [2**(CG_H-1)-1:0] cg_pn
);
  mf4_unit #(.H(MF_H))  u_mf   (.i(mf_i), .ctrl(mf_ctrl), .p(mf_p), .e(mf_e), .y(mf_y));
  ldd      #(.H(LDD_H)) u_ldd  (.i(ldd_i), .p(ldd_p), .e(ldd_e));
  cmp      #(.H(CMP_H)) u_cmp  (.a(cmp_a), .b(cmp_b), .gt(cmp_gt), .ne(cmp_ne));
  clddg    #(.H(CLDD_H)) u_cl  (.i(cl_i), .f(cl_f), .inv(cl_inv), .cl(cl_cl), .p(cl_p), .e(cl_e));
  incdec   #(.H(INC_H)) u_id   (.i(id_i), .inc(id_inc), .j(id_j), .nov(id_nov));
  cg       #(.H(CG_H))  u_cg   (.a(cg_a), .b(cg_b), .g(cg_g), .pn(cg_pn));
endmodule
