// tb_arith_mf_top: end-to-end test of the whole design at its default sizes.
// The multifunction circuit is taken through every function of its mode table, through
// increment, decrement and addition, and the stand-alone circuits are exercised at the
// same time. Each mechanism the design has is counted and must occur at least once:
// the eight detection/comparison modes, equal operands (e=0 in comparison), no digit
// found (e=0 in detection), increment, decrement, increment overflow, decrement
// underflow, addition, addition with carry out and a carry that ripples across the
// whole adder, and every stand-alone circuit's own events.
module tb_arith_mf_top;
  import arith_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned MF_H = 5, LDD_H = 4, CMP_H = 4, CLDD_H = 4, INC_H = 4, CG_H = 5;
  localparam int unsigned N = 2**MF_H, W = 2**(MF_H-1);

  logic [N-1:0] mf_i, mf_y;
  mf_ctrl_t mf_ctrl;
  logic [MF_H-1:0] mf_p;
  logic mf_e;
  logic [15:0] ldd_i;  logic [3:0] ldd_p;  logic ldd_e;
  logic [7:0] cmp_a, cmp_b;  logic cmp_gt, cmp_ne;
  logic [15:0] cl_i;  logic cl_f, cl_inv, cl_cl;  logic [3:0] cl_p;  logic cl_e;
  logic [15:0] id_i, id_j;  logic id_inc, id_nov;
  logic [15:0] cg_a, cg_b, cg_g, cg_pn;

  int checks = 0, failures = 0;

  typedef enum int {
    EV_MODE0, EV_MODE1, EV_MODE2, EV_MODE3, EV_MODE4, EV_MODE5, EV_MODE6, EV_MODE7,
    EV_EQUAL, EV_NONE, EV_INC, EV_DEC, EV_INC_OVF, EV_DEC_UNF, EV_ADD, EV_ADD_COUT,
    EV_ADD_RIPPLE, EV_LDD, EV_CMP_GT, EV_CMP_EQ, EV_CL, EV_ID_OVF, EV_CG, EV_COUNT
  } ev_t;
  int ev [EV_COUNT];

  arith_mf_top dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    pos_t r;
    logic [W-1:0] a, b;
    logic [16:0] s;
    foreach (ev[k]) ev[k] = 0;
    for (int t = 0; t < 30000; t++) begin
      // multifunction circuit: cycle through detection, inc/dec and addition
      case (t % 3)
        0: begin
          mf_ctrl = mf_ctrl_t'({1'b0, 3'(t / 3)});
          mf_i = N'($urandom());
          if (t % 31 == 0) mf_i = mf_ctrl.inv ? '1 : '0;
          if (t % 37 == 0) mf_i = {mf_i[N-1:2], mf_i[1], mf_i[1]};
          if (t % 41 == 0) begin
            for (int k = 0; k < int'(W); k++) mf_i[2*k] = mf_i[2*k+1];
          end
        end
        1: begin
          mf_ctrl = '{add: 1'b0, f: 1'b1, inv: t[1], cl: 1'b0};
          mf_i = N'($urandom());
          if (t % 29 == 1) mf_i = mf_ctrl.inv ? '1 : '0;
        end
        default: begin
          mf_ctrl = '{add: 1'b1, f: 1'b0, inv: 1'b0, cl: 1'b1};
          a = W'($urandom());
          b = (t % 11 == 2) ? ~a + 1'b1 : W'($urandom());
          mf_i = N'(interlace(32'(a), 32'(b), W));
        end
      endcase
      // stand-alone circuits
      ldd_i  = (t % 17 == 0) ? '0 : 16'($urandom()) >> ($urandom() % 16);
      cmp_a  = 8'($urandom());
      cmp_b  = (t % 13 == 0) ? cmp_a : 8'($urandom());
      {cl_f, cl_inv, cl_cl} = 3'($urandom());
      cl_i   = 16'($urandom());
      id_inc = t[2];
      id_i   = (t % 19 == 0) ? {16{id_inc}} : 16'($urandom());
      cg_a   = 16'($urandom());
      cg_b   = 16'($urandom());
      #1;

      // multifunction checks
      if (t % 3 == 0) begin
        r = ref_pos(64'(mf_i), N, mf_ctrl.f, mf_ctrl.inv, mf_ctrl.cl);
        check(mf_e === r.e && (!r.e || mf_p === MF_H'(r.p)), "mf detect");
        ev[ev_t'(int'(EV_MODE0) + int'({mf_ctrl.f, mf_ctrl.inv, mf_ctrl.cl}))]++;
        if (!mf_e && mf_ctrl.cl) ev[EV_EQUAL]++;
        if (!mf_e && !mf_ctrl.cl) ev[EV_NONE]++;
      end else if (t % 3 == 1) begin
        if (mf_ctrl.inv) begin
          check(mf_y === mf_i + 1'b1 && mf_e === (mf_i != '1), "mf inc");
          ev[EV_INC]++;
          if (!mf_e) ev[EV_INC_OVF]++;
        end else begin
          check(mf_y === mf_i - 1'b1 && mf_e === (mf_i != '0), "mf dec");
          ev[EV_DEC]++;
          if (!mf_e) ev[EV_DEC_UNF]++;
        end
      end else begin
        s = {1'b0, a} + {1'b0, b};
        check(mf_y === N'(s), "mf add");
        ev[EV_ADD]++;
        if (s[16]) ev[EV_ADD_COUT]++;
        if ((a ^ b) == '1 || s[15:0] == '0) ev[EV_ADD_RIPPLE]++;
      end

      // stand-alone checks
      r = ref_pos(64'(ldd_i), 16, 1'b0, 1'b0, 1'b0);
      check(ldd_e === r.e && (!r.e || ldd_p === 4'(r.p)), "ldd");
      ev[EV_LDD]++;
      check(cmp_ne === (cmp_a != cmp_b) && (cmp_a == cmp_b || cmp_gt === (cmp_a > cmp_b)), "cmp");
      if (cmp_a > cmp_b) ev[EV_CMP_GT]++;
      if (cmp_a == cmp_b) ev[EV_CMP_EQ]++;
      r = ref_pos(64'(cl_i), 16, cl_f, cl_inv, cl_cl);
      check(cl_e === r.e && (!r.e || cl_p === 4'(r.p)), "clddg");
      ev[EV_CL]++;
      check(id_j === (id_inc ? id_i + 1'b1 : id_i - 1'b1) && id_nov === (id_inc ? id_i != '1 : id_i != '0), "incdec");
      if (!id_nov) ev[EV_ID_OVF]++;
      for (int k = 0; k < 16; k++) begin
        logic [16:0] ss;
        logic [15:0] m;
        m  = 16'((32'd2 << k) - 1);
        ss = {1'b0, cg_a & m} + {1'b0, cg_b & m};
        check(cg_g[k] === ss[k+1] && cg_pn[k] === (((cg_a ^ cg_b) & m) != m), "cg");
      end
      ev[EV_CG]++;
    end

    for (int k = 0; k < int'(EV_COUNT); k++) begin
      $display("event %s: %0d", ev_t'(k), ev[k]);
      check(ev[k] > 0, "event never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
