// tb_mf1: checks the 32-input multifunction tree (default size).
// Add=0: all eight (F, Inv, C/L) modes on random and sparse vectors; e (the top
// not-propagate) and p must match a bit-scan model. Add=1 (C/L=1, F=0, Inv=0): for
// random 16-bit operand pairs, g[k] and pn[k] must be the generate and not-propagate of
// the dyadic group ending at bit k (2**t bits, t = trailing ones of k).
module tb_mf1;
  import arith_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned H = 5;
  localparam int unsigned N = 2**H;
  localparam int unsigned W = 2**(H-1);
  logic [N-1:0] i;
  mf_ctrl_t ctrl;
  logic [H-1:0] p;
  logic [W-1:0] g, pn;
  int checks = 0, failures = 0;

  mf1 dut (.i(i), .ctrl(ctrl), .p(p), .g(g), .pn(pn));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic carry(logic [W-1:0] x, logic [W-1:0] y, int lo, int hi);
    logic c;
    c = 1'b0;
    for (int k = lo; k <= hi; k++) c = (x[k] & y[k]) | (c & (x[k] ^ y[k]));
    return c;
  endfunction

  initial begin
    pos_t r;
    logic [W-1:0] a, b;
    for (int t = 0; t < 40000; t++) begin
      ctrl = mf_ctrl_t'({1'b0, 3'($urandom())});
      case (t % 4)
        0: i = N'($urandom());
        1: i = N'(1) << ($urandom() % N);
        2: i = ~(N'(1) << ($urandom() % N));
        default: i = N'($urandom()) & N'($urandom()) & N'($urandom());
      endcase
      #1;
      r = ref_pos(64'(i), N, ctrl.f, ctrl.inv, ctrl.cl);
      checks++;
      if (pn[W-1] !== r.e || (r.e && p !== H'(r.p))) begin
        failures++;
        if (failures < 10) $display("FAIL ctrl=%b i=%h p=%0d e=%b exp %0d %b", ctrl, i, p, pn[W-1], r.p, r.e);
      end
    end
    ctrl = '{add: 1'b1, f: 1'b0, inv: 1'b0, cl: 1'b1};
    for (int t = 0; t < 20000; t++) begin
      a = W'($urandom());
      b = (t % 3 == 0) ? ~a ^ W'(1 << ($urandom() % W)) : W'($urandom());
      i = N'(interlace(32'(a), 32'(b), W));
      #1;
      for (int k = 0; k < int'(W); k++) begin
        int sz, lo;
        sz = 1;
        while (sz < int'(W) && (k % (2*sz)) == (2*sz - 1)) sz *= 2;
        lo = k - sz + 1;
        checks++;
        if (g[k] !== carry(a, b, lo, k) || pn[k] !== ((((a ^ b) >> lo) & W'((33'd1 << sz) - 1)) != W'((33'd1 << sz) - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL add a=%h b=%h k=%0d g=%b pn=%b", a, b, k, g[k], pn[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
