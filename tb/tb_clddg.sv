// tb_clddg: exhaustive check of the 16-input generalized comparator / LDD in all eight
// (F, Inv, C/L) modes against a bit-scan model. For C/L=1, F=0 it also checks the
// comparison reading of p[0] (A>B, or A<B with Inv=1) on the interlaced operands.
// In flip mode with no digit found, p must be all ones (the wrap used by incdec).
module tb_clddg;
  import tb_ref_pkg::*;
  localparam int unsigned H = 4;
  localparam int unsigned N = 2**H;
  logic [N-1:0] i;
  logic f, inv, cl;
  logic [H-1:0] p;
  logic e;
  int checks = 0, failures = 0;

  clddg dut (.i(i), .f(f), .inv(inv), .cl(cl), .p(p), .e(e));

  initial begin : watchdog
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pos_t r;
    logic [7:0] a8, b8;
    for (int m = 0; m < 8; m++) begin
      {f, inv, cl} = 3'(m);
      for (int v = 0; v < 2**N; v++) begin
        i = N'(v);
        #1;
        r = ref_pos(64'(i), N, f, inv, cl);
        checks++;
        if (e !== r.e || (r.e && p !== H'(r.p)) || (!r.e && !cl && f && p !== '1)) begin
          failures++;
          if (failures < 10) $display("FAIL mode f=%0d inv=%0d cl=%0d i=%h p=%0d e=%0d exp %0d %0d",
                                      f, inv, cl, i, p, e, r.p, r.e);
        end
        if (cl && !f && e) begin
          for (int k = 0; k < 8; k++) begin
            a8[k] = i[2*k+1];
            b8[k] = i[2*k];
          end
          checks++;
          if (p[0] !== (inv ? (a8 < b8) : (a8 > b8))) begin
            failures++;
            if (failures < 10) $display("FAIL compare inv=%0d a=%0d b=%0d p0=%0d", inv, a8, b8, p[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
