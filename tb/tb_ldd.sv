// tb_ldd: exhaustive check of the 16-bit leading-one detector (default size).
// Every input value is applied; e must say whether any bit is set and p, when e=1,
// must be the index of the highest set bit (found by a bit scan). With no bit set
// p must be 0. A watchdog ends the run if it stalls.
module tb_ldd;
  import tb_ref_pkg::*;
  localparam int unsigned H = 4;
  localparam int unsigned N = 2**H;
  logic [N-1:0] i;
  logic [H-1:0] p;
  logic         e;
  int checks = 0, failures = 0;

  ldd dut (.i(i), .p(p), .e(e));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pos_t r;
    for (int v = 0; v < 2**N; v++) begin
      i = N'(v);
      #1;
      r = ref_pos(64'(i), N, 1'b0, 1'b0, 1'b0);
      checks++;
      if (e !== r.e || (r.e ? (p !== H'(r.p)) : (p !== '0))) begin
        failures++;
        if (failures < 10) $display("FAIL i=%h p=%0d e=%0d exp p=%0d e=%0d", i, p, e, r.p, r.e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
