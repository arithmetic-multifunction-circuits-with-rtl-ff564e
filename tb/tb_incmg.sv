// tb_incmg: checks the 5-bit to 32-bit mask generator for every position p:
// v must have exactly bits 0..p set.
module tb_incmg;
  localparam int unsigned H = 5;
  localparam int unsigned N = 2**H;
  logic [H-1:0] p;
  logic [N-1:0] v, exp_v;
  int checks = 0, failures = 0;

  incmg dut (.p(p), .v(v));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      p = H'(k);
      #1;
      for (int b = 0; b < N; b++) exp_v[b] = (b <= k);
      checks++;
      if (v !== exp_v) begin
        failures++;
        $display("FAIL p=%0d v=%h exp=%h", p, v, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
