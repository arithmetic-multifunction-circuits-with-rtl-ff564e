// tb_cg: checks the 16-bit Sklansky carry generator against integer addition.
// For random operands (plus all-ones/zero corner pairs) and every bit k:
// g[k] must be the carry out of a[k:0]+b[k:0] and pn[k] must be 0 exactly when every
// bit 0..k propagates (a^b all ones).
module tb_cg;
  localparam int unsigned H = 5;
  localparam int unsigned W = 2**(H-1);
  logic [W-1:0] a, b, g, pn;
  int checks = 0, failures = 0;

  cg dut (.a(a), .b(b), .g(g), .pn(pn));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] s;
    logic [W-1:0] prop;
    #1;
    prop = a ^ b;
    for (int k = 0; k < int'(W); k++) begin
      s = {1'b0, a & W'((33'd2 << k) - 1)} + {1'b0, b & W'((33'd2 << k) - 1)};
      checks++;
      if (g[k] !== s[k+1] || pn[k] !== ((prop & W'((33'd2 << k) - 1)) != W'((33'd2 << k) - 1))) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h k=%0d g=%b pn=%b", a, b, k, g[k], pn[k]);
      end
    end
  endtask

  initial begin
    a = '1; b = '0; check();
    a = '1; b = 1;  check();
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    for (int t = 0; t < 20000; t++) begin
      a = W'($urandom());
      b = (t % 3 == 0) ? ~a ^ W'(1 << ($urandom() % W)) : W'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
