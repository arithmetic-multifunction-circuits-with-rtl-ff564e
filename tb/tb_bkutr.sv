// tb_bkutr: checks the Brent-Kung upper tree (16 positions). Random operands are turned
// into the dyadic group values the up-sweep delivers (position k holds the group that
// ends at k and is 2**t bits long, t = number of trailing ones of k), computed here by
// plain addition; the tree must return the carry out of bits 0..k and the all-propagate
// flag of bits 0..k for every k.
module tb_bkutr;
  localparam int unsigned H = 4;
  localparam int unsigned W = 2**H;
  logic [W-1:0] g_in, pn_in, g, pn;
  logic [W-1:0] a, b;
  int checks = 0, failures = 0;

  bkutr dut (.g_in(g_in), .pn_in(pn_in), .g(g), .pn(pn));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry out of bits lo..hi with no carry in
  function automatic logic carry(logic [W-1:0] x, logic [W-1:0] y, int lo, int hi);
    logic c;
    c = 1'b0;
    for (int k = lo; k <= hi; k++) c = (x[k] & y[k]) | (c & (x[k] ^ y[k]));
    return c;
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      a = W'($urandom());
      b = (t % 3 == 0) ? ~a ^ W'(1 << ($urandom() % W)) : W'($urandom());
      for (int k = 0; k < int'(W); k++) begin
        int sz, lo;
        sz = 1;
        while (sz < int'(W) && (k % (2*sz)) == (2*sz - 1)) sz *= 2;
        lo = k - sz + 1;
        g_in[k]  = carry(a, b, lo, k);
        pn_in[k] = (((a ^ b) >> lo) & W'((33'd1 << sz) - 1)) != W'((33'd1 << sz) - 1);
      end
      #1;
      for (int k = 0; k < int'(W); k++) begin
        checks++;
        if (g[k] !== carry(a, b, 0, k) || pn[k] !== (((a ^ b) & W'((33'd2 << k) - 1)) != W'((33'd2 << k) - 1))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h k=%0d g=%b pn=%b", a, b, k, g[k], pn[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
