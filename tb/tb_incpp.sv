// tb_incpp: checks the incrementer post-processing (mask + XOR) on 16-bit operands:
// for random operands and every position p, bits 0..p of i are inverted and the rest
// kept. Also checks that, fed with the trailing-zero position, it increments.
module tb_incpp;
  localparam int unsigned H = 4;
  localparam int unsigned N = 2**H;
  logic [N-1:0] i, j, exp_j;
  logic [H-1:0] p;
  int checks = 0, failures = 0;

  incpp dut (.i(i), .p(p), .j(j));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      i = N'($urandom());
      for (int k = 0; k < N; k++) begin
        p = H'(k);
        #1;
        exp_j = i ^ N'((32'd2 << k) - 32'd1);
        checks++;
        if (j !== exp_j) begin
          failures++;
          if (failures < 10) $display("FAIL i=%h p=%0d j=%h exp=%h", i, p, j, exp_j);
        end
      end
      // trailing-zero position gives i+1 (skip all ones)
      if (i != '1) begin
        int tz;
        tz = 0;
        while (i[tz]) tz++;
        p = H'(tz);
        #1;
        checks++;
        if (j !== i + 1'b1) begin
          failures++;
          if (failures < 10) $display("FAIL inc i=%h j=%h", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
