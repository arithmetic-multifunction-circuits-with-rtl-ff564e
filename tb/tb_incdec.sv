// tb_incdec: exhaustive check of the 16-bit incrementer/decrementer: for every operand,
// inc gives i+1 and dec gives i-1 modulo 2**16, and nov is 0 exactly for the
// overflowing operands (all ones for inc, zero for dec).
module tb_incdec;
  localparam int unsigned H = 4;
  localparam int unsigned N = 2**H;
  logic [N-1:0] i, j;
  logic inc, nov;
  int checks = 0, failures = 0, overflows = 0;

  incdec dut (.i(i), .inc(inc), .j(j), .nov(nov));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      inc = m[0];
      for (int v = 0; v < 2**N; v++) begin
        i = N'(v);
        #1;
        checks++;
        if (j !== (inc ? i + 1'b1 : i - 1'b1) || nov !== (inc ? (i != '1) : (i != '0))) begin
          failures++;
          if (failures < 10) $display("FAIL inc=%0d i=%h j=%h nov=%0d", inc, i, j, nov);
        end
        if (!nov) overflows++;
      end
    end
    checks++;
    if (overflows != 2) begin
      failures++;
      $display("FAIL overflow seen %0d times", overflows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
