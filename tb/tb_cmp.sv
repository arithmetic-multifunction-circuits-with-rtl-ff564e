// tb_cmp: exhaustive check of the comparator for 8-bit unsigned operands (default size):
// all 65536 (A, B) pairs; gt must equal A>B whenever A!=B, and ne must equal A!=B.
module tb_cmp;
  localparam int unsigned H = 4;
  localparam int unsigned W = 2**(H-1);
  logic [W-1:0] a, b;
  logic gt, ne;
  int checks = 0, failures = 0;

  cmp dut (.a(a), .b(b), .gt(gt), .ne(ne));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 2**W; x++) begin
      for (int y = 0; y < 2**W; y++) begin
        a = W'(x);
        b = W'(y);
        #1;
        checks++;
        if (ne !== (x != y) || ((x != y) && gt !== (x > y))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d gt=%0d ne=%0d", a, b, gt, ne);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
