// tb_mf1_fb: exhaustive check of the multifunction foundation block over both input
// bits and all 16 control codes. Expected values come from the function of each mode:
// add=1: epn = XNOR(a,b), pg = a.b.cl (after inversion); add=0: epn = a|b (cl=0) or
// a^b (cl=1), pg = a (F=0) or not b (F=1).
module tb_mf1_fb;
  import arith_pkg::*;
  logic a, b, pg, epn;
  mf_ctrl_t ctrl;
  int checks = 0, failures = 0;

  mf1_fb dut (.a(a), .b(b), .ctrl(ctrl), .pg(pg), .epn(epn));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x, y, exp_pg, exp_epn;
    for (int c = 0; c < 16; c++) begin
      for (int v = 0; v < 4; v++) begin
        ctrl = mf_ctrl_t'(c);
        {a, b} = 2'(v);
        #1;
        x = a ^ ctrl.inv;
        y = b ^ ctrl.inv;
        if (ctrl.add) begin
          exp_epn = ctrl.cl ? (x == y) : ~(x | y);
          exp_pg  = x & y & ctrl.cl;
        end else begin
          exp_epn = ctrl.cl ? (x != y) : (x | y);
          exp_pg  = ctrl.f ? ~y : x;
        end
        checks++;
        if (pg !== exp_pg || epn !== exp_epn) begin
          failures++;
          $display("FAIL ctrl=%b a=%b b=%b pg=%b epn=%b", ctrl, a, b, pg, epn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
