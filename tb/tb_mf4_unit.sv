// tb_mf4_unit: checks the four-way multifunction circuit at its default size
// (32 inputs, 16-bit addition) in every function:
//  * the eight detection / comparison modes (p, e against a bit-scan model; p[0] against
//    A>B or A<B for the comparisons),
//  * increment and decrement of 32-bit operands (y against i+1 / i-1, e against the
//    overflow condition, including the all-ones and zero operands),
//  * addition of 16-bit operands (y against A+B including the carry out).
module tb_mf4_unit;
  import arith_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned H = 5;
  localparam int unsigned N = 2**H;
  localparam int unsigned W = 2**(H-1);
  logic [N-1:0] i, y;
  mf_ctrl_t ctrl;
  logic [H-1:0] p;
  logic e;
  int checks = 0, failures = 0;

  mf4_unit dut (.i(i), .ctrl(ctrl), .p(p), .e(e), .y(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL %s ctrl=%b i=%h p=%0d e=%b y=%h", what, ctrl, i, p, e, y);
  endtask

  initial begin
    pos_t r;
    logic [W-1:0] a, b;
    // detection / comparison modes
    for (int t = 0; t < 20000; t++) begin
      ctrl = mf_ctrl_t'({1'b0, 3'(t)});
      i = (t % 5 == 0) ? N'(1) << ($urandom() % N) : N'($urandom());
      if (t % 7 == 0) i = {i[N-1:N/2], i[N-1:N/2]};
      #1;
      r = ref_pos(64'(i), N, ctrl.f, ctrl.inv, ctrl.cl);
      checks++;
      if (e !== r.e || (r.e && p !== H'(r.p))) fail("pos");
      if (ctrl.cl && !ctrl.f) begin
        for (int k = 0; k < int'(W); k++) begin
          a[k] = i[2*k+1];
          b[k] = i[2*k];
        end
        checks++;
        if (e !== (a != b) || (e && p[0] !== (ctrl.inv ? (a < b) : (a > b)))) fail("cmp");
      end
    end
    // increment / decrement
    for (int t = 0; t < 20000; t++) begin
      ctrl = '{add: 1'b0, f: 1'b1, inv: t[0], cl: 1'b0};
      case (t % 8)
        0: i = '1;
        1: i = '0;
        2: i = N'($urandom()) | N'(16'hffff);
        3: i = N'($urandom()) & ~N'(16'hffff);
        default: i = N'($urandom());
      endcase
      #1;
      checks++;
      if (ctrl.inv) begin
        if (y !== i + 1'b1 || e !== (i != '1)) fail("inc");
      end else begin
        if (y !== i - 1'b1 || e !== (i != '0)) fail("dec");
      end
    end
    // addition
    ctrl = '{add: 1'b1, f: 1'b0, inv: 1'b0, cl: 1'b1};
    for (int t = 0; t < 20000; t++) begin
      a = W'($urandom());
      case (t % 4)
        0: b = ~a;
        1: b = ~a + 1'b1;
        default: b = W'($urandom());
      endcase
      i = N'(interlace(32'(a), 32'(b), W));
      #1;
      checks++;
      if (y !== N'({1'b0, a} + {1'b0, b})) fail("add");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
