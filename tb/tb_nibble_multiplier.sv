// tb_nibble_multiplier: self-checking test of the signed multiplier.
//
// The default instance (9-bit sample, 16-bit coefficient) and a small one
// (4-bit by 4-bit, a single nibble) are compared with the product computed
// in the testbench with integer arithmetic: extreme values first, then
// random operands.
module tb_nibble_multiplier;

  logic signed [8:0]  a;
  logic signed [15:0] b;
  logic signed [24:0] p;
  logic signed [3:0]  sa, sb;
  logic signed [7:0]  sp;
  int checks = 0, failures = 0;

  nibble_multiplier dut (.a, .b, .p);
  nibble_multiplier #(.A_W(4), .B_W(4)) dut_small (.a(sa), .b(sb), .p(sp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, int y, int xs, int ys);
    int e, es;
    a = 9'(x); b = 16'(y); sa = 4'(xs); sb = 4'(ys);
    #1;
    e  = int'(a) * int'(b);
    es = int'(sa) * int'(sb);
    checks += 2;
    if (p !== 25'(e)) begin
      failures++;
      $display("FAIL: %0d * %0d gave %0d expected %0d", a, b, p, e);
    end
    if (sp !== 8'(es)) begin
      failures++;
      $display("FAIL small: %0d * %0d gave %0d expected %0d", sa, sb, sp, es);
    end
  endtask

  initial begin
    apply(-256, -32768, -8, -8);
    apply(255, 32767, 7, 7);
    apply(-256, 32767, -8, 7);
    apply(255, -32768, 7, -8);
    apply(-1, -1, -1, -1);
    apply(0, 12345, 0, 5);
    apply(1, 26208, 1, -3);
    for (int i = 0; i < 5000; i++)
      apply($urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
