// tb_byte_adder: self-checking test of the two-input signed adder.
//
// Checks an 8-bit and a 30-bit instance against the sum computed in the
// testbench with 64-bit integers and cut to the adder width, for random
// operands and for the extreme values.
module tb_byte_adder;

  logic signed [7:0]  a8, b8, s8;
  logic signed [29:0] a30, b30, s30;
  int checks = 0, failures = 0;

  byte_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .sum(s8));
  byte_adder #(.W(30)) dut30 (.a(a30), .b(b30), .sum(s30));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint x8, longint y8, longint x30, longint y30);
    longint e8, e30;
    a8 = 8'(x8); b8 = 8'(y8); a30 = 30'(x30); b30 = 30'(y30);
    #1;
    e8  = longint'(a8) + longint'(b8);
    e30 = longint'(a30) + longint'(b30);
    checks += 2;
    if (s8 !== 8'(e8)) begin
      failures++;
      $display("FAIL 8-bit: %0d + %0d gave %0d", a8, b8, s8);
    end
    if (s30 !== 30'(e30)) begin
      failures++;
      $display("FAIL 30-bit: %0d + %0d gave %0d", a30, b30, s30);
    end
  endtask

  initial begin
    apply(-128, -128, -(1 <<< 29), 0);
    apply(127, 127, (1 <<< 29) - 1, 1);
    apply(-1, 1, -1, 1);
    apply(0, 0, 0, 0);
    for (int i = 0; i < 2000; i++)
      apply($urandom, $urandom, {$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
