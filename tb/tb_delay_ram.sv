// tb_delay_ram: self-checking test of one delay-line stage.
//
// Drives random samples with a random enable and checks each clock that the
// stage output equals a reference register kept in the testbench: it loads
// the sample only in enabled cycles and holds it otherwise. Also checks that
// an asynchronous reset clears the stage without a clock edge.
module tb_delay_ram;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         reset;
  logic         en;
  logic [W-1:0] d, q, expected;
  int           checks = 0, failures = 0;
  int           loads = 0, holds = 0;

  delay_ram #(.W(W)) dut (.clk, .reset, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: q=%0h expected=%0h", what, q, expected);
    end
  endtask

  initial begin
    reset = 1'b1; en = 1'b0; d = '0; expected = '0;
    repeat (2) @(posedge clk);
    #1 check("after reset");
    reset = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = W'($urandom);
      @(posedge clk);
      if (en) begin expected = d; loads++; end
      else holds++;
      #1 check("cycle");
    end
    // asynchronous clear in the middle of a clock period
    @(negedge clk);
    en = 1'b1; d = 8'hA5;
    @(posedge clk);
    expected = 8'hA5;
    #1 check("load before clear");
    #2 reset = 1'b1;
    #1 expected = '0;
    check("asynchronous clear");
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL: enable not exercised both ways");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
