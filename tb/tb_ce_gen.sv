// tb_ce_gen: checks that the clock enable is 0 right after reset and then
// toggles every 50 MHz cycle (high one cycle in two), and that a second reset
// restarts it at 0.
module tb_ce_gen;
  logic clk = 1'b0, rstn = 1'b0;
  logic ce;
  int checks = 0, failures = 0;

  ce_gen dut (.clk, .rstn, .ce);

  always #10 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(ce, 1'b0, "ce in reset");
    rstn = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      // After n+1 edges out of reset ce = (n+1) mod 2.
      check(ce, 1'((n + 1) % 2), "ce toggle");
    end
    // Reset in the middle of operation.
    rstn = 1'b0; #1 check(ce, 1'b0, "ce async reset");
    @(posedge clk); #1 rstn = 1'b1;
    @(posedge clk); #1 check(ce, 1'b1, "ce after second reset");
    @(posedge clk); #1 check(ce, 1'b0, "ce after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
