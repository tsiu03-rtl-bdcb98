// tb_pipe_delay: random data through a 2-stage delay of 3 bits (as used for
// the sync pair and the blanking signal) and a 1-stage delay, checking
// q(t) = d(t - STAGES) and the reset value.
module tb_pipe_delay;
  logic       clk = 1'b0, rstn = 1'b0;
  logic [2:0] d2 = '0, q2;
  logic [2:0] d1 = '0, q1;
  logic [2:0] hist [$];
  int checks = 0, failures = 0;

  pipe_delay #(.WIDTH(3), .STAGES(2), .RESET_VALUE(3'b101)) dut2 (.clk, .rstn, .d(d2), .q(q2));
  pipe_delay #(.WIDTH(3), .STAGES(1), .RESET_VALUE(3'b010)) dut1 (.clk, .rstn, .d(d1), .q(q1));

  always #10 clk = ~clk;

  task automatic check(input logic [2:0] got, input logic [2:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [2:0] prev1;
    repeat (2) @(posedge clk);
    #1 check(q2, 3'b101, "reset value 2-stage");
    check(q1, 3'b010, "reset value 1-stage");
    rstn = 1'b1;
    for (int n = 0; n < 500; n++) begin
      d2 = 3'($urandom);
      d1 = 3'($urandom);
      hist.push_back(d2);
      prev1 = d1;
      @(posedge clk); #1;
      check(q1, prev1, "1-stage");
      if (hist.size() == 2) check(q2, hist.pop_front(), "2-stage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
