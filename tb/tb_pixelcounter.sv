// tb_pixelcounter: drives the counter with an irregular clock enable and
// compares hcnt with a reference count every cycle, over several lines. It
// also checks that with ce high every second cycle a line lasts exactly
// 798 pixels = 1596 cycles of the 50 MHz clock.
module tb_pixelcounter;
  import vga_pkg::*;
  localparam int unsigned H_TOTAL = 798;

  logic  clk = 1'b0, rstn = 1'b0, ce = 1'b0;
  hcnt_t hcnt;
  int checks = 0, failures = 0;
  int ref_cnt = 0, wraps = 0;

  pixelcounter dut (.clk, .rstn, .ce, .hcnt);

  always #10 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int first_zero, second_zero;
    repeat (2) @(posedge clk);
    #1 check(int'(hcnt), 0, "reset value");
    rstn = 1'b1;
    // Phase 1: random enable.
    for (int n = 0; n < 5000; n++) begin
      ce = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (ce) begin
        ref_cnt = (ref_cnt == H_TOTAL - 1) ? 0 : ref_cnt + 1;
        if (ref_cnt == 0) wraps++;
      end
      #1 check(int'(hcnt), ref_cnt, "hcnt random ce");
    end
    // Phase 2: ce every other cycle, measure the line period in cycles.
    first_zero = -1; second_zero = -1;
    for (int n = 0; n < 3 * 2 * H_TOTAL; n++) begin
      ce = ~ce;
      @(posedge clk);
      if (ce) begin
        ref_cnt = (ref_cnt == H_TOTAL - 1) ? 0 : ref_cnt + 1;
        if (ref_cnt == 0) begin
          wraps++;
          if (first_zero < 0) first_zero = n;
          else if (second_zero < 0) second_zero = n;
        end
      end
      #1 check(int'(hcnt), ref_cnt, "hcnt regular ce");
    end
    check(second_zero - first_zero, 2 * H_TOTAL, "line period in cycles");
    checks++;
    if (wraps < 5) begin failures++; $display("FAIL too few wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
