// tb_linecounter: feeds the line counter with a reference pixel count
// (0..797, advancing when ce is high every second cycle) and checks over
// more than one full frame that vcnt steps exactly on the edge where hcnt
// goes from 654 to 655, wraps from 524 to 0, and never moves otherwise.
module tb_linecounter;
  import vga_pkg::*;
  localparam int unsigned H_TOTAL = 798;
  localparam int unsigned V_TOTAL = 525;

  logic  clk = 1'b0, rstn = 1'b0, ce = 1'b0;
  hcnt_t hcnt = '0;
  vcnt_t vcnt;
  int checks = 0, failures = 0;
  int ref_v = 0, frames = 0, steps = 0;

  linecounter dut (.clk, .rstn, .ce, .hcnt, .vcnt);

  always #10 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (hcnt %0d) at %0t",
                                  what, got, exp, hcnt, $time);
    end
  endtask

  initial begin
    int prev_h, prev_v;
    repeat (2) @(posedge clk);
    #1 check(int'(vcnt), 0, "reset value");
    rstn = 1'b1;
    for (int n = 0; n < 2 * H_TOTAL * (V_TOTAL + 20); n++) begin
      @(posedge clk);
      prev_h = int'(hcnt);
      prev_v = ref_v;
      if (ce) begin
        if (prev_h == 654) begin
          ref_v = (ref_v == V_TOTAL - 1) ? 0 : ref_v + 1;
          steps++;
          if (ref_v == 0) frames++;
        end
        hcnt <= (prev_h == H_TOTAL - 1) ? '0 : hcnt_t'(prev_h + 1);
      end
      ce <= ~ce;
      #1 check(int'(vcnt), ref_v, "vcnt");
      if (int'(vcnt) != prev_v) check(int'(hcnt), 655, "hcnt when vcnt changes");
    end
    checks++;
    if (frames < 1) begin failures++; $display("FAIL no frame wrap"); end
    check(steps, V_TOTAL + 20, "number of line steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 798 * 560) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
