// tb_hs_gen: sweeps hcnt through three lines, two cycles per value as in the
// real pipeline, and checks that hsync, one cycle later, is low exactly for
// hcnt 655..749 and that each pulse lasts 95 pixels (190 cycles).
module tb_hs_gen;
  import vga_pkg::*;
  logic  clk = 1'b0, rstn = 1'b0;
  hcnt_t hcnt = '0;
  logic  hsync;
  int checks = 0, failures = 0, pulses = 0, low_len = 0;

  hs_gen dut (.clk, .rstn, .hcnt, .hsync);

  always #10 clk = ~clk;

  initial begin
    int prev_h;
    logic exp;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (hsync !== 1'b1) begin failures++; $display("FAIL reset value"); end
    rstn = 1'b1;
    for (int n = 0; n < 3 * 798 * 2; n++) begin
      prev_h = int'(hcnt);
      @(posedge clk);
      hcnt <= hcnt_t'((n + 1) / 2 % 798);
      #1;
      exp = !(prev_h >= 655 && prev_h <= 749);
      checks++;
      if (hsync !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL hcnt=%0d hsync=%0b", prev_h, hsync);
      end
      if (!hsync) low_len++;
      else if (low_len != 0) begin
        pulses++;
        checks++;
        if (low_len != 2 * 95) begin failures++; $display("FAIL pulse length %0d cycles", low_len); end
        low_len = 0;
      end
    end
    checks++;
    if (pulses != 3) begin failures++; $display("FAIL pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
