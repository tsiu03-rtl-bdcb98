// tb_vs_gen: sweeps vcnt through two frames and checks that vsync, one cycle
// later, is low exactly for lines 490 and 491 (2 lines per frame).
module tb_vs_gen;
  import vga_pkg::*;
  logic  clk = 1'b0, rstn = 1'b0;
  vcnt_t vcnt = '0;
  logic  vsync;
  int checks = 0, failures = 0, low_lines = 0;

  vs_gen dut (.clk, .rstn, .vcnt, .vsync);

  always #10 clk = ~clk;

  initial begin
    int prev_v;
    logic exp;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (vsync !== 1'b1) begin failures++; $display("FAIL reset value"); end
    rstn = 1'b1;
    for (int n = 0; n < 2 * 525 * 3; n++) begin
      prev_v = int'(vcnt);
      @(posedge clk);
      vcnt <= vcnt_t'((n + 1) / 3 % 525);  // three cycles per line here
      #1;
      exp = !(prev_v == 490 || prev_v == 491);
      checks++;
      if (vsync !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL vcnt=%0d vsync=%0b", prev_v, vsync);
      end
      if (!vsync) low_lines++;
    end
    checks++;
    if (low_lines != 2 * 2 * 3) begin failures++; $display("FAIL low cycles %0d", low_lines); end
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
