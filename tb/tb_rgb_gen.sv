// tb_rgb_gen: all 256 colour codes. The expected 8-bit channels are computed
// arithmetically, independent of the bit-repetition circuit: a 2-bit level
// x maps to 85*x, a 3-bit level to 36*x + x/2, a 7-bit grey level to
// 2*g + g/64 (each is the field repeated from its MSB). Also checks the
// register latency of one cycle and the known codes 4, 80, 170 and 213.
module tb_rgb_gen;
  import vga_pkg::*;
  logic       clk = 1'b0, rstn = 1'b0;
  pixcode_t   pixcode = '0;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0, grey_codes = 0, rgb_codes = 0;

  rgb_gen dut (.clk, .rstn, .pixcode, .vga_r(r), .vga_g(g), .vga_b(b));

  always #10 clk = ~clk;

  function automatic rgb_t expect_rgb(input int code);
    rgb_t e;
    if (code < 128) begin
      e.r = 8'(2 * code + code / 64);
      e.g = e.r;
      e.b = e.r;
    end else begin
      e.r = 8'(85 * ((code / 32) % 4));
      e.g = 8'(36 * ((code / 4) % 8) + ((code / 4) % 8) / 2);
      e.b = 8'(85 * (code % 4));
    end
    return e;
  endfunction

  task automatic check(input rgb_t exp, input string what);
    checks++;
    if ({r, g, b} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h%02h%02h expected %06h", what, r, g, b, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check('0, "reset value");
    rstn = 1'b1;
    for (int c = 0; c < 256; c++) begin
      pixcode = pixcode_t'(c);
      #1 checks++;
      // Registered: the output must not follow the input before the edge.
      if (c > 0 && {r, g, b} !== expect_rgb(c - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL output changed before the clock edge, code %0d", c);
      end
      @(posedge clk); #1;
      check(expect_rgb(c), "decode");
      if (c < 128) grey_codes++; else rgb_codes++;
    end
    // Hand-worked values: 4 grey -> 08; 80 grey -> A1; 170 = 1 01 010 10 ->
    // 55 49 AA; 213 = 1 10 101 01 -> AA B6 55.
    pixcode = 8'd4;   @(posedge clk); #1 check(24'h080808, "code 4");
    pixcode = 8'd80;  @(posedge clk); #1 check(24'hA1A1A1, "code 80");
    pixcode = 8'd170; @(posedge clk); #1 check(24'h5549AA, "code 170");
    pixcode = 8'd213; @(posedge clk); #1 check(24'hAAB655, "code 213");
    pixcode = 8'd127; @(posedge clk); #1 check(24'hFFFFFF, "white");
    pixcode = 8'd255; @(posedge clk); #1 check(24'hFFFFFF, "rgb max");
    pixcode = 8'd128; @(posedge clk); #1 check(24'h000000, "rgb black");
    checks++;
    if (grey_codes != 128 || rgb_codes != 128) begin failures++; $display("FAIL coverage"); end
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
