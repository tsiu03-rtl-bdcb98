// tb_pixel_reg: random SRAM words and byte selects; checks that one cycle
// later pixcode holds D15..D8 when up_lo_byte was 1 and D7..D0 when it was 0.
module tb_pixel_reg;
  import vga_pkg::*;
  logic       clk = 1'b0, rstn = 1'b0;
  logic       up_lo_byte = 1'b0;
  logic [7:0] ldata = '0, udata = '0;
  pixcode_t   pixcode;
  int checks = 0, failures = 0, uppers = 0, lowers = 0;

  pixel_reg dut (.clk, .rstn, .up_lo_byte, .sram_ldata(ldata), .sram_udata(udata), .pixcode);

  always #10 clk = ~clk;

  initial begin
    logic [7:0] exp;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pixcode !== 8'h00) begin failures++; $display("FAIL reset value"); end
    rstn = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      up_lo_byte = 1'($urandom);
      ldata = 8'($urandom);
      udata = 8'($urandom);
      exp = up_lo_byte ? udata : ldata;
      if (up_lo_byte) uppers++; else lowers++;
      @(posedge clk); #1;
      checks++;
      if (pixcode !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0b l=%02h u=%02h got %02h", up_lo_byte, ldata, udata, pixcode);
      end
    end
    checks++;
    if (uppers == 0 || lowers == 0) begin failures++; $display("FAIL select coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
