// tb_ram_control: checks the SRAM word address and byte select against the
// storage rule "pixel index i = vcnt*640 + hcnt lives in word i/2, upper byte
// when i is odd", over every pixel of the visible image (first and last
// pixels included) and random blanking-region counters, and checks the
// constant read control levels.
module tb_ram_control;
  import vga_pkg::*;
  hcnt_t       hcnt;
  vcnt_t       vcnt;
  logic [19:0] sram_addr;
  logic        ce_n, oe_n, we_n, ub_n, lb_n, up_lo_byte;
  int checks = 0, failures = 0;

  ram_control dut (.hcnt, .vcnt, .sram_addr, .sram_ce_n(ce_n), .sram_oe_n(oe_n),
                   .sram_we_n(we_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n), .up_lo_byte);

  task automatic try(input int h, input int v);
    int idx;
    hcnt = hcnt_t'(h);
    vcnt = vcnt_t'(v);
    #1;
    idx = v * 640 + h;
    checks++;
    if (int'(sram_addr) != idx / 2 || up_lo_byte != 1'(idx % 2)) begin
      failures++;
      if (failures < 10) $display("FAIL h=%0d v=%0d addr=%0d sel=%0b", h, v, sram_addr, up_lo_byte);
    end
    checks++;
    if ({ce_n, oe_n, we_n, ub_n, lb_n} !== 5'b00100) begin
      failures++;
      if (failures < 10) $display("FAIL control levels %05b", {ce_n, oe_n, we_n, ub_n, lb_n});
    end
  endtask

  initial begin
    for (int v = 0; v < 480; v++)
      for (int h = 0; h < 640; h++) try(h, v);
    // Corners from the storage table: pixel 1 -> word 0 upper, last pixel
    // 307199 -> word 153599 upper.
    try(1, 0);
    checks++;
    if (sram_addr != 20'd0 || !up_lo_byte) begin failures++; $display("FAIL pixel 1"); end
    try(639, 479);
    checks++;
    if (sram_addr != 20'd153599 || !up_lo_byte) begin failures++; $display("FAIL last pixel"); end
    // Blanking regions: any counter value of the frame.
    for (int n = 0; n < 2000; n++) try($urandom_range(0, 797), $urandom_range(0, 524));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
