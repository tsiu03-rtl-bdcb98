// tb_blank_gen: exhaustive check of the blanking decode over every counter
// value of a frame (798 x 525), plus out-of-range counter values, against
// the visible-area rule hcnt < 640 and vcnt < 480.
module tb_blank_gen;
  import vga_pkg::*;
  hcnt_t hcnt;
  vcnt_t vcnt;
  logic  blank1;
  int checks = 0, failures = 0, visible = 0;

  blank_gen dut (.hcnt, .vcnt, .blank1);

  initial begin
    logic exp;
    for (int v = 0; v < 1024; v += (v < 530 ? 1 : 97)) begin
      for (int h = 0; h < 1024; h++) begin
        hcnt = hcnt_t'(h);
        vcnt = vcnt_t'(v);
        #1;
        exp = (h <= 639) && (v <= 479);
        checks++;
        if (blank1 !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL h=%0d v=%0d blank1=%0b", h, v, blank1);
        end
        if (blank1) visible++;
      end
    end
    checks++;
    if (visible != 640 * 480) begin
      failures++;
      $display("FAIL visible pixel count %0d", visible);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
