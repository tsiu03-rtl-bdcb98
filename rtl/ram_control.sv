// ram_control: SRAM address and control generation (combinational).
//
// The image is stored row by row, two 8-bit pixels per 16-bit SRAM word: the
// even pixel in D7..D0 and the odd pixel in D15..D8. The pixel on screen at
// column hcnt and line vcnt has index vcnt*640 + hcnt, so it lives at word
// address (vcnt*640 + hcnt)/2 = vcnt*320 + hcnt/2, in the upper byte when
// hcnt is odd. The address therefore only changes every second pixel, and
// up_lo_byte = hcnt[0] tells the pixel register which byte to take.
//
// vcnt*320 is written as a multiply by a constant, which synthesis reduces
// to two shifted copies and one adder (320 = 256 + 64). The address is
// computed for every counter value, also in the blanking regions, where it
// may point past the image; those words are never shown.
//
// The SRAM is only read, with both bytes at once, so its active-low
// controls are constant: chip, output and both byte enables asserted, write
// enable deasserted.
//
// Interface: hcnt, vcnt in; sram_addr, the five active-low controls and
// up_lo_byte out. Timing: combinational, in pipeline stage 1 together with
// the asynchronous SRAM read.
module ram_control
  import vga_pkg::*;
#(
  parameter int unsigned LINE_PIXELS = H_VISIBLE,
  parameter int unsigned AW          = ADDR_W
) (
  input  hcnt_t         hcnt,
  input  vcnt_t         vcnt,
  output logic [AW-1:0] sram_addr,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n,
  output logic          sram_ub_n,
  output logic          sram_lb_n,
  output logic          up_lo_byte
);

  localparam int unsigned WORDS_PER_LINE = LINE_PIXELS / 2;

  always_comb begin
    sram_addr  = AW'(vcnt) * AW'(WORDS_PER_LINE) + AW'(hcnt[HCNT_W-1:1]);
    up_lo_byte = hcnt[0];
    sram_ce_n  = 1'b0;
    sram_oe_n  = 1'b0;
    sram_we_n  = 1'b1;
    sram_ub_n  = 1'b0;
    sram_lb_n  = 1'b0;
  end

endmodule
