// pixel_reg: byte select and pipeline register for the pixel code.
//
// Each SRAM word holds two pixels. up_lo_byte (from ram_control) picks the
// upper byte D15..D8 when 1 (odd pixel) or the lower byte D7..D0 when 0
// (even pixel); the chosen byte is registered as pixcode, the stage-2 pixel
// code.
//
// Interface: clk, rstn (asynchronous, active low; pixcode resets to 0, this
// design's choice), up_lo_byte, sram_ldata, sram_udata in, pixcode out.
// Timing: loads every 50 MHz cycle, one cycle after the counters change.
module pixel_reg
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  logic       up_lo_byte,
  input  logic [7:0] sram_ldata,
  input  logic [7:0] sram_udata,
  output pixcode_t   pixcode
);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) pixcode <= '0;
    else       pixcode <= up_lo_byte ? sram_udata : sram_ldata;
  end

endmodule
