// pixelcounter: horizontal (pixel) counter.
//
// hcnt counts the pixel columns of one line, visible and blanked, from 0 to
// H_TOTAL-1 (797 for 640 + 15 + 95 + 48 pixels) and then starts over at 0 for
// the next line. It advances only in cycles where the clock enable ce is
// high, so one count lasts two 50 MHz cycles (one 25 MHz pixel). The circuit
// is a register with enable, an incrementer and a compare-to-last that
// selects 0 instead of hcnt+1.
//
// Interface: clk, rstn (asynchronous, active low, clears hcnt), ce, hcnt.
// Timing: hcnt changes on the clock edge at which ce is 1.
module pixelcounter
  import vga_pkg::*;
#(
  parameter int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK
) (
  input  logic  clk,
  input  logic  rstn,
  input  logic  ce,
  output hcnt_t hcnt
);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)
      hcnt <= '0;
    else if (ce) begin
      if (hcnt == hcnt_t'(H_TOTAL - 1)) hcnt <= '0;
      else                              hcnt <= hcnt + 1'b1;
    end
  end

  // The count never leaves 0..H_TOTAL-1.
  a_hcnt_range: assert property (@(posedge clk) disable iff (!rstn) hcnt < hcnt_t'(H_TOTAL));

endmodule
