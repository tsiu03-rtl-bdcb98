// linecounter: vertical (line) counter.
//
// vcnt counts the lines of one frame, visible and blanked, from 0 to
// V_TOTAL-1 (524 for 480 + 10 + 2 + 33 lines), then starts over at 0. It
// advances once per line, at the moment the horizontal sync pulse starts, so
// that vsync (derived from vcnt) changes together with hsync.
//
// The sync pulse starts at hcnt = H_VISIBLE + H_FRONT = 655. The counter is
// enabled by ce AND (hcnt == H_STEP) with H_STEP = 654, one pixel earlier:
// the register then loads on the edge where hcnt itself goes from 654 to 655,
// so vcnt and hcnt change on the same edge. Looking at 655 instead would make
// vcnt one pixel late, because hcnt is already a register output.
//
// Interface: clk, rstn (asynchronous, active low, clears vcnt), ce, hcnt,
// vcnt. Timing: vcnt changes on the edge where ce is 1 and hcnt is 654.
module linecounter
  import vga_pkg::*;
#(
  parameter int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK,
  parameter int unsigned H_STEP  = H_VISIBLE + H_FRONT - 1
) (
  input  logic  clk,
  input  logic  rstn,
  input  logic  ce,
  input  hcnt_t hcnt,
  output vcnt_t vcnt
);

  logic step;
  assign step = ce && (hcnt == hcnt_t'(H_STEP));

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)
      vcnt <= '0;
    else if (step) begin
      if (vcnt == vcnt_t'(V_TOTAL - 1)) vcnt <= '0;
      else                              vcnt <= vcnt + 1'b1;
    end
  end

  // The count never leaves 0..V_TOTAL-1.
  a_vcnt_range: assert property (@(posedge clk) disable iff (!rstn) vcnt < vcnt_t'(V_TOTAL));

endmodule
