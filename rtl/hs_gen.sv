// hs_gen: horizontal sync generator (registered).
//
// hsync is active low for H_SYNC pixels, starting right after the visible
// part and the front porch: hcnt in [H_VISIBLE+H_FRONT, H_VISIBLE+H_FRONT+
// H_SYNC-1] = [655, 749]. The comparison is registered, which makes hsync
// the stage-2 signal hsync2, one 50 MHz cycle behind hcnt.
//
// Interface: clk, rstn (asynchronous, active low; hsync resets to 1,
// inactive, which is this design's choice), hcnt in, hsync out.
// Timing: the register loads every 50 MHz cycle, no clock enable.
module hs_gen
  import vga_pkg::*;
#(
  parameter int unsigned H_VIS   = H_VISIBLE,
  parameter int unsigned H_FP    = H_FRONT,
  parameter int unsigned H_PULSE = H_SYNC
) (
  input  logic  clk,
  input  logic  rstn,
  input  hcnt_t hcnt,
  output logic  hsync
);

  localparam int unsigned START = H_VIS + H_FP;
  localparam int unsigned STOP  = START + H_PULSE;  // first pixel after pulse

  logic in_pulse;
  assign in_pulse = (hcnt >= hcnt_t'(START)) && (hcnt < hcnt_t'(STOP));

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) hsync <= 1'b1;
    else       hsync <= ~in_pulse;
  end

endmodule
