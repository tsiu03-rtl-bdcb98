// vs_gen: vertical sync generator (registered).
//
// vsync is active low for V_SYNC lines, starting after the visible lines and
// the front porch: vcnt in [V_VISIBLE+V_FRONT, V_VISIBLE+V_FRONT+V_SYNC-1] =
// [490, 491]. Because the line counter steps at the start of the horizontal
// sync pulse, vsync starts and stops together with an hsync pulse. The
// comparison is registered, giving the stage-2 signal vsync2.
//
// Interface: clk, rstn (asynchronous, active low; vsync resets to 1,
// inactive, which is this design's choice), vcnt in, vsync out.
// Timing: the register loads every 50 MHz cycle, no clock enable.
module vs_gen
  import vga_pkg::*;
#(
  parameter int unsigned V_VIS   = V_VISIBLE,
  parameter int unsigned V_FP    = V_FRONT,
  parameter int unsigned V_PULSE = V_SYNC
) (
  input  logic  clk,
  input  logic  rstn,
  input  vcnt_t vcnt,
  output logic  vsync
);

  localparam int unsigned START = V_VIS + V_FP;
  localparam int unsigned STOP  = START + V_PULSE;  // first line after pulse

  logic in_pulse;
  assign in_pulse = (vcnt >= vcnt_t'(START)) && (vcnt < vcnt_t'(STOP));

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) vsync <= 1'b1;
    else       vsync <= ~in_pulse;
  end

endmodule
