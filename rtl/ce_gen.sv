// ce_gen: clock enable generator.
//
// The system clock runs at 50 MHz but the screen wants a new pixel at
// 25 MHz. This block makes a clock enable, ce, that is high in every second
// 50 MHz cycle; the counters advance only when it is high. It is a single
// toggling flip-flop (a two-state machine). The same signal, being a clean
// register output at 25 MHz, also serves as the pixel clock of the video DAC.
//
// Interface: clk (50 MHz), rstn (asynchronous, active low), ce.
// Timing: ce is 0 in the first cycle after reset, then 1, 0, 1, ...
// The reset value 0 is this design's choice.
module ce_gen (
  input  logic clk,
  input  logic rstn,
  output logic ce
);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) ce <= 1'b0;
    else       ce <= ~ce;
  end

endmodule
