// rgb_gen: colour decoder and pipeline register.
//
// Decodes an 8-bit pixel code into 8 bits each of red, green and blue for
// the video DAC, and registers the result (pipeline stage 3).
//
//   code[7] = 0: grey scale, g = code[6:0] (0 black .. 127 white); all three
//                channels get the same 8-bit level.
//   code[7] = 1: red = code[6:5], green = code[4:2], blue = code[1:0].
//
// A narrow field is widened to 8 bits by repeating its bits from the most
// significant one down, so 0 maps to 0 and the field's maximum maps to 255:
//   3-bit x -> {x, x, x[2:1]}, 2-bit x -> {x, x, x, x}, 7-bit x -> {x, x[6]}.
// The 3-bit rule is the specified one; the same rule applied to the 2- and
// 7-bit fields is this design's reading of it.
//
// Interface: clk, rstn (asynchronous, active low; colour resets to black,
// this design's choice), pixcode in, vga_r/g/b out.
// Timing: loads every 50 MHz cycle. Because the counters change on the edge
// where ce is 1, the output changes in the ce = 0 phase and is stable at the
// next rising edge of ce, which clocks the DAC.
module rgb_gen
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  pixcode_t   pixcode,
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b
);

  // Widen a field of W bits (right-aligned in x) to 8 bits by repetition.
  function automatic logic [7:0] widen(input logic [6:0] x, input int unsigned w);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[7-i] = x[w-1-(i % w)];
    return y;
  endfunction

  rgb_t next;

  always_comb begin
    if (!pixcode[7]) begin
      next.r = widen(pixcode[6:0], 7);
      next.g = next.r;
      next.b = next.r;
    end else begin
      next.r = widen({5'b0, pixcode[6:5]}, 2);
      next.g = widen({4'b0, pixcode[4:2]}, 3);
      next.b = widen({5'b0, pixcode[1:0]}, 2);
    end
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      vga_r <= '0;
      vga_g <= '0;
      vga_b <= '0;
    end else begin
      vga_r <= next.r;
      vga_g <= next.g;
      vga_b <= next.b;
    end
  end

endmodule
