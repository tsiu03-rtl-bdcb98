// sram_model: behavioural read-only model of the 16-bit asynchronous image
// SRAM, holding a computed test image instead of a stored one.
//
// The image is 640x480 pixels, pixel index i = line*640 + column, two pixels
// per word: word a holds pixel 2a in bits 7..0 and pixel 2a+1 in bits 15..8.
// The four top-left pixels are 4, 80 (line 0) and 170, 213 (line 1): two grey
// levels and two RGB colours. Every other pixel is pixel_value(i), a hash of
// its index that covers both colour modes and never equals 3. Words past the
// image (address 153600 and up) read as 3 in both bytes, so a pixel taken
// from outside the image is recognisable on screen.
//
// Reads are combinational (no access time is modelled). Data are driven only
// while chip and output enable are asserted and write enable is not; the
// byte enables gate their byte; otherwise the model returns 0.
module sram_model
  import tb_video_pkg::*;
(
  input  logic [19:0] addr,
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        ub_n,
  input  logic        lb_n,
  output logic [15:0] data
);

  localparam int unsigned IMAGE_WORDS = 640 * 480 / 2;

  always_comb begin
    logic [7:0] lo, hi;
    if (int'(addr) < IMAGE_WORDS) begin
      lo = pixel_value(2 * int'(addr));
      hi = pixel_value(2 * int'(addr) + 1);
    end else begin
      lo = 8'd3;
      hi = 8'd3;
    end
    if (!ce_n && !oe_n && we_n) data = {ub_n ? 8'h00 : hi, lb_n ? 8'h00 : lo};
    else                        data = '0;
  end

endmodule
