// tb_video_pkg: test image and reference colour decoding shared by the
// SRAM model and the end-to-end testbench.
package tb_video_pkg;

  localparam int unsigned IMAGE_W = 640;
  localparam int unsigned IMAGE_H = 480;

  // Test image: pixel index i = line*640 + column. The four top-left pixels
  // are 4, 80 (line 0) and 170, 213 (line 1); the rest is a hash of the index
  // that covers both colour modes and never equals 3 (3 marks "outside the
  // image").
  function automatic logic [7:0] pixel_value(input int unsigned i);
    logic [7:0] v;
    case (i)
      0:   return 8'd4;
      1:   return 8'd80;
      640: return 8'd170;
      641: return 8'd213;
      default: begin
        v = 8'((i * 37) ^ (i >> 5) ^ (i >> 11));
        return (v == 8'd3) ? 8'd2 : v;
      end
    endcase
  endfunction

  // Reference decode of a colour code to {r, g, b}, 8 bits each, written
  // arithmetically: an n-bit level repeated to 8 bits equals
  // 2-bit: 85*x, 3-bit: 36*x + x/2, 7-bit: 2*x + x/64.
  function automatic logic [23:0] expected_rgb(input int unsigned code);
    logic [7:0] r, g, b;
    if (code < 128) begin
      r = 8'(2 * code + code / 64);
      g = r;
      b = r;
    end else begin
      r = 8'(85 * ((code / 32) % 4));
      g = 8'(36 * ((code / 4) % 8) + ((code / 4) % 8) / 2);
      b = 8'(85 * (code % 4));
    end
    return {r, g, b};
  endfunction

endpackage
