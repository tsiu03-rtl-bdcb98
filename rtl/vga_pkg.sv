// vga_pkg: constants and types shared by the 640x480 @ 60 Hz VGA read-out
// pipeline.
//
// The frame is described by the four regions of each direction: c (visible),
// d (front porch), a (sync pulse) and b (back porch). Horizontally they are
// counted in pixels of the 25 MHz pixel clock, vertically in lines. The
// numbers are the ones used for a 640x480 @ 60 Hz screen with a 25 MHz pixel
// clock: 640/15/95/48 pixels (798 in total) and 480/10/2/33 lines (525 in
// total). Counter widths are this design's choice: the smallest that hold the
// largest count.
package vga_pkg;

  // Horizontal regions, in pixels.
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 15;
  localparam int unsigned H_SYNC    = 95;
  localparam int unsigned H_BACK    = 48;

  // Vertical regions, in lines.
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;

  localparam int unsigned HCNT_W = 10;  // holds 0..797
  localparam int unsigned VCNT_W = 10;  // holds 0..524
  localparam int unsigned ADDR_W = 20;  // SRAM address lines A0..A19

  typedef logic [HCNT_W-1:0] hcnt_t;
  typedef logic [VCNT_W-1:0] vcnt_t;

  // One pixel as stored in the SRAM. Bit 7 selects the mode:
  //   0: bits 6..0 are a grey level, 0 = black, 127 = white
  //   1: bits 6..5 red (0..3), bits 4..2 green (0..7), bits 1..0 blue (0..3)
  typedef logic [7:0] pixcode_t;

  // One colour as sent to the video DAC, 8 bits per channel.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

endpackage
