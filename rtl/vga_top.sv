// vga_top: VGA read-out of an image held in external SRAM.
//
// A 640x480 image, 8 bits per pixel and two pixels per 16-bit SRAM word, is
// read continuously and sent to an ADV7123 video DAC and to the hsync/vsync
// pins of a VGA connector, at 640x480 @ 60 Hz with a 25 MHz pixel rate.
//
// The logic runs on the 50 MHz board clock. ce_gen makes a clock enable that
// is high every second cycle; only the pixel and line counters use it. Every
// other register loads on every 50 MHz edge, so the design is a pipeline of
// one-cycle stages, each pixel value held for two cycles:
//
//   stage 1  hcnt, vcnt (counter outputs); blank_gen, ram_control and the
//            asynchronous SRAM read are combinational here
//   stage 2  hsync2, vsync2 (hs_gen, vs_gen), blank2, pixcode2 (pixel_reg)
//   stage 3  hsync3, vsync3, blank3, RGB (rgb_gen) -> DAC inputs
//   stage 4  hsync4, vsync4 at the connector; the DAC's own input register,
//            clocked by vga_clk, holds RGB and blank at the same time
//
// vga_clk is ce itself. The counters change on the edge where ce is 1, so
// stage-3 data change in the ce = 0 phase and are stable when vga_clk rises;
// the DAC's register and the hsync4/vsync4 flip-flops then update on the
// same edge, keeping colour, blank and sync aligned.
//
// The line counter advances when hcnt goes 654 -> 655 so that vcnt changes at
// the start of the hsync pulse (see linecounter). vga_sync (sync on green)
// is not used and held at 0.
//
// All of this structure follows the original specification; the reset values of
// the pipeline registers are this design's choice. The SRAM data bus is an
// input only, since the design never writes.
//
// Interface: clk (50 MHz), rstn (asynchronous, active low), the SRAM address,
// active-low controls and 16-bit read data, the DAC's vga_r/g/b, vga_clk,
// vga_blank (active low) and vga_sync, and hsync/vsync (active low).
module vga_top
  import vga_pkg::*;
(
  input  logic              clk,
  input  logic              rstn,
  // SRAM
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  output logic              sram_ub_n,
  output logic              sram_lb_n,
  input  logic [15:0]       sram_data,
  // Video DAC
  output logic [7:0]        vga_r,
  output logic [7:0]        vga_g,
  output logic [7:0]        vga_b,
  output logic              vga_clk,
  output logic              vga_blank,
  output logic              vga_sync,
  // VGA connector
  output logic              hsync,
  output logic              vsync
);

  logic     ce;
  hcnt_t    hcnt;
  vcnt_t    vcnt;
  logic     hsync2, vsync2;
  logic     blank1;
  logic     up_lo_byte;
  pixcode_t pixcode2;

  ce_gen u_ce_gen (.clk, .rstn, .ce);

  pixelcounter u_pixelcounter (.clk, .rstn, .ce, .hcnt);

  linecounter u_linecounter (.clk, .rstn, .ce, .hcnt, .vcnt);

  hs_gen u_hs_gen (.clk, .rstn, .hcnt, .hsync(hsync2));

  vs_gen u_vs_gen (.clk, .rstn, .vcnt, .vsync(vsync2));

  blank_gen u_blank_gen (.hcnt, .vcnt, .blank1);

  ram_control u_ram_control (
    .hcnt, .vcnt, .sram_addr,
    .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_ub_n, .sram_lb_n,
    .up_lo_byte
  );

  pixel_reg u_pixel_reg (
    .clk, .rstn, .up_lo_byte,
    .sram_ldata(sram_data[7:0]), .sram_udata(sram_data[15:8]),
    .pixcode(pixcode2)
  );

  rgb_gen u_rgb_gen (.clk, .rstn, .pixcode(pixcode2), .vga_r, .vga_g, .vga_b);

  // hsync2 -> hsync3 -> hsync4 and vsync2 -> vsync3 -> vsync4.
  pipe_delay #(.WIDTH(2), .STAGES(2), .RESET_VALUE(2'b11)) u_sync_pipe (
    .clk, .rstn, .d({hsync2, vsync2}), .q({hsync, vsync})
  );

  // blank1 -> blank2 -> blank3.
  pipe_delay #(.WIDTH(1), .STAGES(2), .RESET_VALUE(1'b0)) u_blank_pipe (
    .clk, .rstn, .d(blank1), .q(vga_blank)
  );

  assign vga_clk  = ce;
  assign vga_sync = 1'b0;

endmodule
