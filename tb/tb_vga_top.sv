// tb_vga_top: end-to-end test of the VGA read-out at full 640x480 size.
//
// The design reads a computed test image from a behavioural SRAM; its colour
// and blank outputs go through a model of the video DAC's input register,
// clocked by vga_clk. The checker samples the screen-side signals once per
// pixel (in the middle of the vga_clk high phase) and checks, over two whole
// frames:
//   - horizontal timing, in pixels: visible 640, front porch 15, sync 95,
//     back porch 48, and 798 pixels from one hsync to the next
//   - vertical timing, in lines: 480 visible, 10 front porch, 2 sync,
//     33 back porch, vsync changing only together with an hsync start
//   - every visible pixel's colour against the image and a reference decode
//     (so pixels from outside the image, value 3, are caught as well)
//   - pipeline latency in 50 MHz cycles: DAC inputs 2 cycles and the VGA
//     connector signals 3 cycles after the counters; vga_clk period 2 cycles
//   - constant outputs: vga_sync = 0 and the SRAM read control levels
// It also counts how often each mechanism occurred (line wrap, frame wrap,
// hsync and vsync pulses, grey and RGB pixels, upper and lower byte reads)
// and fails if one never did. All parameters are at their defaults.
module tb_vga_top;
  import tb_video_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0;
  logic [19:0] sram_addr;
  logic        sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic [15:0] sram_data;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_clk, vga_blank, vga_sync, hsync, vsync;
  logic [7:0]  scr_r, scr_g, scr_b;
  logic        scr_blank;

  int checks = 0, failures = 0;

  vga_top dut (
    .clk, .rstn, .sram_addr, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_ub_n,
    .sram_lb_n, .sram_data, .vga_r, .vga_g, .vga_b, .vga_clk, .vga_blank,
    .vga_sync, .hsync, .vsync
  );

  sram_model u_sram (
    .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n),
    .ub_n(sram_ub_n), .lb_n(sram_lb_n), .data(sram_data)
  );

  adv7123_model u_dac (
    .vga_clk, .r_in(vga_r), .g_in(vga_g), .b_in(vga_b), .blank_n_in(vga_blank),
    .r(scr_r), .g(scr_g), .b(scr_b), .blank_n(scr_blank)
  );

  always #10 clk = ~clk;  // 50 MHz, 20 time units per cycle

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters.
  int n_hsync = 0, n_vsync = 0, n_line_wrap = 0, n_frame_wrap = 0;
  int n_grey = 0, n_rgb = 0, n_upper = 0, n_lower = 0, n_pixels = 0;

  // ---------------------------------------------------------------- cycle level
  int cyc = 0;
  int t_h0 = 0, t_h655 = -1;  // hcnt is 0 from reset on
  logic prev_vga_clk = 1'b0, prev_blank3 = 1'b0, prev_hsync = 1'b1;
  logic [9:0] prev_hcnt = '0, prev_vcnt = '0;

  always @(posedge clk) begin
    #1;
    if (rstn) begin
      cyc++;
      check(vga_clk != prev_vga_clk, "vga_clk toggles every 50 MHz cycle");
      check(vga_sync == 1'b0, "vga_sync is 0");
      check({sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n} == 5'b00100,
            "SRAM read control levels");
      if (dut.hcnt != prev_hcnt) begin
        if (dut.hcnt == 10'd0) begin
          t_h0 = cyc;
          n_line_wrap++;
        end
        if (dut.hcnt == 10'd655) t_h655 = cyc;
      end
      if (dut.vcnt != prev_vcnt && dut.vcnt == 10'd0) n_frame_wrap++;
      if (dut.up_lo_byte) n_upper++; else n_lower++;
      // Blank at the DAC input rises 2 cycles after hcnt wraps to 0 on a
      // visible line; hsync at the connector falls 3 cycles after hcnt = 655.
      if (vga_blank && !prev_blank3) check(cyc - t_h0 == 2, "blank3 latency 2 cycles");
      if (!hsync && prev_hsync) check(cyc - t_h655 == 3, "hsync4 latency 3 cycles");
      prev_vga_clk = vga_clk;
      prev_blank3  = vga_blank;
      prev_hsync   = hsync;
      prev_hcnt    = dut.hcnt;
      prev_vcnt    = dut.vcnt;
    end
  end

  // ---------------------------------------------------------------- pixel level
  int p = 0;                                   // pixel sample index
  int t_brise = -1, t_bfall = -1, t_hfall = -1, t_hrise = -1;
  logic s_blank = 1'b0, s_hs = 1'b1, s_vs = 1'b1;
  // Vertical: one segment per hsync period, classified V(isible), S(ync) or
  // B(lank); runs of equal class are measured.
  byte  seg_class = "?", run_class = "?", before_run = "?";
  int   run_len = 0, n_vruns = 0;
  bit   seg_visible = 0;
  int   x = 0, y = -1, frame_pixels = 0;
  bit   line_done = 1;

  task automatic close_run();
    if (run_class != "?" && before_run != "?") begin
      n_vruns++;
      case (run_class)
        "V": check(run_len == 480, $sformatf("visible lines %0d", run_len));
        "S": check(run_len == 2, $sformatf("vsync lines %0d", run_len));
        "B": if (before_run == "V") check(run_len == 10, $sformatf("front porch lines %0d", run_len));
             else                   check(run_len == 33, $sformatf("back porch lines %0d", run_len));
        default: ;
      endcase
    end
    before_run = run_class;
  endtask

  always @(negedge clk) begin
    if (rstn && vga_clk) begin
      p++;
      // Horizontal edges.
      if (scr_blank && !s_blank) begin
        if (t_hrise > t_brise && t_brise >= 0)
          check(p - t_hrise == 48, $sformatf("back porch %0d px", p - t_hrise));
        t_brise = p;
        x = 0;
        y++;
      end
      if (!scr_blank && s_blank) begin
        if (t_brise >= 0) check(p - t_brise == 640, $sformatf("visible %0d px", p - t_brise));
        t_bfall = p;
      end
      if (!hsync && s_hs) begin
        n_hsync++;
        if (t_bfall > t_hfall && t_hfall >= 0)
          check(p - t_bfall == 15, $sformatf("front porch %0d px", p - t_bfall));
        if (t_hfall >= 0) check(p - t_hfall == 798, $sformatf("line %0d px", p - t_hfall));
        t_hfall = p;
        // Close the vertical segment that just ended, open a new one.
        if (seg_class != "?") begin
          if (seg_class == run_class) run_len++;
          else begin
            close_run();
            run_class = seg_class;
            run_len = 1;
          end
        end
        seg_visible = 0;
        seg_class = vsync ? "B" : "S";
      end
      if (hsync && !s_hs) begin
        check(p - t_hfall == 95, $sformatf("hsync %0d px", p - t_hfall));
        t_hrise = p;
      end
      // vsync may only change together with the start of an hsync pulse.
      if (vsync != s_vs) begin
        check(!hsync && s_hs, "vsync changes with hsync start");
        if (!vsync) begin
          n_vsync++;
          check(frame_pixels == 640 * 480, $sformatf("pixels in frame %0d", frame_pixels));
          frame_pixels = 0;
          y = -1;
        end
      end
      // Colours.
      if (scr_blank) begin
        logic [23:0] exp;
        logic [7:0]  code;
        if (seg_class != "S") seg_class = "V";
        code = pixel_value(y * IMAGE_W + x);
        exp = expected_rgb(code);
        check(y >= 0 && y < IMAGE_H && x < IMAGE_W, "pixel inside image");
        check({scr_r, scr_g, scr_b} == exp,
              $sformatf("pixel (%0d,%0d) got %06h expected %06h", x, y, {scr_r, scr_g, scr_b}, exp));
        if (code[7]) n_rgb++; else n_grey++;
        n_pixels++;
        frame_pixels++;
        x++;
      end
      s_blank = scr_blank;
      s_hs    = hsync;
      s_vs    = vsync;
    end
  end

  // ---------------------------------------------------------------- control
  localparam int FRAME_CYCLES = 2 * 798 * 525;

  initial begin
    repeat (3) @(posedge clk);
    #2 rstn = 1'b1;
    // Two frames from reset plus 40 lines, so that the back porch after the
    // second vsync pulse is closed by the next visible line.
    repeat (2 * FRAME_CYCLES + 40 * 2 * 798) @(posedge clk);
    #2;
    // Two whole frames plus the first 40 (visible) lines of the third.
    check(n_pixels == 2 * 640 * 480 + 40 * 640, $sformatf("visible pixels shown %0d", n_pixels));
    check(n_vruns >= 5, $sformatf("vertical runs measured %0d", n_vruns));
    check(n_hsync > 0, "hsync pulses occurred");
    check(n_vsync == 2, $sformatf("vsync pulses %0d", n_vsync));
    check(n_line_wrap > 0, "line wrap occurred");
    check(n_frame_wrap > 0, "frame wrap occurred");
    check(n_grey > 0, "grey-scale pixels occurred");
    check(n_rgb > 0, "RGB pixels occurred");
    check(n_upper > 0 && n_lower > 0, "both SRAM bytes selected");
    $display("mechanisms: hsync=%0d vsync=%0d line_wrap=%0d frame_wrap=%0d grey=%0d rgb=%0d upper=%0d lower=%0d",
             n_hsync, n_vsync, n_line_wrap, n_frame_wrap, n_grey, n_rgb, n_upper, n_lower);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * FRAME_CYCLES + 100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
