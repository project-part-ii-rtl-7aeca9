// vga_driver_tb: checks the pixels and syncs the driver puts on the VGA pins.
//
// A frame-buffer model answers the driver's read port with a pseudo-random
// word per address. The testbench follows the output raster from the output
// sync pulses alone (hsync falls at column 656, vsync at line 490) and, for
// every output pixel of a full frame, compares red/green/blue with the
// expected nibble: word row*40 + column/8, bits 30/29/28 - 4*(column%8)
// inside the 320x200 picture, black outside. It also checks that the
// colour outputs are 0 during reset and that hsync and vsync keep their
// 800-pixel and 525-line periods.
module vga_driver_tb;
  localparam int CLK_DIV = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        fb_en, red_out, green_out, blue_out, hsync, vsync, frame_end;
  logic [12:0] fb_addr;
  logic [31:0] fb_data;

  vga_driver dut (.*);

  function automatic logic [31:0] word_at(int a);
    logic [31:0] x;
    x = 32'(a) * 32'h9E37_79B1 + 32'h1357_9BDF;
    return x ^ (x >> 13) ^ {x[7:0], x[31:8]};
  endfunction

  // frame-buffer read port model: registered read with enable
  always @(posedge clk) if (fb_en) fb_data <= word_at(int'(fb_addr));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    fb_data = '0;
    repeat (20) begin
      @(negedge clk);
      check({red_out, green_out, blue_out} == 3'b000, "colour cleared in reset");
    end
    rst = 0;
  end

  // sample once per pixel, phase set by the first hsync fall
  int ph = 0, oh = -1, ov = -1, pixels_checked = 0, lit = 0;
  int line_len = 0, vs_lines = 0;
  bit hs_q = 1, vs_q = 1, hlock = 0, vlock = 0;

  always @(negedge clk) if (!rst) begin
    if (!hlock) begin
      if (hs_q && !hsync) begin hlock = 1; ph = 0; oh = 656; line_len = 0; end
      hs_q = hsync;
    end else begin
      ph = (ph + 1) % CLK_DIV;
      if (ph == 0) begin
        // advance to the pixel now on the pins
        oh++; line_len++;
        if (oh == 800) begin
          oh = 0;
          if (vlock) ov = (ov + 1) % 525;
        end
        if (hs_q && !hsync) begin
          check(oh == 656 && line_len == 800, $sformatf("hsync period/position oh=%0d len=%0d", oh, line_len));
          line_len = 0;
        end
        if (vs_q && !vsync) begin
          check(oh == 0, "vsync falls at start of a line");
          if (vlock) check(ov == 490, $sformatf("vsync period, line %0d", ov));
          vlock = 1; ov = 490;
        end
        if (vlock) begin : pix
          logic [2:0] exp;
          logic [31:0] w;
          if (oh < 320 && ov < 200) begin
            w = word_at(ov * 40 + oh / 8);
            exp = {w[30 - 4*(oh%8)], w[29 - 4*(oh%8)], w[28 - 4*(oh%8)]};
          end else begin
            exp = 3'b000;
          end
          check({red_out, green_out, blue_out} == exp,
                $sformatf("pixel (%0d,%0d) got %b exp %b", oh, ov, {red_out, green_out, blue_out}, exp));
          pixels_checked++;
          if (exp != 0) lit++;
          if (ov == 489 && oh == 799 && pixels_checked > 800 * 480) begin
            check(lit > 1000, "picture has lit pixels");
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
        hs_q = hsync;
        vs_q = vsync;
      end
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
