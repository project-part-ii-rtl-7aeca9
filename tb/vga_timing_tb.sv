// vga_timing_tb: checks the raster generator at its default 640x480 timing.
//
// Over two frames it measures, in pixel ticks: the tick period in clocks,
// the spacing and width of the hsync pulses (800 and 96), the column of the
// hsync fall (656), the spacing and width of vsync (525 and 2 lines, in
// ticks), the line of the vsync fall (490), the number of active pixels per
// frame (640*480) and one frame_end per frame.
module vga_timing_tb;
  localparam int CLK_DIV = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic pix_tick, active, hsync, vsync, frame_end;
  logic [9:0] hcount, vcount;

  vga_timing dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // reference counters, advanced independently per tick
  int clk_since_tick = 0, ticks = 0;
  int last_hfall = -1, last_vfall = -1, hlow = 0, vlow_ticks = 0;
  int active_cnt = 0, frames = 0, fe_cnt = 0;
  bit hs_q = 1, vs_q = 1;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) if (!rst) begin
    clk_since_tick++;
    if (pix_tick) begin
      if (ticks > 0) check(clk_since_tick == CLK_DIV, "tick period");
      clk_since_tick = 0;
      ticks++;
      if (active) active_cnt++;
      if (frame_end) fe_cnt++;
      if (!hsync) hlow++;
      if (!vsync) vlow_ticks++;
      if (hs_q && !hsync) begin
        check(hcount == 656, $sformatf("hsync falls at column %0d", hcount));
        if (last_hfall >= 0) check(ticks - last_hfall == 800, "line length");
        last_hfall = ticks;
      end
      if (!hs_q && hsync) begin
        check(hlow == 96, $sformatf("hsync width %0d", hlow));
        hlow = 0;
      end
      if (vs_q && !vsync) begin
        check(vcount == 490 && hcount == 0, "vsync fall position");
        if (last_vfall >= 0) check(ticks - last_vfall == 800 * 525, "frame length");
        last_vfall = ticks;
      end
      if (!vs_q && vsync) begin
        check(vlow_ticks == 2 * 800, $sformatf("vsync width %0d ticks", vlow_ticks));
        vlow_ticks = 0;
      end
      if (frame_end) begin
        check(hcount == 799 && vcount == 524, "frame_end position");
        if (frames > 0) check(active_cnt == 640 * 480, $sformatf("active pixels %0d", active_cnt));
        active_cnt = 0;
        frames++;
        if (frames == 3) begin
          check(fe_cnt == 3, "frame_end count");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      hs_q = hsync;
      vs_q = vsync;
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
