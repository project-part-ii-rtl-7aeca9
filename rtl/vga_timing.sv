// vga_timing: raster counters and sync pulses for a VGA display.
//
// A divider turns the system clock into a pixel-rate enable, pix_tick, high
// for one clock in every CLK_DIV. On each tick the horizontal counter steps
// through H_VISIBLE + H_FRONT + H_SYNC + H_BACK pixels; at the end of a line it
// wraps and the vertical counter steps through the lines the same way. hsync
// is low during the H_SYNC pixels after the front porch of each line and
// vsync is low during the V_SYNC lines after the vertical front porch, which
// tells the monitor that a line, or the whole screen, is finished.
//
// Timing: hcount, vcount, hsync, vsync and active all describe the pixel
// whose period ends at the next pix_tick; they change on the clock edge of
// a tick. The origin (0,0) is the top-left pixel. Reset puts the counters
// at (0,0) with both syncs inactive.
//
// Telling the monitor line end and screen end with hsync/vsync follows the
// project description; the porch and pulse widths (standard 640x480 at 60 Hz)
// and the negative pulse polarity are this design's choice.
module vga_timing #(
  parameter int unsigned CLK_DIV   = pacman_pkg::PIX_CLK_DIV,
  parameter int unsigned H_VISIBLE = pacman_pkg::H_VISIBLE,
  parameter int unsigned H_FRONT   = pacman_pkg::H_FRONT,
  parameter int unsigned H_SYNC    = pacman_pkg::H_SYNC,
  parameter int unsigned H_BACK    = pacman_pkg::H_BACK,
  parameter int unsigned V_VISIBLE = pacman_pkg::V_VISIBLE,
  parameter int unsigned V_FRONT   = pacman_pkg::V_FRONT,
  parameter int unsigned V_SYNC    = pacman_pkg::V_SYNC,
  parameter int unsigned V_BACK    = pacman_pkg::V_BACK,
  localparam int unsigned H_TOTAL  = H_VISIBLE + H_FRONT + H_SYNC + H_BACK,
  localparam int unsigned V_TOTAL  = V_VISIBLE + V_FRONT + V_SYNC + V_BACK,
  localparam int unsigned HW       = $clog2(H_TOTAL),
  localparam int unsigned VW       = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst,
  output logic          pix_tick,  // one clock per pixel period
  output logic [HW-1:0] hcount,    // current pixel column
  output logic [VW-1:0] vcount,    // current line
  output logic          active,    // inside the 640x480 visible area
  output logic          hsync,     // active low
  output logic          vsync,     // active low
  output logic          frame_end  // tick on the last pixel of a frame
);

  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  logic [DW-1:0] div_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
    end else if (div_cnt == DW'(CLK_DIV - 1)) begin
      div_cnt <= '0;
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end

  assign pix_tick = (div_cnt == DW'(CLK_DIV - 1));

  logic line_end;
  assign line_end  = (hcount == HW'(H_TOTAL - 1));
  assign frame_end = pix_tick && line_end && (vcount == VW'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_tick) begin
      if (line_end) begin
        hcount <= '0;
        vcount <= (vcount == VW'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  always_comb begin
    active = (hcount < HW'(H_VISIBLE)) && (vcount < VW'(V_VISIBLE));
    hsync  = !((hcount >= HW'(H_VISIBLE + H_FRONT)) &&
               (hcount <  HW'(H_VISIBLE + H_FRONT + H_SYNC)));
    vsync  = !((vcount >= VW'(V_VISIBLE + V_FRONT)) &&
               (vcount <  VW'(V_VISIBLE + V_FRONT + V_SYNC)));
  end

endmodule
