// vga_driver: draws the 320 x 200 frame buffer on a VGA monitor.
//
// The raster comes from vga_timing. The picture occupies the top-left
// PIC_W x PIC_H pixels of the 640 x 480 screen, one memory pixel per screen
// pixel; everything else is drawn black. For each pixel inside the picture
// the driver reads the frame-buffer word
//     address = row * WORDS_PER_ROW + column / 8
// and takes the three colour bits of that pixel's nibble:
//     red = data[30 - (column % 8) * 4], green = data[29 - ...], blue = data[28 - ...]
// so pixel n of a word is bits 30..28 and pixel n+7 is bits 2..0; the top
// bit of every nibble is unused.
//
// Interface: a synchronous read port towards the frame buffer. fb_en is high
// on pixel ticks; the memory must capture fb_addr on such an edge and hold
// fb_data until the next one (a block RAM read port with an enable).
//
// Timing: two pixel periods of latency. On tick k the address of pixel k is
// read and pixel k's column and sync levels are stored; on tick k+1 the
// colour bits and the delayed hsync/vsync are registered onto the outputs
// together, so colour and sync stay aligned. Reset clears red, green and blue
// to 0 and holds both syncs inactive (high).
//
// The address and bit-select equations, the 320 x 200 picture size, the
// 4-bit pixel packing and clearing the colour outputs on reset follow the
// project description; placing the picture at the top-left of an unscaled
// 640 x 480 raster and the two-stage pipeline are this design's choices.
module vga_driver #(
  parameter int unsigned CLK_DIV   = pacman_pkg::PIX_CLK_DIV,
  parameter int unsigned PIC_W     = pacman_pkg::PIC_W,
  parameter int unsigned PIC_H     = pacman_pkg::PIC_H,
  parameter int unsigned H_VISIBLE = pacman_pkg::H_VISIBLE,
  parameter int unsigned H_FRONT   = pacman_pkg::H_FRONT,
  parameter int unsigned H_SYNC    = pacman_pkg::H_SYNC,
  parameter int unsigned H_BACK    = pacman_pkg::H_BACK,
  parameter int unsigned V_VISIBLE = pacman_pkg::V_VISIBLE,
  parameter int unsigned V_FRONT   = pacman_pkg::V_FRONT,
  parameter int unsigned V_SYNC    = pacman_pkg::V_SYNC,
  parameter int unsigned V_BACK    = pacman_pkg::V_BACK,
  parameter int unsigned ADDR_W    = 13,
  localparam int unsigned ROW_WORDS = PIC_W / pacman_pkg::PIX_PER_WORD
) (
  input  logic              clk,
  input  logic              rst,
  // frame-buffer read port
  output logic              fb_en,
  output logic [ADDR_W-1:0] fb_addr,
  input  logic [31:0]       fb_data,
  // to the VGA connector
  output logic              red_out,
  output logic              green_out,
  output logic              blue_out,
  output logic              hsync,
  output logic              vsync,
  // raster status, for system use
  output logic              frame_end
);

  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  logic          pix_tick, active, hs_raw, vs_raw;
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;

  vga_timing #(
    .CLK_DIV  (CLK_DIV),
    .H_VISIBLE(H_VISIBLE), .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK),
    .V_VISIBLE(V_VISIBLE), .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK)
  ) u_timing (
    .clk, .rst, .pix_tick, .hcount, .vcount, .active,
    .hsync(hs_raw), .vsync(vs_raw), .frame_end
  );

  // Stage 0: address of the current pixel's word.
  logic in_pic;
  assign in_pic  = active && (hcount < HW'(PIC_W)) && (vcount < VW'(PIC_H));
  assign fb_en   = pix_tick;
  assign fb_addr = ADDR_W'(32'(vcount) * ROW_WORDS + 32'(hcount[HW-1:3]));

  // Stage 1: what the output stage needs besides the memory word.
  logic [2:0] s1_pix;
  logic       s1_in, s1_hs, s1_vs;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_pix <= '0;
      s1_in  <= 1'b0;
      s1_hs  <= 1'b1;
      s1_vs  <= 1'b1;
    end else if (pix_tick) begin
      s1_pix <= hcount[2:0];
      s1_in  <= in_pic;
      s1_hs  <= hs_raw;
      s1_vs  <= vs_raw;
    end
  end

  // Stage 2: pick this pixel's nibble out of the word.
  pacman_pkg::rgb_t pix;
  always_comb begin
    pix.r = fb_data[30 - 4 * s1_pix];
    pix.g = fb_data[29 - 4 * s1_pix];
    pix.b = fb_data[28 - 4 * s1_pix];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      red_out   <= 1'b0;
      green_out <= 1'b0;
      blue_out  <= 1'b0;
      hsync     <= 1'b1;
      vsync     <= 1'b1;
    end else if (pix_tick) begin
      red_out   <= s1_in & pix.r;
      green_out <= s1_in & pix.g;
      blue_out  <= s1_in & pix.b;
      hsync     <= s1_hs;
      vsync     <= s1_vs;
    end
  end

endmodule
