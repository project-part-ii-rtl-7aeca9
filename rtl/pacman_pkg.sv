// pacman_pkg: constants and types shared by the PacMan video/game system.
//
// The picture is 320 x 200 pixels, seen as 40 x 25 tiles of 8 x 8 pixels.
// Every 32-bit word holds eight 4-bit pixels; the top bit of each nibble is
// unused and the other three are red, green and blue. Pixel n of a word sits
// in bits 31..28, pixel n+7 in bits 3..0. The frame buffer starts at word 0 of
// the data RAM, and the word for pixel (row, column) is row*40 + column/8.
//
// The raster around it is standard 640 x 480 VGA (800 x 525 clocks of the
// 25 MHz pixel clock, negative sync pulses); those timing numbers, the
// 50 MHz system clock and the CPU address map below are this design's own
// choices, the picture geometry, pixel packing and joystick codes follow the
// project description.
package pacman_pkg;

  // ---------------- picture geometry ----------------
  localparam int unsigned PIX_BITS      = 4;    // bits per pixel in memory
  localparam int unsigned PIX_PER_WORD  = 8;    // pixels per 32-bit word
  localparam int unsigned PIC_W         = 320;  // visible picture width
  localparam int unsigned PIC_H         = 200;  // visible picture height
  localparam int unsigned WORDS_PER_ROW = PIC_W / PIX_PER_WORD;  // 40
  localparam int unsigned FB_WORDS      = WORDS_PER_ROW * PIC_H; // 8000

  // ---------------- 640x480 raster (25 MHz pixel clock) ----------------
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;

  // One pixel per two clocks of the 50 MHz board clock.
  localparam int unsigned PIX_CLK_DIV = 2;

  // 3-bit colour, one bit per primary, as drawn to the screen.
  typedef struct packed {
    logic r;
    logic g;
    logic b;
  } rgb_t;

  // ---------------- joystick codes (one-hot) ----------------
  localparam logic [3:0] JOY_UP    = 4'b0001;
  localparam logic [3:0] JOY_RIGHT = 4'b0010;
  localparam logic [3:0] JOY_DOWN  = 4'b0100;
  localparam logic [3:0] JOY_LEFT  = 4'b1000;

  // ---------------- CPU data-bus address map (byte addresses) ----------------
  // 0x0000..0x7FFF  data RAM, 8K words (frame buffer = first 8000 words)
  // 0x8000..0xBFFF  sprite ROM (storage memory)
  // 0xC000          joystick register (read)
  // 0xC004          sound register (write: tone value in bits 7..0)
  localparam logic [31:0] ADDR_ROM_BASE = 32'h0000_8000;
  localparam logic [31:0] ADDR_JOY      = 32'h0000_C000;
  localparam logic [31:0] ADDR_SOUND    = 32'h0000_C004;

  typedef enum logic [1:0] {
    SEL_RAM   = 2'd0,
    SEL_ROM   = 2'd1,
    SEL_JOY   = 2'd2,
    SEL_SOUND = 2'd3
  } bus_sel_e;

  // ---------------- AY-3-8910 bus ----------------
  // Bus-control codes {BDIR, BC2, BC1}.
  localparam logic [2:0] AY_INACTIVE = 3'b010;
  localparam logic [2:0] AY_WRITE    = 3'b110;
  localparam logic [2:0] AY_LATCH    = 3'b111;

  // Registers written to sound one tone on channel A.
  localparam logic [3:0] AY_R_TONE_A_FINE   = 4'd0;
  localparam logic [3:0] AY_R_TONE_A_COARSE = 4'd1;
  localparam logic [3:0] AY_R_MIXER         = 4'd7;
  localparam logic [3:0] AY_R_AMPL_A        = 4'd8;
  localparam logic [7:0] AY_MIXER_TONE_A    = 8'h3E; // tone A on, rest off
  localparam logic [7:0] AY_AMPL_FULL       = 8'h0F;

endpackage
