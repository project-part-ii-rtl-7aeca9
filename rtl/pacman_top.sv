// pacman_top: the PacMan game system around a MIPS processor.
//
// The processor runs the game from the instruction memory and draws by
// copying 8 x 8 sprites, one 32-bit word per sprite line, from the sprite ROM
// into the frame buffer with lw/sw. The frame buffer is the first 8000 words
// of the 8K-word data RAM: the 320 x 200 picture, 40 words per pixel row,
// 8 pixels per word. The VGA driver reads it through a second port on every
// pixel and drives one bit each of red, green and blue plus hsync and
// vsync. The player's direction comes from four slide switches or an Atari
// CX40 stick (active-low pins) and is held as a one-hot code in the joystick
// register the program reads. The program can also store a tone value, and
// every stored tone or joystick movement makes the sound block program an
// AY-3-8910 chip to play it.
//
// The processor is not part of this module: its instruction fetch port
// (imem_pc / imem_instr) and its data bus (cpu_addr, cpu_we, cpu_wdata,
// cpu_rdata) are ports. Every read returns its data one clock after the
// address. See bus_decoder for the address map.
//
// All logic runs on one clock, clk (50 MHz on the target board); the VGA
// pixel rate is clk / PIX_CLK_DIV. rst is synchronous and active high.
// The set of memories, the picture geometry and the joystick and sound
// behaviour follow the project description; the address map, the dual-port
// frame buffer, the combination of switches and stick (ORed) and the VGA
// placement are this design's choices.
module pacman_top #(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter string       IMEM_INIT  = "",
  parameter int unsigned DMEM_DEPTH = 8192,
  parameter string       DMEM_INIT  = "",
  parameter int unsigned ROM_DEPTH  = 256,
  parameter string       ROM_INIT   = "rtl/storage_rom.hex",
  parameter int unsigned SND_HOLD   = 32
) (
  input  logic        clk,
  input  logic        rst,
  // processor instruction fetch
  input  logic [31:0] imem_pc,
  output logic [31:0] imem_instr,
  // processor data bus
  input  logic [31:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  // direction inputs
  input  logic [3:0]  sw,          // 0 up, 1 right, 2 down, 3 left
  input  logic        joy_up_n,
  input  logic        joy_down_n,
  input  logic        joy_left_n,
  input  logic        joy_right_n,
  input  logic        joy_fire_n,
  output logic        joy_fire,
  // VGA connector
  output logic        red_out,
  output logic        green_out,
  output logic        blue_out,
  output logic        hsync,
  output logic        vsync,
  // AY-3-8910 sound chip
  output logic [7:0]  ay_da,
  output logic        ay_bdir,
  output logic        ay_bc2,
  output logic        ay_bc1,
  output logic        ay_a8,
  output logic        ay_a9_n
);

  localparam int unsigned RAM_AW = $clog2(DMEM_DEPTH);
  localparam int unsigned ROM_AW = $clog2(ROM_DEPTH);

  // ---------------- instruction memory ----------------
  instr_mem #(.DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_INIT)) u_imem (
    .clk, .pc(imem_pc), .instr(imem_instr)
  );

  // ---------------- data bus ----------------
  logic              ram_we;
  logic [RAM_AW-1:0] ram_addr;
  logic [31:0]       ram_wdata, ram_rdata;
  logic [ROM_AW-1:0] rom_addr;
  logic [31:0]       rom_rdata;
  logic [3:0]        joy_value;
  logic              sound_we, sound_busy;
  logic [7:0]        sound_wdata, sound_tone;

  bus_decoder #(.RAM_AW(RAM_AW), .ROM_AW(ROM_AW)) u_bus (
    .clk, .rst,
    .cpu_addr, .cpu_we, .cpu_wdata, .cpu_rdata,
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .rom_addr, .rom_rdata,
    .joy_value,
    .sound_we, .sound_wdata, .sound_tone, .sound_busy
  );

  // ---------------- memories ----------------
  logic              fb_en;
  logic [RAM_AW-1:0] fb_addr;
  logic [31:0]       fb_data;

  data_memory #(.DEPTH(DMEM_DEPTH), .INIT_FILE(DMEM_INIT)) u_dmem (
    .clk,
    .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata), .a_rdata(ram_rdata),
    .b_en(fb_en), .b_addr(fb_addr), .b_rdata(fb_data)
  );

  storage_rom #(.DEPTH(ROM_DEPTH), .INIT_FILE(ROM_INIT)) u_rom (
    .clk, .addr(rom_addr), .rdata(rom_rdata)
  );

  // ---------------- video ----------------
  vga_driver #(.ADDR_W(RAM_AW)) u_vga (
    .clk, .rst,
    .fb_en, .fb_addr, .fb_data,
    .red_out, .green_out, .blue_out, .hsync, .vsync,
    .frame_end()
  );

  // ---------------- joystick ----------------
  logic [3:0] atari_dir;
  logic       joy_moved;

  atari_if u_atari (
    .clk, .rst,
    .up_n(joy_up_n), .down_n(joy_down_n), .left_n(joy_left_n),
    .right_n(joy_right_n), .fire_n(joy_fire_n),
    .dir(atari_dir), .fire(joy_fire)
  );

  joystick u_joy (
    .clk, .rst,
    .dir_in(sw | atari_dir),
    .joy_value, .moved(joy_moved)
  );

  // ---------------- sound ----------------
  ay_sound #(.HOLD(SND_HOLD)) u_sound (
    .clk, .rst,
    .tone_we(sound_we), .tone_wdata(sound_wdata), .joy_moved,
    .tone(sound_tone), .busy(sound_busy),
    .da(ay_da), .bdir(ay_bdir), .bc2(ay_bc2), .bc1(ay_bc1),
    .a8(ay_a8), .a9_n(ay_a9_n)
  );

endmodule
