// bus_decoder: memory map of the CPU's load/store bus.
//
// The CPU issues a byte address with a store strobe (cpu_we) and store data.
// The decoder steers it by address:
//     0x0000..0x7FFF  data RAM (8K words; the frame buffer is words 0..7999)
//     0x8000..0xBFFF  sprite ROM (read only)
//     0xC000          joystick register (read only, code in bits 3..0)
//     0xC004          sound register (write: tone value in bits 7..0;
//                     read: bit 8 busy, bits 7..0 current tone)
// Bits 31..16 are not decoded, and within 0xC000..0xFFFF bit 2 alone picks
// the joystick (0) or the sound register (1).
//
// Timing: every load returns its data one clock after the address, matching
// the synchronous memories. The decoder therefore registers which target was
// addressed, and samples the joystick and sound values at the address edge,
// then muxes the returned word in the next clock. Stores take effect on the
// address edge.
//
// That the CPU reaches the data RAM, the sprite ROM and the joystick
// register with lw/sw follows the project description; the addresses and the
// sound register's read format are this design's choices.
module bus_decoder
  import pacman_pkg::*;
#(
  parameter int unsigned RAM_AW = 13,
  parameter int unsigned ROM_AW = 8
) (
  input  logic              clk,
  input  logic              rst,
  // CPU data bus
  input  logic [31:0]       cpu_addr,
  input  logic              cpu_we,
  input  logic [31:0]       cpu_wdata,
  output logic [31:0]       cpu_rdata,
  // data RAM port
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [31:0]       ram_wdata,
  input  logic [31:0]       ram_rdata,
  // sprite ROM port
  output logic [ROM_AW-1:0] rom_addr,
  input  logic [31:0]       rom_rdata,
  // joystick register
  input  logic [3:0]        joy_value,
  // sound register
  output logic              sound_we,
  output logic [7:0]        sound_wdata,
  input  logic [7:0]        sound_tone,
  input  logic              sound_busy
);

  bus_sel_e sel, sel_q;
  logic [31:0] io_q;

  always_comb begin
    if (!cpu_addr[15])       sel = SEL_RAM;
    else if (!cpu_addr[14])  sel = SEL_ROM;
    else if (!cpu_addr[2])   sel = SEL_JOY;
    else                     sel = SEL_SOUND;
  end

  assign ram_addr    = cpu_addr[RAM_AW+1:2];
  assign ram_wdata   = cpu_wdata;
  assign ram_we      = cpu_we && (sel == SEL_RAM);
  assign rom_addr    = cpu_addr[ROM_AW+1:2];
  assign sound_we    = cpu_we && (sel == SEL_SOUND);
  assign sound_wdata = cpu_wdata[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q <= SEL_RAM;
      io_q  <= '0;
    end else begin
      sel_q <= sel;
      io_q  <= (sel == SEL_JOY) ? {28'd0, joy_value}
                                : {23'd0, sound_busy, sound_tone};
    end
  end

  always_comb begin
    unique case (sel_q)
      SEL_RAM: cpu_rdata = ram_rdata;
      SEL_ROM: cpu_rdata = rom_rdata;
      default: cpu_rdata = io_q;
    endcase
  end

endmodule
