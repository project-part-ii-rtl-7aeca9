// storage_rom: the sprite ("storage") ROM of the game.
//
// A word-addressed ROM with a synchronous read: the word at addr appears on
// rdata one clock after the address. Each sprite is 8 x 8 pixels stored as
// eight consecutive words, one word per sprite line; a word holds eight
// 4-bit pixels, leftmost pixel in bits 31..28, with the top bit of every
// nibble unused and the other three giving red, green and blue. The program
// copies these words into the frame buffer with load and store instructions.
//
// The default contents (storage_rom.hex) hold one sprite in words 0..7, a
// magenta ghost with white-and-black eyes; the remaining words are zero.
//
// The packing, sprite size and role follow the project description, and the
// ghost picture follows its sprite illustration with the background cells
// taken as black. The depth of 256 words (32 sprites) is this design's
// choice, since the full sprite set is not part of the description.
module storage_rom #(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/storage_rom.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata
);

  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    rdata <= rom[addr];
  end

endmodule
