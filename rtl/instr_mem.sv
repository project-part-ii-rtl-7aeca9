// instr_mem: instruction memory of the MIPS processor that runs the game.
//
// A word-addressed ROM indexed by the program counter: pc is a byte address
// and its bits above the two low ones select the word. The read is
// synchronous, so the instruction appears on instr one clock after pc.
// INIT_FILE names the program image ($readmemh, one 32-bit word per line);
// with no file the memory holds zeros, which MIPS executes as no-ops.
//
// The CPU side is a plain ROM port with a configurable depth. The depth of
// 1024 words, the synchronous read and the byte-addressed pc are this
// design's choices; the project only names an instruction memory built the
// same way as before and supplies the program separately.
module instr_mem #(
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] pc,
  output logic [31:0] instr
);

  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    instr <= rom[pc[AW+1:2]];
  end

endmodule
