// data_memory: the 8K-word data RAM of the game system, also its frame buffer.
//
// Port A belongs to the CPU: a word-addressed synchronous read/write port
// (store on a clock edge with a_we high, load data one clock after the
// address). Port B is a read-only port for the VGA driver, with an enable:
// when b_en is high on a clock edge, b_addr is captured and its word appears
// on b_rdata until the next enabled edge. Words 0..7999 hold the 320 x 200
// picture, row * 40 + column / 8, and the rest is free for the program.
//
// Both ports read the old word when they address the word being written on
// the same edge. INIT_FILE, if not empty, loads the power-up contents with
// $readmemh; otherwise the RAM starts zeroed.
//
// The 8K-word size and the use of this RAM as the picture buffer follow the
// project description; the second read port for the display (the project
// builds the RAM as a single-port block memory and does not say how the
// display shares it) and the read-during-write behaviour are this design's
// choices.
module data_memory #(
  parameter int unsigned DEPTH     = 8192,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: CPU
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: display
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
