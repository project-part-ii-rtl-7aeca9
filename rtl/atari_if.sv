// atari_if: input stage for an Atari CX40 joystick.
//
// Each of the stick's Up, Down, Left, Right and Fire contacts closes to
// ground when pressed and is pulled up to the supply otherwise (through
// resistors and a 74244 buffer on the board), so a pressed contact reads 0.
// This block samples the five pins on every clock, inverts them to active
// high, and reorders the directions into the joystick code order:
//     dir[0] up (pin 1), dir[1] right (pin 4), dir[2] down (pin 2), dir[3] left (pin 3)
// fire (pin 6) comes out on its own line.
//
// Timing: one register stage, so outputs follow the pins one clock later.
// Reset clears every output (no direction, no fire).
//
// The pin functions, the pull-ups and the buffer follow the project
// description; the single sampling register is this design's choice (the
// joystick block synchronizes the directions further).
module atari_if (
  input  logic       clk,
  input  logic       rst,
  input  logic       up_n,     // DE9 pin 1
  input  logic       down_n,   // DE9 pin 2
  input  logic       left_n,   // DE9 pin 3
  input  logic       right_n,  // DE9 pin 4
  input  logic       fire_n,   // DE9 pin 6
  output logic [3:0] dir,
  output logic       fire
);

  always_ff @(posedge clk) begin
    if (rst) begin
      dir  <= '0;
      fire <= 1'b0;
    end else begin
      dir  <= {~left_n, ~down_n, ~right_n, ~up_n};
      fire <= ~fire_n;
    end
  end

endmodule
