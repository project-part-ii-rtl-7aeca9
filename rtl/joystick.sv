// joystick: turns the direction inputs into a number the CPU can read.
//
// dir_in carries one active-high line per direction, in the order of the
// codes: bit 0 up, bit 1 right, bit 2 down, bit 3 left (slide switches 0..3,
// or the Atari stick through atari_if). The lines are asynchronous, so they
// pass through a two-flop synchronizer first. The synchronized lines are
// then encoded into exactly one of the direction codes
//     up 0001, right 0010, down 0100, left 1000
// or 0000 when no direction is held; if several are held at once the first
// in the order up, right, down, left wins. The code is kept in joy_value,
// which the CPU reads through the bus.
//
// Timing: a change on dir_in reaches joy_value three clocks later. moved is
// a one-clock pulse in the clock after joy_value changes to a new non-zero
// code, used to start a sound. Reset clears the register to 0000.
//
// The codes and the switch-to-direction order follow the project
// description; the synchronizer, the priority rule for several directions at
// once and the moved pulse are this design's choices.
module joystick
  import pacman_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] dir_in,
  output logic [3:0] joy_value,
  output logic       moved
);

  logic [3:0] sync1, sync2;
  logic [3:0] code;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= dir_in;
      sync2 <= sync1;
    end
  end

  always_comb begin
    if      (sync2[0]) code = JOY_UP;
    else if (sync2[1]) code = JOY_RIGHT;
    else if (sync2[2]) code = JOY_DOWN;
    else if (sync2[3]) code = JOY_LEFT;
    else               code = 4'b0000;
  end

  logic [3:0] prev_value;

  always_ff @(posedge clk) begin
    if (rst) begin
      joy_value  <= '0;
      prev_value <= '0;
      moved      <= 1'b0;
    end else begin
      joy_value  <= code;
      prev_value <= joy_value;
      moved      <= (joy_value != prev_value) && (joy_value != 4'b0000);
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(joy_value))
    else $error("joystick: register holds more than one direction");

endmodule
