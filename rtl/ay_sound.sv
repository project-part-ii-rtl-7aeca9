// ay_sound: plays a tone on an AY-3-8910/8912/8913 sound chip.
//
// The chip is programmed through registers over its 8-bit DA0..DA7 bus. Its
// bus is steered by BDIR, BC2 and BC1 ({BDIR,BC2,BC1} = 111 latches a
// register number, 110 writes data into the latched register, 010 leaves the
// bus idle), and the chip only answers while A8 is high and A9 (active low)
// is low, which this block holds permanently.
//
// The CPU stores a tone value through the sound register (tone_we with
// tone_wdata). A tone is played when that happens and also whenever the
// joystick moves (joy_moved pulse): the sequencer then performs four register
// writes,
//     R7 (mixer)           <= 0x3E  tone on channel A only
//     R8 (channel A level) <= 0x0F  full amplitude
//     R1 (tone A, coarse)  <= 0x00
//     R0 (tone A, fine)    <= 255 - tone value
// each as latch-address, idle, write-data, idle phases of HOLD clocks. The
// chip's tone register holds a period, so the value is inverted: a larger
// tone value gives a shorter period and a higher pitch. A
// request arriving while a sequence runs is remembered and served when it
// ends. busy is high while the sequence runs.
//
// Timing: busy rises the clock after the request and the first latch phase
// reaches the pins one clock later (the bus pins are registered); one
// sequence lasts 16 * HOLD clocks. At 50 MHz, HOLD = 32 gives 640 ns per
// phase, well above the chip's bus timing needs.
//
// Driving a value onto DA0..DA7 with A8/A9 set so the register loads, and
// playing a tone on joystick movement, and a higher value giving a higher
// tone, follow the project description; the
// register numbers, mixer and amplitude values and the phase lengths are
// this design's choices based on the chip's usual programming.
module ay_sound
  import pacman_pkg::*;
#(
  parameter int unsigned HOLD = 32
) (
  input  logic       clk,
  input  logic       rst,
  // from the CPU bus and the joystick
  input  logic       tone_we,
  input  logic [7:0] tone_wdata,
  input  logic       joy_moved,
  output logic [7:0] tone,
  output logic       busy,
  // to the AY-3-89XX
  output logic [7:0] da,       // DA7..DA0, pins 30..37
  output logic       bdir,     // pin 27
  output logic       bc2,      // pin 28
  output logic       bc1,      // pin 29
  output logic       a8,       // pin 25
  output logic       a9_n      // pin 24
);

  typedef enum logic [1:0] {
    PH_LATCH, PH_GAP1, PH_WRITE, PH_GAP2
  } phase_e;

  localparam int unsigned HW = (HOLD > 1) ? $clog2(HOLD) : 1;

  logic          pending;
  logic [1:0]    step;     // which of the four register writes
  phase_e        phase;
  logic [HW-1:0] hold_cnt;

  // register number and data for each step
  logic [3:0] step_reg;
  logic [7:0] step_data;
  always_comb begin
    unique case (step)
      2'd0:    begin step_reg = AY_R_MIXER;         step_data = AY_MIXER_TONE_A; end
      2'd1:    begin step_reg = AY_R_AMPL_A;        step_data = AY_AMPL_FULL;    end
      2'd2:    begin step_reg = AY_R_TONE_A_COARSE; step_data = 8'h00;           end
      default: begin step_reg = AY_R_TONE_A_FINE;   step_data = ~tone;           end
    endcase
  end

  logic phase_done;
  assign phase_done = (hold_cnt == HW'(HOLD - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      tone     <= '0;
      pending  <= 1'b0;
      busy     <= 1'b0;
      step     <= '0;
      phase    <= PH_LATCH;
      hold_cnt <= '0;
    end else begin
      if (tone_we) tone <= tone_wdata;

      if (!busy) begin
        if (pending || tone_we || joy_moved) begin
          busy     <= 1'b1;
          pending  <= 1'b0;
          step     <= '0;
          phase    <= PH_LATCH;
          hold_cnt <= '0;
        end
      end else begin
        if (tone_we || joy_moved) pending <= 1'b1;
        if (phase_done) begin
          hold_cnt <= '0;
          unique case (phase)
            PH_LATCH: phase <= PH_GAP1;
            PH_GAP1:  phase <= PH_WRITE;
            PH_WRITE: phase <= PH_GAP2;
            PH_GAP2: begin
              phase <= PH_LATCH;
              if (step == 2'd3) busy <= 1'b0;
              step <= step + 1'b1;
            end
          endcase
        end else begin
          hold_cnt <= hold_cnt + 1'b1;
        end
      end
    end
  end

  // Bus values for the current phase, registered so the pins never glitch.
  logic [2:0] ctl_d;
  logic [7:0] da_d;
  always_comb begin
    ctl_d = AY_INACTIVE;
    da_d  = '0;
    if (busy) begin
      unique case (phase)
        PH_LATCH: begin ctl_d = AY_LATCH; da_d = {4'b0000, step_reg}; end
        PH_WRITE: begin ctl_d = AY_WRITE; da_d = step_data;          end
        default:  begin ctl_d = AY_INACTIVE; da_d = '0;              end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {bdir, bc2, bc1} <= AY_INACTIVE;
      da               <= '0;
    end else begin
      {bdir, bc2, bc1} <= ctl_d;
      da               <= da_d;
    end
  end

  assign a8   = 1'b1;
  assign a9_n = 1'b0;

endmodule
