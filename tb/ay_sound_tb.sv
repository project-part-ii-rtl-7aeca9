// ay_sound_tb: checks the AY-3-8910 register-write sequences.
//
// A small model of the chip's bus sits in the testbench: with A8 high and A9
// low, {BDIR,BC2,BC1} = 111 latches the register number from DA, 110 writes
// DA into the latched register. The testbench then checks that
//   - a stored tone plays: R7 = 0x3E, R8 = 0x0F, R1 = 0x00, R0 = 255 - tone;
//   - a joystick movement replays the current tone;
//   - a request made while a sequence runs is served right after it;
//   - every latch and write phase lasts HOLD clocks, a sequence 16*HOLD clocks, and
//     busy rises the clock after the request;
//   - the bus idles (010, DA = 0) whenever no sequence runs.
module ay_sound_tb;
  localparam int HOLD = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       tone_we, joy_moved, busy, bdir, bc2, bc1, a8, a9_n;
  logic [7:0] tone_wdata, tone, da;

  ay_sound #(.HOLD(HOLD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // chip model
  logic [7:0] regs [16];
  logic [3:0] latched;
  int writes = 0, latches = 0;
  logic [2:0] ctl_q = 3'b010;
  int run = 0;

  always @(posedge clk) if (!rst) begin
    check(a8 && !a9_n, "chip selected");
    if ({bdir, bc2, bc1} == 3'b111) begin
      latched <= da[3:0];
      if (ctl_q != 3'b111) latches++;
      check(da[7:4] == 0, "register number below 16");
    end
    if ({bdir, bc2, bc1} == 3'b110) begin
      regs[latched] <= da;
      if (ctl_q != 3'b110) writes++;
    end
    if (!busy) check({bdir, bc2, bc1} == 3'b010 && da == 0, "idle bus when not busy");
    // phase lengths while a sequence runs
    if ({bdir, bc2, bc1} != ctl_q) begin
      if (run > 0 && ctl_q != 3'b010) check(run == HOLD, $sformatf("phase length %0d", run));
      run = 1;
    end else begin
      run++;
    end
    ctl_q <= {bdir, bc2, bc1};
  end

  task automatic wait_idle(output int cycles);
    cycles = 0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  int cyc;

  initial begin
    for (int i = 0; i < 16; i++) regs[i] = 8'hAA;
    tone_we = 0; joy_moved = 0; tone_wdata = 0;
    repeat (3) @(negedge clk);
    check({bdir, bc2, bc1} == 3'b010 && !busy, "idle in reset");
    rst = 0;
    @(negedge clk);

    // 1: stored tone
    tone_wdata = 8'h5A; tone_we = 1;
    @(negedge clk);
    tone_we = 0;
    check(busy, "busy the clock after the request");
    check(tone == 8'h5A, "tone register");
    wait_idle(cyc);
    check(cyc == 16 * HOLD, $sformatf("sequence length %0d", cyc));
    check(regs[7] == 8'h3E && regs[8] == 8'h0F && regs[1] == 8'h00 && regs[0] == 8'hA5,
          "registers after a stored tone");
    check(writes == 4 && latches == 4, "four register writes");

    // 2: joystick movement replays the tone
    regs[0] = 8'h00;
    repeat (5) @(negedge clk);
    joy_moved = 1;
    @(negedge clk);
    joy_moved = 0;
    wait_idle(cyc);
    check(regs[0] == 8'hA5 && writes == 8, "movement replays the tone");

    // 3: request during a sequence is remembered
    tone_wdata = 8'h21; tone_we = 1;
    @(negedge clk);
    tone_we = 0;
    repeat (3 * HOLD) @(negedge clk);
    joy_moved = 1;
    @(negedge clk);
    joy_moved = 0;
    wait_idle(cyc);
    check(writes == 12, "first sequence done");
    @(negedge clk);
    check(busy, "pending request starts next");
    wait_idle(cyc);
    check(writes == 16 && regs[0] == 8'hDE, "pending request served");

    repeat (10) @(negedge clk);
    check(!busy && writes == 16, "no spurious sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
