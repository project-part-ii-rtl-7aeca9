// pacman_screen_tb: fills the whole 40 x 25-tile screen and checks it on VGA.
//
// A bus-master model in place of the processor loads the ghost sprite from
// the sprite ROM and stores a tile into every one of the 1000 tile positions
// of the 320 x 200 picture. Even tiles get the ghost; odd tiles get random
// pixel words. It also stores program data into the 192 words after the
// picture. The testbench then follows one whole VGA frame from the sync
// pulses and compares every pixel period on the colour pins with its own copy
// of the buffer. Pixels outside the picture must be black, which also shows
// that the words past the picture never reach the screen. It then redraws one
// tile and checks that the next frame shows the change.
module pacman_screen_tb;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic [31:0] imem_pc, imem_instr, cpu_addr, cpu_wdata, cpu_rdata;
  logic        cpu_we;
  logic [3:0]  sw;
  logic        joy_up_n, joy_down_n, joy_left_n, joy_right_n, joy_fire_n, joy_fire;
  logic        red_out, green_out, blue_out, hsync, vsync;
  logic [7:0]  ay_da;
  logic        ay_bdir, ay_bc2, ay_bc1, ay_a8, ay_a9_n;

  pacman_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic lw(input logic [31:0] a, output logic [31:0] d);
    cpu_addr = a; cpu_we = 0;
    @(negedge clk);
    d = cpu_rdata;
  endtask

  task automatic sw_(input logic [31:0] a, input logic [31:0] d);
    cpu_addr = a; cpu_wdata = d; cpu_we = 1;
    @(negedge clk);
    cpu_we = 0;
  endtask

  logic [31:0] fb [8000];

  // ---------------- VGA frame follower ----------------
  bit capture = 0, frame_done = 0;
  int ph = 0, oh = -1, ov = -1, n_pixels = 0, n_lit = 0;
  bit hs_q = 1, vs_q = 1, hlock = 0, vlock = 0;

  always @(negedge clk) begin
    if (rst || !capture || frame_done) begin
      hs_q = hsync; vs_q = vsync;
    end else if (!hlock) begin
      if (hs_q && !hsync) begin hlock = 1; ph = 0; oh = 656; end
      hs_q = hsync; vs_q = vsync;
    end else begin
      ph = (ph + 1) % 2;
      if (ph == 0) begin
        oh++;
        if (oh == 800) begin oh = 0; if (vlock) ov++; end
        if (vs_q && !vsync) begin
          if (vlock) begin
            check(ov == 525 + 490, "frame timing");
            frame_done = 1;
          end
          vlock = 1; ov = 490;
        end
        if (vlock && !frame_done) begin : pix
          int r;
          logic [2:0] exp;
          logic [31:0] w;
          r = ov - 525;
          if (r >= 0 && r < 200 && oh < 320) begin
            w = fb[r * 40 + oh / 8];
            exp = {w[30 - 4 * (oh % 8)], w[29 - 4 * (oh % 8)], w[28 - 4 * (oh % 8)]};
          end else begin
            exp = 3'b000;
          end
          check({red_out, green_out, blue_out} == exp,
                $sformatf("pixel (%0d,%0d) got %b expected %b", oh, r, {red_out, green_out, blue_out}, exp));
          n_pixels++;
          if (exp != 0) n_lit++;
        end
        hs_q = hsync; vs_q = vsync;
      end
    end
  end

  task automatic grab_frame();
    hlock = 0; vlock = 0; frame_done = 0; n_pixels = 0; n_lit = 0;
    capture = 1;
    wait (frame_done);
    capture = 0;
    check(n_pixels == 800 * 525, $sformatf("pixel periods compared %0d", n_pixels));
  endtask

  logic [31:0] sprite [8];
  logic [31:0] d;
  int ghosts = 0;

  initial begin
    imem_pc = 0; cpu_addr = 0; cpu_wdata = 0; cpu_we = 0; sw = 0;
    {joy_up_n, joy_down_n, joy_left_n, joy_right_n, joy_fire_n} = 5'b11111;
    repeat (5) @(negedge clk);
    rst = 0;

    for (int i = 0; i < 8; i++) lw(32'h0000_8000 + 32'(4 * i), sprite[i]);
    for (int ty = 0; ty < 25; ty++) begin
      for (int tx = 0; tx < 40; tx++) begin
        for (int r = 0; r < 8; r++) begin
          int a;
          logic [31:0] w;
          a = (ty * 8 + r) * 40 + tx;
          w = ((tx + ty) % 2 == 0) ? sprite[r] : ($urandom & 32'h7777_7777);
          sw_(32'(4 * a), w);
          fb[a] = w;
        end
        if ((tx + ty) % 2 == 0) ghosts++;
      end
    end
    check(ghosts == 500, "half the tiles hold the ghost");
    // program data after the picture
    for (int a = 8000; a < 8192; a++) sw_(32'(4 * a), 32'h7777_7777);
    for (int a = 7990; a < 8010; a++) begin
      lw(32'(4 * a), d);
      check(d == ((a < 8000) ? fb[a] : 32'h7777_7777), $sformatf("word %0d reads back", a));
    end

    grab_frame();
    check(n_lit > 20000, $sformatf("lit pixels %0d", n_lit));

    // redraw tile (20, 12) in solid yellow and look again
    for (int r = 0; r < 8; r++) begin
      int a;
      a = (12 * 8 + r) * 40 + 20;
      sw_(32'(4 * a), 32'h6666_6666);
      fb[a] = 32'h6666_6666;
    end
    grab_frame();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
