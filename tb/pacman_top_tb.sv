// pacman_top_tb: end-to-end run of the game system at its default sizes.
//
// The testbench plays the processor: a bus-master model issues the loads and
// stores the game program would. It
//   1. checks that reset blanks the colour outputs and idles the sound bus,
//      and fetches from the (empty) instruction memory;
//   2. loads the ghost sprite from the sprite ROM (lw) and stores it into
//      the frame buffer (sw) at several tiles, word row*40 + column/8, plus
//      a full row of random tiles, and reads words back;
//   3. moves the joystick with each slide switch and with the Atari stick,
//      reading the direction register each time (0001/0010/0100/1000) and
//      the fire line;
//   4. stores tones into the sound register, including one while a sequence
//      is still running, and checks the registers a model of the AY chip
//      receives (R7 = 0x3E, R8 = 0x0F, R1 = 0, R0 = 255 - tone);
//   5. follows one whole VGA frame from the sync pulses alone and compares
//      every pixel on the red/green/blue pins with its own copy of the frame
//      buffer (black outside the 320x200 picture).
// It counts how often each mechanism happened and fails any that never did.
module pacman_top_tb;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;   // 50 MHz

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

  // ---------------- mechanism counters ----------------
  int n_rom_reads = 0, n_fb_writes = 0, n_ram_reads = 0, n_hsync = 0, n_vsync = 0;
  int n_dir [4] = '{0, 0, 0, 0};
  int n_atari = 0, n_fire = 0, n_snd_cpu = 0, n_snd_joy = 0, n_snd_pending = 0;
  int n_ay_seq = 0, n_reset_blank = 0, n_pixels = 0, n_lit = 0;

  // ---------------- processor bus model ----------------
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

  // ---------------- sprite reference ----------------
  string ghost [8] = '{
    "..MMMM..", ".MMMMMM.", "MMWWMWWM", "MMWKMWKM",
    "MMMMMMMM", "MMMMMMMM", "MM.M.MM.", "M..M.M.."
  };
  function automatic logic [31:0] line_word(string s);
    logic [31:0] w = '0;
    for (int i = 0; i < 8; i++) w = {w[27:0], (s[i] == "M") ? 4'h5 : (s[i] == "W") ? 4'h7 : 4'h0};
    return w;
  endfunction

  // ---------------- frame-buffer shadow ----------------
  logic [31:0] fb [8000];

  task automatic put_tile(int tx, int ty, logic [31:0] lines [8]);
    for (int r = 0; r < 8; r++) begin
      int a;
      a = (ty * 8 + r) * 40 + tx;
      sw_(32'(a * 4), lines[r]);
      fb[a] = lines[r];
      n_fb_writes++;
    end
  endtask

  // ---------------- AY-3-8910 model ----------------
  logic [7:0] ay_regs [16];
  logic [3:0] ay_latched;
  logic [2:0] ay_ctl_q = 3'b010;
  always @(posedge clk) if (!rst) begin
    if (ay_a8 && !ay_a9_n) begin
      if ({ay_bdir, ay_bc2, ay_bc1} == 3'b111) ay_latched <= ay_da[3:0];
      if ({ay_bdir, ay_bc2, ay_bc1} == 3'b110) begin
        ay_regs[ay_latched] <= ay_da;
        if (ay_ctl_q != 3'b110 && ay_latched == 4'd0) n_ay_seq++;
      end
    end
    ay_ctl_q <= {ay_bdir, ay_bc2, ay_bc1};
  end

  task automatic wait_sound_idle();
    logic [31:0] d;
    int guard = 0;
    do begin
      lw(32'h0000_C004, d);
      guard++;
    end while (d[8] && guard < 10000);
    check(!d[8], "sound sequence finishes");
  endtask

  task automatic move(logic [3:0] swv, logic [4:0] atari_n, logic [3:0] exp, bit via_atari);
    logic [31:0] d;
    int seq_before;
    seq_before = n_ay_seq;
    sw = swv;
    {joy_up_n, joy_down_n, joy_left_n, joy_right_n, joy_fire_n} = atari_n;
    repeat (6) @(negedge clk);
    lw(32'h0000_C000, d);
    check(d == {28'd0, exp}, $sformatf("joystick reads %b, expected %b", d[3:0], exp));
    for (int i = 0; i < 4; i++) if (d[3:0] == 4'(1 << i)) n_dir[i]++;
    if (via_atari && d[3:0] == exp) n_atari++;
    wait_sound_idle();
    check(n_ay_seq == seq_before + 1, "a movement plays one tone");
    if (n_ay_seq == seq_before + 1) n_snd_joy++;
    sw = 0;
    {joy_up_n, joy_down_n, joy_left_n, joy_right_n, joy_fire_n} = 5'b11111;
    repeat (6) @(negedge clk);
  endtask

  // ---------------- VGA frame follower ----------------
  bit capture = 0, frame_done = 0;
  int ph = 0, oh = -1, ov = -1;
  bit hs_q = 1, vs_q = 1, hlock = 0, vlock = 0;

  always @(negedge clk) begin
    if (!rst && hs_q && !hsync) n_hsync++;
    if (!rst && vs_q && !vsync) n_vsync++;
    if (rst) begin
      hs_q = 1; vs_q = 1;
    end else if (!capture || frame_done) begin
      hs_q = hsync; vs_q = vsync;
    end else if (!hlock) begin
      if (hs_q && !hsync) begin hlock = 1; ph = 0; oh = 656; end
      hs_q = hsync; vs_q = vsync;
    end else begin
      ph = (ph + 1) % 2;
      if (ph == 0) begin
        oh++;
        if (oh == 800) begin oh = 0; if (vlock) ov++; end
        if (hs_q && !hsync) check(oh == 656, "line timing");
        if (vs_q && !vsync) begin
          if (vlock) begin
            check(ov == 525 + 490, "frame timing");
            frame_done = 1;
          end
          vlock = 1; ov = 490;
        end
        if (vlock && !frame_done) begin : pix
          int r, c;
          logic [2:0] exp;
          logic [31:0] w;
          r = ov - 525; c = oh;
          if (r >= 0 && r < 200 && c < 320) begin
            w = fb[r * 40 + c / 8];
            exp = {w[30 - 4 * (c % 8)], w[29 - 4 * (c % 8)], w[28 - 4 * (c % 8)]};
          end else begin
            exp = 3'b000;
          end
          check({red_out, green_out, blue_out} == exp,
                $sformatf("pixel (%0d,%0d) got %b expected %b", c, r, {red_out, green_out, blue_out}, exp));
          n_pixels++;
          if (exp != 0) n_lit++;
        end
        hs_q = hsync; vs_q = vsync;
      end
    end
  end

  // ---------------- test sequence ----------------
  logic [31:0] sprite [8];
  logic [31:0] tile [8];
  logic [31:0] d;

  initial begin
    imem_pc = 0; cpu_addr = 0; cpu_wdata = 0; cpu_we = 0; sw = 0;
    {joy_up_n, joy_down_n, joy_left_n, joy_right_n, joy_fire_n} = 5'b11111;
    for (int i = 0; i < 8000; i++) fb[i] = '0;
    for (int i = 0; i < 16; i++) ay_regs[i] = 8'hAA;

    // 1. reset
    repeat (20) begin
      @(negedge clk);
      check({red_out, green_out, blue_out} == 0 && {ay_bdir, ay_bc2, ay_bc1} == 3'b010,
            "reset blanks colour and idles the sound bus");
      if ({red_out, green_out, blue_out} == 0) n_reset_blank++;
    end
    rst = 0;
    for (int i = 0; i < 8; i++) begin
      imem_pc = 32'(4 * i);
      @(negedge clk);
      check(imem_instr == 32'd0, "empty program memory fetches no-ops");
    end

    // 2. sprite copy
    for (int i = 0; i < 8; i++) begin
      lw(32'h0000_8000 + 32'(4 * i), sprite[i]);
      n_rom_reads++;
      check(sprite[i] == line_word(ghost[i]), $sformatf("sprite line %0d", i));
    end
    put_tile(0, 0, sprite);
    put_tile(39, 0, sprite);
    put_tile(0, 24, sprite);
    put_tile(39, 24, sprite);
    put_tile(17, 20, sprite);
    for (int tx = 0; tx < 40; tx++) begin
      for (int r = 0; r < 8; r++) tile[r] = $urandom & 32'h7777_7777;
      put_tile(tx, 12, tile);
    end
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom % 8000;
      lw(32'(4 * a), d);
      n_ram_reads++;
      check(d == fb[a], $sformatf("frame buffer word %0d reads back", a));
    end

    // 3. joystick: switches 0..3, then the Atari stick
    move(4'b0001, 5'b11111, 4'b0001, 0);
    move(4'b0010, 5'b11111, 4'b0010, 0);
    move(4'b0100, 5'b11111, 4'b0100, 0);
    move(4'b1000, 5'b11111, 4'b1000, 0);
    move(4'b0000, 5'b01111, 4'b0001, 1);   // up_n low
    move(4'b0000, 5'b11101, 4'b0010, 1);   // right_n low
    move(4'b0000, 5'b10111, 4'b0100, 1);   // down_n low
    move(4'b0000, 5'b11011, 4'b1000, 1);   // left_n low
    joy_fire_n = 0;
    repeat (3) @(negedge clk);
    check(joy_fire, "fire button");
    if (joy_fire) n_fire++;
    joy_fire_n = 1;
    repeat (3) @(negedge clk);
    check(!joy_fire, "fire released");

    // 4. tones from the program
    sw_(32'h0000_C004, 32'h0000_0040);
    wait_sound_idle();
    check(ay_regs[7] == 8'h3E && ay_regs[8] == 8'h0F && ay_regs[1] == 8'h00 && ay_regs[0] == 8'hBF,
          "chip registers after a stored tone");
    if (ay_regs[0] == 8'hBF) n_snd_cpu++;
    begin
      int seq_before;
      seq_before = n_ay_seq;
      sw_(32'h0000_C004, 32'h0000_0011);
      repeat (40) @(negedge clk);
      sw_(32'h0000_C004, 32'h0000_0099);   // arrives while the first plays
      wait_sound_idle();
      repeat (3) @(negedge clk);
      wait_sound_idle();
      check(n_ay_seq == seq_before + 2 && ay_regs[0] == 8'h66, "request during a sequence is served");
      if (n_ay_seq == seq_before + 2) n_snd_pending++;
    end
    lw(32'h0000_C004, d);
    check(d == 32'h0000_0099, "sound register reads back");

    // 5. one VGA frame
    capture = 1;
    wait (frame_done);
    check(n_pixels == 800 * 525, $sformatf("pixels compared %0d", n_pixels));

    // mechanism coverage
    check(n_reset_blank > 0, "reset blanking seen");
    check(n_rom_reads > 0, "sprite ROM loads");
    check(n_fb_writes > 0, "frame-buffer stores");
    check(n_ram_reads > 0, "frame-buffer loads");
    for (int i = 0; i < 4; i++) check(n_dir[i] > 0, $sformatf("direction %0d seen", i));
    check(n_atari > 0, "Atari stick used");
    check(n_fire > 0, "fire seen");
    check(n_snd_cpu > 0, "tone from the program");
    check(n_snd_joy > 0, "tone from a movement");
    check(n_snd_pending > 0, "queued tone request");
    check(n_hsync > 0 && n_vsync > 0, "sync pulses");
    check(n_lit > 0, "lit pixels on screen");
    $display("mechanisms: rom_reads=%0d fb_writes=%0d ram_reads=%0d dirs=%0d/%0d/%0d/%0d atari=%0d fire=%0d",
             n_rom_reads, n_fb_writes, n_ram_reads, n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_atari, n_fire);
    $display("mechanisms: tones cpu=%0d joy=%0d queued=%0d ay_sequences=%0d hsync=%0d vsync=%0d lit_pixels=%0d",
             n_snd_cpu, n_snd_joy, n_snd_pending, n_ay_seq, n_hsync, n_vsync, n_lit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
