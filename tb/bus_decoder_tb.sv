// bus_decoder_tb: checks the CPU address map and the load return path.
//
// Stand-in RAM and ROM models return a word derived from their address one
// clock later. Random byte addresses across the 64 KiB decoded space are
// issued, loads and stores mixed; the testbench checks which strobe fires
// for a store (RAM below 0x8000, sound at 0xC004, none for the ROM and the
// joystick), the word index given to each memory, and that each load
// returns, one clock later, the RAM word, the ROM word, the joystick code
// or {busy, tone} according to the address.
module bus_decoder_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata, ram_wdata, ram_rdata, rom_rdata;
  logic        cpu_we, ram_we, sound_we, sound_busy;
  logic [12:0] ram_addr;
  logic [7:0]  rom_addr, sound_wdata, sound_tone;
  logic [3:0]  joy_value;

  bus_decoder dut (.*);

  always @(posedge clk) ram_rdata <= {19'h5_0000, ram_addr};
  always @(posedge clk) rom_rdata <= {24'hA0_0000, rom_addr};

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int kinds [4] = '{0, 0, 0, 0};

  initial begin
    cpu_addr = 0; cpu_we = 0; cpu_wdata = 0;
    joy_value = 0; sound_tone = 0; sound_busy = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] a, exp;
      logic [3:0] jv;
      logic [7:0] st;
      logic sb;
      int kind;
      case ($urandom % 4)
        0: a = {16'($urandom), 1'b0, 15'($urandom)};
        1: a = {16'($urandom), 2'b10, 14'($urandom)};
        2: a = 32'h0000_C000;
        default: a = 32'h0000_C004;
      endcase
      a[1:0] = 2'b00;
      jv = 4'(1 << ($urandom % 4));
      st = 8'($urandom);
      sb = 1'($urandom);
      cpu_addr = a; cpu_we = 1'($urandom); cpu_wdata = $urandom;
      joy_value = jv; sound_tone = st; sound_busy = sb;
      #1;
      kind = !a[15] ? 0 : !a[14] ? 1 : (a[15:0] == 16'hC000) ? 2 : 3;
      kinds[kind]++;
      check(ram_we == (cpu_we && kind == 0), "RAM store strobe");
      check(sound_we == (cpu_we && kind == 3), "sound store strobe");
      if (kind == 0) check(ram_addr == a[14:2] && ram_wdata == cpu_wdata, "RAM word index and data");
      if (kind == 1) check(rom_addr == a[9:2], "ROM word index");
      if (kind == 3) check(sound_wdata == cpu_wdata[7:0], "sound data");
      case (kind)
        0: exp = {19'h5_0000, a[14:2]};
        1: exp = {24'hA0_0000, a[9:2]};
        2: exp = {28'd0, jv};
        default: exp = {23'd0, sb, st};
      endcase
      @(negedge clk);
      cpu_we = 0;
      joy_value = ~jv; sound_tone = ~st;   // later changes must not show
      #1 check(cpu_rdata == exp, $sformatf("load from %h returned %h, expected %h", a, cpu_rdata, exp));
    end
    check(kinds[0] > 0 && kinds[1] > 0 && kinds[2] > 0 && kinds[3] > 0, "all targets used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
