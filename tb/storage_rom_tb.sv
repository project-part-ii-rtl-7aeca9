// storage_rom_tb: checks the default sprite ROM contents and read latency.
//
// The expected ghost sprite is drawn below as text, one character per pixel
// (M magenta 101, W white 111, K black 000, '.' background 000) and turned
// into words here, leftmost pixel in the top nibble. Words 0..7 must hold it,
// every other word must be zero, and each word must appear one clock after
// its address.
module storage_rom_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  addr;
  logic [31:0] rdata;

  storage_rom dut (.*);

  string ghost [8] = '{
    "..MMMM..",
    ".MMMMMM.",
    "MMWWMWWM",
    "MMWKMWKM",
    "MMMMMMMM",
    "MMMMMMMM",
    "MM.M.MM.",
    "M..M.M.."
  };

  function automatic logic [31:0] line_word(string s);
    logic [31:0] w = '0;
    for (int i = 0; i < 8; i++) begin
      logic [3:0] nib;
      case (s[i])
        "M": nib = 4'h5;
        "W": nib = 4'h7;
        default: nib = 4'h0;
      endcase
      w = {w[27:0], nib};
    end
    return w;
  endfunction

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    addr = 8'd255;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      logic [31:0] exp;
      exp = (i < 8) ? line_word(ghost[i]) : 32'd0;
      addr = 8'(i);
      @(negedge clk);
      check(rdata == exp, $sformatf("word %0d = %h, expected %h", i, rdata, exp));
    end
    // latency: the word changes on the first edge after the address
    addr = 8'd2;
    @(negedge clk);
    addr = 8'd3;
    #1 check(rdata == line_word(ghost[2]), "old word held before the edge");
    @(negedge clk);
    check(rdata == line_word(ghost[3]), "new word one clock later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
