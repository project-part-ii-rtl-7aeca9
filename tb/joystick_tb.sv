// joystick_tb: checks the direction register.
//
// Every one of the 16 input patterns is applied, in random order and
// repeatedly. Three clocks later the register must hold the code of the
// lowest-numbered held direction (up 0001, right 0010, down 0100, left 1000)
// or 0000, worked out here by isolating the lowest set bit. The moved pulse
// must come exactly once, one clock after the register takes a new non-zero
// code, and never otherwise. Reset must clear the register.
module joystick_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [3:0] dir_in, joy_value;
  logic       moved;

  joystick dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [3:0] lowest(logic [3:0] v);
    return v & (~v + 4'd1);
  endfunction

  int moved_cnt;
  logic [3:0] prev_code;

  initial begin
    dir_in = 4'b0100;
    repeat (3) @(negedge clk);
    check(joy_value == 4'b0000 && !moved, "reset clears the register");
    rst = 0;
    repeat (6) @(negedge clk);
    prev_code = 4'b0100;
    for (int n = 0; n < 400; n++) begin
      logic [3:0] v, exp;
      v = (n < 16) ? 4'(n) : 4'($urandom);
      exp = lowest(v);
      dir_in = v;
      moved_cnt = 0;
      for (int c = 0; c < 6; c++) begin
        @(negedge clk);
        if (moved) moved_cnt++;
        if (c == 1) check(joy_value == prev_code, "value not yet changed after 2 clocks");
        if (c == 2) check(joy_value == exp, $sformatf("input %b gives %b, expected %b", v, joy_value, exp));
        if (c == 3) check(moved == (exp != prev_code && exp != 0), "moved one clock after the change");
      end
      check(moved_cnt == ((exp != prev_code && exp != 0) ? 1 : 0), "moved pulse count");
      prev_code = exp;
    end
    rst = 1;
    @(negedge clk);
    check(joy_value == 4'b0000, "reset clears again");
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
