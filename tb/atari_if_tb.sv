// atari_if_tb: checks the CX40 input stage.
//
// Each pin is active low. For all 32 pin patterns and then random ones the
// testbench expects, one clock later, dir = {left, down, right, up} and fire
// as the inverted pins, and all zero during reset.
module atari_if_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic up_n, down_n, left_n, right_n, fire_n, fire;
  logic [3:0] dir;

  atari_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [4:0] prev;

  initial begin
    {up_n, down_n, left_n, right_n, fire_n} = 5'b00000;
    repeat (2) @(negedge clk);
    check(dir == 4'b0000 && !fire, "reset clears outputs");
    rst = 0;
    prev = '0;
    for (int n = 0; n < 300; n++) begin
      logic [4:0] p;
      p = (n < 32) ? 5'(n) : 5'($urandom);
      {up_n, down_n, left_n, right_n, fire_n} = p;
      #1 check({dir, fire} == prev, "outputs wait for the clock");
      @(negedge clk);
      prev = {dir, fire};
      check(dir[0] == !up_n,    "up");
      check(dir[1] == !right_n, "right");
      check(dir[2] == !down_n,  "down");
      check(dir[3] == !left_n,  "left");
      check(fire == !fire_n,    "fire");
    end
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
