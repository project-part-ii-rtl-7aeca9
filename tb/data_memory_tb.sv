// data_memory_tb: random traffic on both ports of the 8K-word data RAM.
//
// Port A (CPU) performs random stores and loads over the whole RAM while
// port B (display) reads random addresses with a random enable. A shadow
// array predicts every load: data one clock after the address, the old word
// when a load hits the word being stored on the same edge, and port B
// holding its last word while its enable is low. The first and last words
// and a frame-buffer word are also written and read explicitly.
module data_memory_tb;
  localparam int DEPTH = 8192;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        a_we, b_en;
  logic [12:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_rdata;

  data_memory dut (.*);

  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [31:0] exp_a, exp_b;
  bit          a_valid = 0, b_valid = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    a_we = 0; b_en = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    @(negedge clk);
    // every word starts at zero
    for (int i = 0; i < DEPTH; i += 97) begin
      a_addr = 13'(i);
      @(negedge clk);
      check(a_rdata == 32'd0, "initial zero");
    end
    for (int n = 0; n < 40000; n++) begin
      a_we    = ($urandom % 2) == 0;
      a_addr  = (n < 3) ? 13'((n == 0) ? 0 : (n == 1) ? DEPTH - 1 : 7999) : 13'($urandom);
      a_wdata = $urandom;
      b_en    = ($urandom % 4) != 0;
      b_addr  = ($urandom % 3 == 0) ? a_addr : 13'($urandom);
      @(posedge clk);
      exp_a = shadow[a_addr];
      if (b_en) begin exp_b = shadow[b_addr]; b_valid = 1; end
      if (a_we) shadow[a_addr] = a_wdata;
      a_valid = 1;
      @(negedge clk);
      check(a_rdata == exp_a, $sformatf("port A addr %0d", a_addr));
      if (b_valid) check(b_rdata == exp_b, $sformatf("port B addr %0d", b_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
