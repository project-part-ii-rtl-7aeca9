// instr_mem_tb: loads a 16-word program image and fetches it by pc.
//
// The image (instr_mem_tb.hex) is read a second time into the testbench's
// own array. Every pc = 4*i must return word i one clock later, the two low
// pc bits must not matter, and words beyond the image must read as zero.
module instr_mem_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] pc, instr;

  instr_mem #(.INIT_FILE("tb/instr_mem_tb.hex")) dut (.*);

  logic [31:0] image [16];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    $readmemh("tb/instr_mem_tb.hex", image);
    pc = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      pc = 32'(4 * i) | 32'($urandom % 4);
      @(negedge clk);
      check(instr == ((i < 16) ? image[i] : 32'd0), $sformatf("pc %0d", pc));
    end
    for (int i = 0; i < 200; i++) begin
      int k;
      k = $urandom % 1024;
      pc = 32'(4 * k);
      @(negedge clk);
      check(instr == ((k < 16) ? image[k] : 32'd0), $sformatf("pc %0d", pc));
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
