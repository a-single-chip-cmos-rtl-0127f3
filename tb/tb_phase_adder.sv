// tb_phase_adder: random phases and phase words; the output one clock later
// must be (phase + ptw * 4) mod 2^14.
module tb_phase_adder;
  logic clk = 0, rst_n = 0;
  logic [13:0] phase_in = 0, phase_out, expect_q = 0;
  logic [11:0] ptw = 0;
  int checks = 0, failures = 0;

  phase_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      phase_in = 14'($urandom);
      ptw      = 12'($urandom);
      expect_q = 14'((int'(phase_in) + 4 * int'(ptw)) % 16384);
      @(posedge clk);
      #1;
      checks++;
      if (phase_out !== expect_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
