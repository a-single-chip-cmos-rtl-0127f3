// tb_freq_phase_reg: random staged words and update strobes; the active word
// must change exactly on an update edge and hold otherwise.
module tb_freq_phase_reg;
  import afg_pkg::*;
  logic clk = 0, rst_n = 0, update = 0;
  tuning_t staged = '0, active, model = '0;
  int checks = 0, failures = 0, loads = 0;

  freq_phase_reg dut (.*);

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
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      staged = {32'($urandom), 12'($urandom), 3'($urandom)};
      update = ($urandom_range(0, 4) == 0);
      if (update) begin
        model = staged;
        loads++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (active !== model) failures++;
    end
    checks++;
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
