// tb_dac_digital: random codes; the switch controls two clocks later must
// encode the code (16 * ones(therm) + bin) with a valid thermometer pattern.
module tb_dac_digital;
  logic clk = 0, rst_n = 0;
  logic [9:0]  din = 0;
  logic [62:0] therm;
  logic [3:0]  bin;
  int q [$];
  int checks = 0, failures = 0;

  dac_digital dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (therm !== '0 || bin !== '0) failures++;
    rst_n = 1;
    q = {0};
    for (int n = 0; n < 3000; n++) begin
      int e, ones;
      @(negedge clk);
      din = 10'($urandom);
      q.push_back(int'(din));
      @(posedge clk);
      #1;
      e = q.pop_front();
      ones = $countones(therm);
      checks++;
      if (16 * ones + int'(bin) != e || therm != (63'(1) << ones) - 63'(1)) begin
        failures++;
        if (failures < 10) $display("code %0d: ones %0d bin %0d", e, ones, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
