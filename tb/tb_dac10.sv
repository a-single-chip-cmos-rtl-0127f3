// tb_dac10: random codes into the DAC; two clocks plus the switch delay later
// ioutp must be code * LSB current and ioutn the complement to 1023 LSBs
// (LSB = 1.2 V / 1 kohm * 0.0282 = 33.84 uA); power-down must zero the currents.
module tb_dac10;
  logic clk = 0, rst_n = 0, pd = 0;
  logic [9:0] din = 0;
  real vref = 1.2, rext = 1000.0;
  real ioutp, ioutn, iref, iref2;
  int q [$];
  int checks = 0, failures = 0, pd_cycles = 0;
  localparam real ILSB = 1.2 / 1000.0 * 0.0282;

  dac10 dut (.*);

  always #5 clk = ~clk;

  function automatic bit near(real a, real b);
    real d;
    d = a - b;
    if (d < 0) d = -d;
    return d < 1e-9;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    q = {0};
    for (int n = 0; n < 3000; n++) begin
      int e;
      @(negedge clk);
      din = 10'($urandom);
      pd  = (n % 500) >= 450;
      q.push_back(int'(din));
      @(posedge clk);
      #1;
      e = q.pop_front();
      checks += 2;
      if (pd) begin
        pd_cycles++;
        if (ioutp != 0.0 || ioutn != 0.0) failures++;
        if (iref != 0.0) failures++;
      end else begin
        if (!near(ioutp, ILSB * e) || !near(ioutn, ILSB * (1023 - e))) begin
          failures++;
          if (failures < 10) $display("code %0d: ioutp %g", e, ioutp);
        end
        if (!near(iref, 1.2e-3) || !near(iref2, 1.2e-3)) failures++;
      end
    end
    checks++;
    if (pd_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
