// tb_bias_generator: reference current vref/rext, its mirror copies, and
// power-down forcing all currents to zero.
module tb_bias_generator;
  logic pd = 0;
  real vref = 1.2, rext = 1000.0;
  real iref, iref1, iref2;
  int checks = 0, failures = 0;

  bias_generator dut (.*);

  function automatic bit near(real a, real b);
    real d;
    d = a - b;
    if (d < 0) d = -d;
    return d <= 1e-12 + 1e-9 * (b < 0 ? -b : b);
  endfunction

  // watchdog
  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      pd   = ($urandom_range(0, 3) == 0);
      vref = 1.0 + real'($urandom_range(0, 400)) / 1000.0;
      rext = 500.0 + real'($urandom_range(0, 2000));
      #1;
      checks += 3;
      if (pd) begin
        if (iref != 0.0) failures++;
        if (iref1 != 0.0) failures++;
        if (iref2 != 0.0) failures++;
      end else begin
        if (!near(iref, vref / rext)) failures++;
        if (!near(iref1, 0.0282 * vref / rext)) failures++;
        if (!near(iref2, vref / rext)) failures++;
      end
    end
    // default operating point: 1.2 V over 1 kohm gives a 33.84 uA LSB
    pd = 0; vref = 1.2; rext = 1000.0;
    #1;
    checks++;
    if (!near(iref1, 33.84e-6)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
