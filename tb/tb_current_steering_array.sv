// tb_current_steering_array: random thermometer/binary switch settings. Before
// the 0.2 ns turn-on delay the old currents must hold; in the overlap window
// (0.2..0.35 ns) every switching cell conducts to both sides, so ioutp must be
// the mean of old and new; after 0.35 ns ioutp must carry (16 * unary + binary)
// unit currents. ioutp + ioutn must stay at 1023 units at every sample.
module tb_current_steering_array;
  logic [62:0] therm = '0;
  logic [3:0]  bin = '0;
  real iunit = 33.84e-6;
  real ioutp, ioutn;
  int checks = 0, failures = 0;

  current_steering_array dut (.*);

  function automatic bit near(real a, real b);
    real d;
    d = a - b;
    if (d < 0) d = -d;
    return d < 1e-9;
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
    int prev;
    prev = 0;
    #1;
    for (int n = 0; n < 500; n++) begin
      int u, b, e;
      u = $urandom_range(0, 63);
      b = $urandom_range(0, 15);
      therm = (63'(1) << u) - 63'(1);
      if (u == 63) therm = '1;
      bin = 4'(b);
      e = 16 * u + b;
      #0.1ns;
      checks += 2;
      if (!near(ioutp, iunit * prev)) failures++;
      if (!near(ioutp + ioutn, iunit * 1023)) failures++;
      #0.175ns;
      checks += 2;
      if (!near(ioutp, iunit * (prev + e) / 2.0)) begin
        failures++;
        if (failures < 10) $display("overlap: ioutp %g expected %g", ioutp, iunit * (prev + e) / 2.0);
      end
      if (!near(ioutp + ioutn, iunit * 1023)) failures++;
      #0.2ns;
      checks += 2;
      if (!near(ioutp, iunit * e)) begin
        failures++;
        if (failures < 10) $display("code %0d: ioutp %g", e, ioutp);
      end
      if (!near(ioutn, iunit * (1023 - e))) failures++;
      prev = e;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
