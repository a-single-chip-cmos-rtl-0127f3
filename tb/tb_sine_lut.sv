// tb_sine_lut: all 16384 phases, one per clock, against
// 511.5 + 511 * sin((p + 0.5) * pi / 8192) computed with $sin over the full
// circle (no folding), allowed error 1 LSB. Also checks the five-clock latency,
// the mid-scale symmetry between the half waves and the use of all four quadrants.
module tb_sine_lut;
  localparam real PI = 3.14159265358979323846;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  logic [13:0] phase = 0;
  logic [9:0]  sample;
  int exp_q [$];
  int checks = 0, failures = 0, maxerr = 0, quad_seen = 0;

  sine_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sample(int p);
    real s;
    int  m;
    s = $sin((real'(p) + 0.5) * PI / 8192.0);
    m = int'($floor(511.0 * (s < 0 ? -s : s) + 0.5));
    return (s >= 0.0) ? 512 + m : 511 - m;
  endfunction

  initial begin
    int got [16384];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: a step from phase 0 to phase 4096 (top of the sine)
    @(negedge clk);
    phase = 14'd4096;
    for (int i = 1; i <= LAT + 2; i++) begin
      @(posedge clk);
      #1;
      if (sample > 10'd1000) begin
        checks++;
        if (i != LAT) begin
          failures++;
          $display("latency %0d expected %0d", i, LAT);
        end
        break;
      end
    end
    for (int p = 0; p < 16384 + LAT - 1; p++) begin
      @(negedge clk);
      if (p < 16384) begin
        phase = 14'(p);
        exp_q.push_back(ref_sample(p));
      end
      @(posedge clk);
      #1;
      if (p >= LAT - 1) begin
        int e, d;
        e = exp_q.pop_front();
        d = int'(sample) - e;
        if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        got[p - LAT + 1] = int'(sample);
        quad_seen |= 1 << ((p - LAT + 1) >> 12);
        checks++;
        if (d > 1) begin
          failures++;
          if (failures < 10) $display("phase %0d: %0d expected %0d", p - LAT + 1, sample, e);
        end
      end
    end
    // half-wave symmetry: s(p + 8192) = 1023 - s(p)
    for (int p = 0; p < 8192; p++) begin
      checks++;
      if (got[p + 8192] != 1023 - got[p]) begin
        failures++;
        if (failures < 10) $display("asymmetry at phase %0d: %0d, %0d", p, got[p], got[p + 8192]);
      end
    end
    checks++;
    if (quad_seen != 15) failures++;
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
