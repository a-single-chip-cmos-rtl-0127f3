// tb_afg_spectrum: spectral purity of the generated sine, at a 100 MHz clock,
// for output frequencies across the band (about 2, 10, 25 and 35 MHz).
//
// For each frequency the chip is programmed over its bus, then 4096
// consecutive samples of the differential DAC current ioutp - ioutn are taken
// mid-cycle. The tuning word is k * 2^20, so exactly k periods fit in the
// record and no window is needed. A direct DFT gives the power in every bin;
// the spurious-free dynamic range is the fundamental over the largest other
// bin (dc excluded). Each must exceed 45 dBc, the figure measured on the
// original chip; with ideal current cells the result reflects only the 10-bit
// amplitude quantization and the sine approximation, so it comes out far
// higher. Also checks that the fundamental lands in bin k.
module tb_afg_spectrum;
  localparam int  N  = 4096;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, wr = 0, update = 0;
  logic [2:0] addr = '0;
  logic [7:0] data = '0;
  logic [9:0] dout;
  real vref = 1.2, rext = 1000.0;
  real ioutp, ioutn, iref, iref2;
  int checks = 0, failures = 0;

  afg_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk);
    wr = 1; addr = a; data = d;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic program_sine(input logic [31:0] ftw);
    bus_write(3'd0, ftw[7:0]);
    bus_write(3'd1, ftw[15:8]);
    bus_write(3'd2, ftw[23:16]);
    bus_write(3'd3, ftw[31:24]);
    bus_write(3'd4, 8'h00);
    bus_write(3'd5, 8'h00);
    bus_write(3'd6, 8'h00);
    @(negedge clk);
    update = 1;
    @(negedge clk);
    update = 0;
  endtask

  real x [N];
  real ct [N];
  real st [N];

  initial begin
    int ks [4];
    ks = '{83, 411, 1023, 1433};
    for (int i = 0; i < N; i++) begin
      ct[i] = $cos(2.0 * PI * real'(i) / real'(N));
      st[i] = $sin(2.0 * PI * real'(i) / real'(N));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ks[j]) begin
      int  k, peak_bin, spur_bin;
      real pk, sp, sfdr;
      k = ks[j];
      program_sine(32'(k) << 20);
      repeat (40) @(posedge clk);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        x[i] = ioutp - ioutn;
      end
      pk = 0.0; sp = 0.0; peak_bin = 0; spur_bin = 0;
      for (int b = 1; b <= N / 2; b++) begin
        real re, im, pw;
        re = 0.0; im = 0.0;
        for (int i = 0; i < N; i++) begin
          int idx;
          idx = (b * i) % N;
          re += x[i] * ct[idx];
          im -= x[i] * st[idx];
        end
        pw = re * re + im * im;
        if (pw > pk) begin
          if (pk > sp) begin sp = pk; spur_bin = peak_bin; end
          pk = pw; peak_bin = b;
        end else if (pw > sp) begin
          sp = pw; spur_bin = b;
        end
      end
      sfdr = 10.0 * $log10(pk / sp);
      $display("f_out = %0.3f MHz: fundamental in bin %0d, largest spur in bin %0d, SFDR %0.1f dBc",
               100.0 * real'(k) / real'(N), peak_bin, spur_bin, sfdr);
      checks += 2;
      if (peak_bin != k) failures++;
      if (sfdr < 45.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
