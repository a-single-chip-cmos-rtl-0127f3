// tb_phase_to_amp: random phase steps and waveform switches. Each output is
// compared, seven clocks after its phase entered, with a model: sine from
// $sin (1 LSB allowed), triangle and saw-tooth bit-exact from the phase, random
// from a separate model of the x^23 + x^18 + 1 sequence. Every waveform and
// every switch between two different waveforms must occur.
module tb_phase_to_amp;
  import afg_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int LAT = 7;
  localparam int NCYC = 8000;
  logic clk = 0, rst_n = 0;
  logic [13:0] phase = 0;
  wave_e wave = WAVE_SINE;
  logic [9:0] sample;
  int checks = 0, failures = 0;
  int ph_h [NCYC + 16];
  int wv_h [NCYC + 16];
  logic [22:0] lf_h [NCYC + 16];
  logic [22:0] lf = 23'h5A5A5;
  int edge_n = 0;
  int mode_cnt [4];
  int switches = 0;

  phase_to_amp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [22:0] step10(logic [22:0] s);
    for (int i = 0; i < 10; i++) s = {s[21:0], s[22] ^ s[17]};
    return s;
  endfunction

  function automatic int ref_sine(int p);
    real s;
    int  m;
    s = $sin((real'(p) + 0.5) * PI / 8192.0);
    m = int'($floor(511.0 * (s < 0 ? -s : s) + 0.5));
    return (s >= 0.0) ? 512 + m : 511 - m;
  endfunction

  // edge numbers count from the first edge with reset released
  always @(posedge clk) begin
    if (rst_n) begin
      edge_n <= edge_n + 1;
      ph_h[edge_n] <= int'(phase);
      wv_h[edge_n] <= int'(wave);
      lf = step10(lf);
      lf_h[edge_n] <= lf;
    end
  end

  initial begin
    int p;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    p = 0;
    for (int n = 0; n < NCYC; n++) begin
      int e, got, d, w;
      logic [13:0] ph;
      p = (p + $urandom_range(0, 40)) % 16384;
      phase = 14'(p);
      if ($urandom_range(0, 199) == 0) wave = wave_e'($urandom_range(0, 3));
      @(posedge clk);
      #1;
      if (edge_n > LAT) begin
        int k;
        k  = edge_n - LAT;          // edge that sampled the phase
        ph = 14'(ph_h[k]);
        w  = wv_h[k];
        case (w)
          0: e = ref_sine(ph_h[k]);
          1: e = ph[13] ? int'(10'(~ph[12:3])) : int'(ph[12:3]);
          2: e = int'(ph[13:4]);
          default: e = int'(lf_h[edge_n - 3][9:0]);
        endcase
        if (k > 0 && wv_h[k] != wv_h[k-1]) switches++;
        mode_cnt[w]++;
        got = int'(sample);
        d = got - e;
        if (d < 0) d = -d;
        checks++;
        if (d > ((w == 0) ? 1 : 0)) begin
          failures++;
          if (failures < 10) $display("edge %0d wave %0d phase %0d: %0d expected %0d",
                                      edge_n, w, ph, got, e);
        end
      end
      @(negedge clk);
    end
    foreach (mode_cnt[i]) begin
      checks++;
      if (mode_cnt[i] == 0) begin
        failures++;
        $display("waveform %0d never selected", i);
      end
    end
    checks++;
    if (switches == 0) failures++;
    $display("samples per waveform %0d %0d %0d %0d, switches %0d",
             mode_cnt[0], mode_cnt[1], mode_cnt[2], mode_cnt[3], switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
