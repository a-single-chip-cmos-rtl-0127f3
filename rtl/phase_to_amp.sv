// phase_to_amp: phase-to-amplitude converter with waveform selection.
//
// From the 14-bit modulated phase it produces one 10-bit offset-binary sample
// per clock, of the waveform the control word selects:
//   sine      - quarter-wave sine lookup (sine_lut)
//   ramp      - triangle: phase[12:3] while phase[13] is 0, its complement after
//   saw-tooth - phase[13:4], rising through the period and jumping back
//   random    - 10 bits of an LFSR, new every clock
// Ramp and saw-tooth come straight from the phase, as published; which of the
// two names the triangle is this design's reading. The waveform select is
// delayed with the phase through the sine lookup so all four paths line up.
// The selected sample goes through an output register and then a strobe latch
// that drives the 10-bit digital output and the DAC.
// Timing: seven register stages from phase to sample (five in the sine lookup,
// the selection register, the output latch).
module phase_to_amp #(
  parameter int unsigned PHASE_W = 14,
  parameter int unsigned AMP_W   = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase,
  input  afg_pkg::wave_e     wave,
  output logic [AMP_W-1:0]   sample
);

  localparam int unsigned LUT_LAT = 5;

  logic [AMP_W-1:0] sine_s, noise_s, ramp_s, saw_s, sel_s;

  sine_lut #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_sine (
    .clk(clk), .rst_n(rst_n), .phase(phase), .sample(sine_s));

  lfsr_noise #(.OUT_W(AMP_W)) u_noise (
    .clk(clk), .rst_n(rst_n), .sample(noise_s));

  // phase and waveform select delayed to line up with the sine lookup
  logic [LUT_LAT-1:0][PHASE_W-1:0] ph_d;
  afg_pkg::wave_e                  wave_d [LUT_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_d <= '0;
      for (int i = 0; i < LUT_LAT; i++) wave_d[i] <= afg_pkg::WAVE_SINE;
    end else begin
      ph_d[0]   <= phase;
      wave_d[0] <= wave;
      for (int i = 1; i < LUT_LAT; i++) begin
        ph_d[i]   <= ph_d[i-1];
        wave_d[i] <= wave_d[i-1];
      end
    end
  end

  logic [PHASE_W-1:0] ph;
  assign ph = ph_d[LUT_LAT-1];

  always_comb begin
    saw_s  = ph[PHASE_W-1 -: AMP_W];
    ramp_s = ph[PHASE_W-1] ? ~ph[PHASE_W-2 -: AMP_W] : ph[PHASE_W-2 -: AMP_W];
    unique case (wave_d[LUT_LAT-1])
      afg_pkg::WAVE_SINE:   sel_s = sine_s;
      afg_pkg::WAVE_RAMP:   sel_s = ramp_s;
      afg_pkg::WAVE_SAW:    sel_s = saw_s;
      afg_pkg::WAVE_RANDOM: sel_s = noise_s;
      default:     sel_s = sine_s;
    endcase
  end

  logic [AMP_W-1:0] sel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= '0;
      sample <= '0;
    end else begin
      sel_q  <= sel_s;
      sample <= sel_q;   // output strobe latch
    end
  end

endmodule
