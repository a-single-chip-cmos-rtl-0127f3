// phase_accumulator: pipelined 32-bit phase accumulator.
//
// Every clock the accumulator adds the frequency tuning word to its phase, so
// the output frequency is f_clk * ftw / 2^32 (0.0233 Hz steps at 100 MHz). To
// run at the full clock rate the 32-bit addition is cut into SEG_W-bit segments
// with a registered carry between them: segment k works k clocks behind segment
// 0, the tuning word is skewed by k clocks to meet it, and the sums are
// de-skewed again before the top OUT_W phase bits leave. The 32-bit width and
// the 14 output bits are published; the segment width is this design's choice,
// picked so that the whole DDS path has the published 19 register stages.
// Timing: a new ftw first changes the output N_SEG = ACC_W/SEG_W clocks later;
// in steady state the output advances by ftw every clock. Reset clears the
// phase to 0. The carry out of the top segment and the low ACC_W-OUT_W bits of
// the de-skewed sum are left unused on purpose: the phase wraps modulo 2^32
// and only the top bits are converted (synthesis removes their registers).
module phase_accumulator #(
  parameter int unsigned ACC_W = 32,
  parameter int unsigned SEG_W = 4,
  parameter int unsigned OUT_W = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] ftw,
  output logic [OUT_W-1:0] phase
);

  localparam int unsigned N_SEG = ACC_W / SEG_W;

  logic [N_SEG-1:0][SEG_W-1:0] acc;
  logic [N_SEG-1:0]            carry;
  logic [ACC_W-1:0]            aligned;

  for (genvar k = 0; k < N_SEG; k++) begin : g_seg
    logic [SEG_W-1:0] inc;
    logic             cin;

    // tuning word skew: k registers for segment k
    if (k == 0) begin : g_noskew
      assign inc = ftw[SEG_W-1:0];
    end else begin : g_skew
      // sk[j]: segment k of the tuning word after j+1 delay registers
      logic [k-1:0][SEG_W-1:0] sk;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          sk <= '0;
        end else begin
          sk[0] <= ftw[k*SEG_W +: SEG_W];
          for (int j = 1; j < k; j++) sk[j] <= sk[j-1];
        end
      end
      assign inc = sk[k-1];
    end

    assign cin = (k == 0) ? 1'b0 : carry[(k == 0) ? 0 : k-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) {carry[k], acc[k]} <= '0;
      else        {carry[k], acc[k]} <= {1'b0, acc[k]} + {1'b0, inc} + (SEG_W+1)'(cin);
    end

    // output de-skew: N_SEG-1-k registers for segment k
    if (k == N_SEG - 1) begin : g_nodeskew
      assign aligned[k*SEG_W +: SEG_W] = acc[k];
    end else begin : g_deskew
      // ds[j]: segment k of the sum after j+1 further registers
      logic [N_SEG-2-k:0][SEG_W-1:0] ds;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          ds <= '0;
        end else begin
          ds[0] <= acc[k];
          for (int j = 1; j < N_SEG - 1 - k; j++) ds[j] <= ds[j-1];
        end
      end
      assign aligned[k*SEG_W +: SEG_W] = ds[N_SEG-2-k];
    end
  end

  assign phase = aligned[ACC_W-1 -: OUT_W];

endmodule
