// sine_lut: 14-bit phase to 10-bit sine sample, using quarter-wave symmetry
// and modified Sunderland ROM compression.
//
// The phase MSB is the sign of the sine; the next bit says whether the phase
// runs up or down through the quarter wave, in which case the 12 remaining
// bits are complemented. The folded 12-bit phase {A,B,C} (4 bits each)
// addresses a coarse ROM with {A,B} and a signed fine ROM, in quarter LSBs,
// with {A[3:2],C}; 4 * coarse + fine, rounded to 9 bits and clipped to 511, is
// the magnitude (within 1 LSB of the ideal sine). The sign then turns it into an offset-binary
// sample: 512 + m for the positive half wave, 511 - m for the negative one, so
// the wave is symmetric about mid-scale 511.5. Sign handling and the
// complementing follow the published folding; the ROM split, the half-step
// phase offset that makes folding exact, and the pipeline cuts are this design's.
// The ROMs hold 256x9 + 64x4 = 2560 bits against 16384x10 for a full-wave
// table: the published 64:1 compression.
// Timing: five register stages (fold, ROM read, sum, round, sign).
module sine_lut #(
  parameter int unsigned PHASE_W = 14,
  parameter int unsigned AMP_W   = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase,
  output logic [AMP_W-1:0]   sample
);

  localparam int unsigned Q_W   = PHASE_W - 2;   // quarter-wave phase, 12
  localparam int unsigned MAG_W = AMP_W - 1;     // magnitude, 9
  localparam int unsigned CO_W  = MAG_W;         // coarse ROM word, 9
  localparam int unsigned FI_W  = 4;             // fine ROM word
  localparam int unsigned SUM_W = CO_W + 3;
  localparam logic [MAG_W-1:0] MAG_MAX = '1;

  // stage 1: quadrant folding
  logic [Q_W-1:0] q1;
  logic [4:1]     sign;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1      <= '0;
      sign[1] <= 1'b0;
    end else begin
      q1      <= phase[PHASE_W-2] ? ~phase[Q_W-1:0] : phase[Q_W-1:0];
      sign[1] <= phase[PHASE_W-1];
    end
  end

  // stage 2: ROM reads ({A,B} and {A[3:2],C})
  logic        [CO_W-1:0] coarse;
  logic signed [FI_W-1:0] fine;
  sine_coarse_rom #(.ADDR_W(8), .DATA_W(CO_W)) u_coarse (
    .clk(clk), .addr({q1[11:8], q1[7:4]}), .data(coarse));
  sine_fine_rom #(.ADDR_W(6), .DATA_W(FI_W)) u_fine (
    .clk(clk), .addr({q1[11:10], q1[3:0]}), .data(fine));

  // stage 3: 4 * coarse + fine, in quarter LSBs
  logic signed [SUM_W-1:0] sum3;
  // stage 4: rounded, clipped magnitude
  logic [MAG_W-1:0] mag4;
  logic signed [SUM_W-1:0] rounded;

  always_comb rounded = (sum3 + $signed(SUM_W'(2))) >>> 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sign[4:2] <= '0;
      sum3      <= '0;
      mag4      <= '0;
      sample    <= '0;
    end else begin
      sign[4:2] <= sign[3:1];
      sum3      <= $signed({1'b0, coarse, 2'b00}) + SUM_W'(fine);
      if (rounded < 0)                               mag4 <= '0;
      else if (rounded > $signed({3'b000, MAG_MAX})) mag4 <= MAG_MAX;
      else                                           mag4 <= rounded[MAG_W-1:0];
      sample <= sign[4] ? {1'b0, ~mag4} : {1'b1, mag4};
    end
  end

endmodule
