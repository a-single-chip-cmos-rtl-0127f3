// afg_pkg: types and constants shared by the function generator blocks.
//
// The DDS works on a 32-bit phase, of which the 14 most significant bits reach
// the phase-to-amplitude converter; a 12-bit phase tuning word adds phase
// modulation and every waveform leaves as a 10-bit offset-binary sample. These
// widths are the published ones. The waveform encoding in the control word and
// the position of the power-down bit are this design's own choice.
package afg_pkg;

  localparam int unsigned ACC_W   = 32;  // phase accumulator / frequency tuning word
  localparam int unsigned PHASE_W = 14;  // phase bits used for amplitude conversion
  localparam int unsigned PTW_W   = 12;  // phase tuning word
  localparam int unsigned AMP_W   = 10;  // output sample width (DAC resolution)

  // Waveform selection carried in the control word.
  typedef enum logic [1:0] {
    WAVE_SINE   = 2'd0,
    WAVE_RAMP   = 2'd1,  // triangle: rises for half a period, falls for the other half
    WAVE_SAW    = 2'd2,  // saw-tooth: rises for a whole period, then jumps back
    WAVE_RANDOM = 2'd3
  } wave_e;

  // Control word: bit 2 power-down, bits 1:0 waveform.
  typedef struct packed {
    logic  pd;
    wave_e wave;
  } ctrl_word_t;

  // Everything the frequency/phase data register hands to the DDS.
  typedef struct packed {
    logic [ACC_W-1:0] ftw;
    logic [PTW_W-1:0] ptw;
    ctrl_word_t       ctrl;
  } tuning_t;

  // Register addresses of the 8-bit microcontroller interface.
  localparam logic [2:0] ADDR_FTW0 = 3'd0;  // FTW[7:0]
  localparam logic [2:0] ADDR_FTW1 = 3'd1;  // FTW[15:8]
  localparam logic [2:0] ADDR_FTW2 = 3'd2;  // FTW[23:16]
  localparam logic [2:0] ADDR_FTW3 = 3'd3;  // FTW[31:24]
  localparam logic [2:0] ADDR_PTW0 = 3'd4;  // PTW[7:0]
  localparam logic [2:0] ADDR_PTW1 = 3'd5;  // PTW[11:8] in data[3:0]
  localparam logic [2:0] ADDR_CTRL = 3'd6;  // data[2] = pd, data[1:0] = waveform

endpackage
