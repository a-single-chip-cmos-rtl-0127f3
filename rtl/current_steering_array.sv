// current_steering_array: behavioural model of the DAC's array of
// current-steering cells (analog: the model is not synthesizable).
//
// 63 identical unary cells of 16 LSB currents each and 4 binary-weighted
// cells (1, 2, 4, 8 LSB) each steer their current to ioutp (control bit 1) or
// to ioutn (control bit 0). Every cell is a current_steering_cell, whose
// asymmetric driver closes the new switch before it opens the old one; while
// both are closed the cell's current splits equally between the outputs. So
// ioutp + ioutn is always the full scale of 1023 LSB currents, also during a
// transition. iunit is the LSB current set by the bias generator. The 6/4
// segmentation, the 16-LSB unary weight and the cell behaviour follow the
// published design; ideal matching and equal split are the model's.
// Timing: outputs settle T_OFF (0.35 ns) after the controls change; the first
// change shows after T_ON (0.2 ns).
module current_steering_array #(
  parameter int unsigned N_UNARY = 63,
  parameter int unsigned LSB_W   = 4,
  parameter realtime     T_ON    = 0.2ns,
  parameter realtime     T_OFF   = 0.35ns
) (
  input  logic [N_UNARY-1:0] therm,
  input  logic [LSB_W-1:0]   bin,
  input  real                iunit,
  output real                ioutp,
  output real                ioutn
);

  localparam int unsigned N_CELL = N_UNARY + LSB_W;

  logic [N_CELL-1:0] ctl, sw_p, sw_n;

  assign ctl = {therm, bin};

  for (genvar i = 0; i < N_CELL; i++) begin : g_cell
    current_steering_cell #(.T_ON(T_ON), .T_OFF(T_OFF)) u_cell (
      .d(ctl[i]), .sw_p(sw_p[i]), .sw_n(sw_n[i]));
  end

  // cell weight in LSB currents: binary cells 1, 2, 4, 8; unary cells 16
  function automatic int unsigned weight(int unsigned i);
    return (i < LSB_W) ? (1 << i) : (1 << LSB_W);
  endfunction

  always_comb begin
    real p, n;
    p = 0.0;
    n = 0.0;
    for (int unsigned i = 0; i < N_CELL; i++) begin
      real share_p;
      unique case ({sw_p[i], sw_n[i]})
        2'b10:   share_p = 1.0;
        2'b01:   share_p = 0.0;
        2'b11:   share_p = 0.5;
        default: share_p = 0.0;   // both open: the driver never lets this happen
      endcase
      p += share_p * real'(weight(i));
      n += (({sw_p[i], sw_n[i]} == 2'b00) ? 0.0 : 1.0 - share_p) * real'(weight(i));
    end
    ioutp = iunit * p;
    ioutn = iunit * n;
  end

  // a cell with both switches open would starve its current source
  always @(sw_p or sw_n)
    a_never_both_open: assert ((sw_p | sw_n) == '1 || $time == 0)
      else $error("a current cell has both switches open");

endmodule
