// input_ctrl_reg: the input and control data register behind the 8-bit
// parallel microcontroller interface.
//
// An external controller writes one byte per clock with wr high: addr 0..3
// carry the 32-bit frequency tuning word (least significant byte first in
// address order), addr 4..5 the 12-bit phase tuning word, addr 6 the control
// word (data[2] power-down, data[1:0] waveform, encoding in afg_pkg). Address 7
// is ignored. The bytes collect here without disturbing the running output; a
// separate update strobe copies them into the frequency/phase data register, so
// a new frequency, phase and waveform take effect together.
// The 8-bit width of the interface is the published one; the address map, the
// single-clock write strobe and the assumption that the controller's signals are
// already synchronous to clk are this design's choices.
// Timing: a write on one clock edge is visible on `staged` after that edge.
module input_ctrl_reg
  import afg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [2:0] addr,
  input  logic [7:0] data,
  output tuning_t    staged
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      staged <= '0;
    end else if (wr) begin
      unique case (addr)
        ADDR_FTW0: staged.ftw[7:0]   <= data;
        ADDR_FTW1: staged.ftw[15:8]  <= data;
        ADDR_FTW2: staged.ftw[23:16] <= data;
        ADDR_FTW3: staged.ftw[31:24] <= data;
        ADDR_PTW0: staged.ptw[7:0]   <= data;
        ADDR_PTW1: staged.ptw[11:8]  <= data[3:0];
        ADDR_CTRL: staged.ctrl       <= ctrl_word_t'(data[2:0]);
        default: ;
      endcase
    end
  end

endmodule
