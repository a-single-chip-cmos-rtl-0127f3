// tb_input_ctrl_reg: random byte writes over the 8-bit interface; after each
// write the staged frequency, phase and control words are compared with a
// model assembled in the testbench.
module tb_input_ctrl_reg;
  import afg_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [2:0] addr = '0;
  logic [7:0] data = '0;
  tuning_t staged;
  logic [31:0] m_ftw = 0;
  logic [11:0] m_ptw = 0;
  logic [2:0]  m_ctrl = 0;
  int checks = 0, failures = 0;

  input_ctrl_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (staged !== '0) failures++;
    checks++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr   = ($urandom_range(0, 3) != 0);
      addr = 3'($urandom_range(0, 7));
      data = 8'($urandom);
      if (wr) begin
        case (addr)
          3'd0: m_ftw[7:0]   = data;
          3'd1: m_ftw[15:8]  = data;
          3'd2: m_ftw[23:16] = data;
          3'd3: m_ftw[31:24] = data;
          3'd4: m_ptw[7:0]   = data;
          3'd5: m_ptw[11:8]  = data[3:0];
          3'd6: m_ctrl       = data[2:0];
          default: ;
        endcase
      end
      @(posedge clk);
      #1;
      checks++;
      if (staged.ftw !== m_ftw || staged.ptw !== m_ptw || 3'(staged.ctrl) !== m_ctrl) begin
        failures++;
        if (failures < 10) $display("mismatch: ftw %h/%h ptw %h/%h ctrl %h/%h",
                                    staged.ftw, m_ftw, staged.ptw, m_ptw, staged.ctrl, m_ctrl);
      end
    end
    wr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
