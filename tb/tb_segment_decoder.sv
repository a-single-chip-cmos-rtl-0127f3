// tb_segment_decoder: all 1024 codes; the thermometer code must hold exactly
// code[9:4] ones, packed at the bottom, and the LSBs must pass unchanged.
module tb_segment_decoder;
  logic [9:0]  code;
  logic [62:0] therm;
  logic [3:0]  bin;
  int checks = 0, failures = 0;

  segment_decoder dut (.*);

  // watchdog
  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1024; c++) begin
      logic [62:0] e;
      code = 10'(c);
      #1;
      e = '0;
      for (int i = 0; i < (c >> 4); i++) e[i] = 1'b1;
      checks++;
      if (therm !== e || bin !== 4'(c)) begin
        failures++;
        if (failures < 10) $display("code %0d: therm %h bin %h", c, therm, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
