// tb_sine_coarse_rom: every coarse ROM word against
// round(511 * sin((256A + 16B + 8) * pi / 8192)), one-clock read latency.
module tb_sine_coarse_rom;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  logic [7:0]  addr = 0;
  logic [8:0]  data;
  int checks = 0, failures = 0;

  sine_coarse_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      int e;
      @(negedge clk);
      addr = 8'(a);
      @(posedge clk);
      #1;
      e = int'($floor(511.0 * $sin(real'((a >> 4) * 256 + (a & 15) * 16 + 8) * PI / 8192.0) + 0.5));
      checks++;
      if (int'(data) != e) begin
        failures++;
        if (failures < 10) $display("coarse[%0d]=%0d expected %0d", a, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
