// tb_sine_fine_rom: every fine ROM word against
// round(2044 * cos((1024H + 512) * pi / 8192) * sin((C - 7.5) * pi / 8192))
// for the 64 addresses {H, C}.
module tb_sine_fine_rom;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  logic [5:0] addr = 0;
  logic signed [3:0] data;
  int checks = 0, failures = 0;

  sine_fine_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      real v;
      int e;
      @(negedge clk);
      addr = 6'(a);
      @(posedge clk);
      #1;
      v = 2044.0 * $cos(real'((a >> 4) * 1024 + 512) * PI / 8192.0)
                 * $sin((real'(a & 15) - 7.5) * PI / 8192.0);
      e = int'($floor(v + 0.5));
      checks++;
      if (int'(data) != e) begin
        failures++;
        if (failures < 10) $display("fine[%0d]=%0d expected %0d", a, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
