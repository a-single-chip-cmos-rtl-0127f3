// tb_phase_accumulator: the pipelined accumulator against a plain 32-bit
// accumulator model delayed by the pipeline depth. Checks the first-change
// latency after a tuning word change (ACC_W/SEG_W = 8 clocks), then runs
// random tuning words, including ones that make the phase wrap every clock.
module tb_phase_accumulator;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [31:0] ftw = 0;
  logic [13:0] phase;
  logic [31:0] model = 0;
  logic [31:0] hist [$];
  int checks = 0, failures = 0, wraps = 0;

  phase_accumulator dut (.clk(clk), .rst_n(rst_n), .ftw(ftw), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: one addition per clock, output seen N-1 clocks after the sum
  always @(posedge clk) begin
    if (rst_n) begin
      logic [32:0] s;
      s = {1'b0, model} + {1'b0, ftw};
      if (s[32]) wraps++;
      model <= s[31:0];
      hist.push_back(s[31:0]);
    end
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // latency: ftw applied before edge 1, first changed output after edge N
    ftw = 32'h0040_0000;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
    end while (phase == 0 && lat < 50);
    checks++;
    if (lat != N) begin
      failures++;
      $display("latency %0d, expected %0d", lat, N);
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 19) == 0) begin
        case ($urandom_range(0, 2))
          0: ftw = 32'($urandom);
          1: ftw = 32'($urandom) >> $urandom_range(0, 31);
          default: ftw = 32'hFFFF_FFFF - 32'($urandom_range(0, 1000));
        endcase
      end
      if (hist.size() >= N) begin
        checks++;
        if (phase !== hist[hist.size()-N][31:18]) begin
          failures++;
          if (failures < 10) $display("phase %h expected %h", phase, hist[hist.size()-N][31:18]);
        end
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
