// tb_current_steering_cell: random control edges; the switch states are
// sampled every 10 ps. The closing switch must close 0.2 ns after the edge,
// the opening switch must open 0.35 ns after it, both must conduct in between,
// and the two must never be open at the same time.
module tb_current_steering_cell;
  logic d = 0;
  logic sw_p, sw_n;
  int checks = 0, failures = 0, overlaps = 0;

  current_steering_cell dut (.*);

  // make-before-break: sampled continuously
  // watchdog
  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ns;
    forever begin
      #10ps;
      checks++;
      if (!sw_p && !sw_n) begin
        failures++;
        if (failures < 10) $display("%t: both switches open", $realtime);
      end
    end
  end

  initial begin
    #1ns;
    checks++;
    if (sw_p !== 1'b0 || sw_n !== 1'b1) failures++;
    for (int n = 0; n < 400; n++) begin
      bit up;
      up = !d;
      d = up;
      #0.15ns;   // before turn-on: old state
      checks++;
      if (up ? (sw_p || !sw_n) : (!sw_p || sw_n)) failures++;
      #0.1ns;    // 0.25 ns: both closed
      checks++;
      if (sw_p && sw_n) overlaps++;
      else failures++;
      #0.15ns;   // 0.4 ns: new state
      checks++;
      if (up ? (!sw_p || sw_n) : (sw_p || !sw_n)) failures++;
      #(real'($urandom_range(1, 20)) * 1ns);
    end
    $display("overlaps %0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
