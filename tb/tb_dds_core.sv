// tb_dds_core: the digital part alone. A bus driver writes tuning words and
// pulses update; a cycle-level model of the registers, the 32-bit accumulator,
// the phase adder and the waveform functions predicts every dout sample (sine
// within 1 LSB, the others exact) and the power-down output. Checks the
// 17-clock path from the update edge to dout, then random reconfigurations;
// every waveform, frequency and phase change and power-down must occur.
module tb_dds_core;
  import afg_ref_pkg::*;

  localparam int  MAXE     = 60000;
  localparam int  DOUT_LAT = 17;   // update edge = stage 1, dout after stage 17

  logic clk = 0, rst_n = 0, wr = 0, update = 0;
  logic [2:0] addr = '0;
  logic [7:0] data = '0;
  logic [9:0] dout;
  logic pd;

  dds_core dut (.*);

  always #5 clk = ~clk;   // 100 MHz

  int checks = 0, failures = 0;

  // ---------------- model ----------------
  typedef struct {
    logic [31:0] ftw;
    logic [11:0] ptw;
    int          wave;
    bit          pd;
  } word_t;

  word_t       m_staged, m_active;
  logic [31:0] m_acc;
  logic [22:0] m_lf;
  int          e_n = 0;                 // edges since reset release
  word_t       act_h [MAXE];            // active word after edge i
  logic [31:0] acc_h [MAXE];            // accumulator after edge i
  logic [22:0] lf_h  [MAXE];            // random state after edge i
  int          dout_h [MAXE];           // dout after edge i

  // mechanism counters
  int n_fswitch = 0, n_pmod = 0, n_wswitch = 0, n_pd = 0, n_wrap = 0, n_staged_run = 0;
  int n_wave [4];

  initial begin
    m_staged = '{0, 0, 0, 0};
    m_active = '{0, 0, 0, 0};
    m_acc    = 0;
    m_lf     = 23'h5A5A5;
  end

  always @(posedge clk) begin
    if (rst_n && e_n < MAXE) begin
      logic [32:0] s;
      word_t       old_active;
      old_active = m_active;
      s = {1'b0, m_acc} + {1'b0, old_active.ftw};
      if (s[32]) n_wrap++;
      m_acc = s[31:0];
      if (update) begin
        if (m_staged.ftw != m_active.ftw) n_fswitch++;
        if (m_staged.ptw != m_active.ptw) n_pmod++;
        if (m_staged.wave != m_active.wave) n_wswitch++;
        m_active = m_staged;
      end
      if (wr) begin
        if (m_active.ftw != 0) n_staged_run++;
        case (addr)
          3'd0: m_staged.ftw[7:0]   = data;
          3'd1: m_staged.ftw[15:8]  = data;
          3'd2: m_staged.ftw[23:16] = data;
          3'd3: m_staged.ftw[31:24] = data;
          3'd4: m_staged.ptw[7:0]   = data;
          3'd5: m_staged.ptw[11:8]  = data[3:0];
          3'd6: begin m_staged.wave = int'(data[1:0]); m_staged.pd = data[2]; end
          default: ;
        endcase
      end
      m_lf = lfsr_step10(m_lf);
      act_h[e_n] = m_active;
      acc_h[e_n] = m_acc;
      lf_h[e_n]  = m_lf;
      e_n++;
    end
  end

  function automatic word_t act_at(int i);
    word_t z;
    z = '{0, 0, 0, 0};
    return (i < 0) ? z : act_h[i];
  endfunction
  function automatic logic [31:0] acc_at(int i);
    return (i < 0) ? 32'd0 : acc_h[i];
  endfunction

  // expected dout after edge e
  function automatic int exp_dout(int e);
    logic [13:0] ph;
    word_t       wv;
    ph = acc_at(e - 15)[31:18] + {act_at(e - 8).ptw, 2'b00};
    wv = act_at(e - 7);
    return ref_sample(wv.wave, ph, (e - 2 < 0) ? 23'h5A5A5 : lf_h[e - 2]);
  endfunction

  // ---------------- checker ----------------
  bit checking = 0;
  int first_e = -1;                     // first edge whose dout was recorded
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (checking && e_n > 20) begin
        int e, d, w;
        e = e_n - 1;                           // the edge just taken
        dout_h[e] = int'(dout);
        if (first_e < 0) first_e = e;
        w = act_at(e - 7).wave;
        d = int'(dout) - exp_dout(e);
        if (d < 0) d = -d;
        checks++;
        if (d > ((w == 0) ? 1 : 0)) begin
          failures++;
          if (failures < 10) $display("edge %0d: dout %0d expected %0d (wave %0d)", e, dout, exp_dout(e), w);
        end
        n_wave[w]++;
        // power-down bit of the active word
        checks++;
        if (act_at(e).pd) n_pd++;
        if (pd !== act_at(e).pd) failures++;
      end
    end
  end

  // ---------------- bus driver ----------------
  task automatic bus_write(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk);
    wr = 1; addr = a; data = d;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic load(input logic [31:0] ftw, input logic [11:0] ptw, input int wave, input bit pd);
    bus_write(3'd0, ftw[7:0]);
    bus_write(3'd1, ftw[15:8]);
    bus_write(3'd2, ftw[23:16]);
    bus_write(3'd3, ftw[31:24]);
    bus_write(3'd4, ptw[7:0]);
    bus_write(3'd5, {4'h0, ptw[11:8]});
    bus_write(3'd6, {5'h0, pd, 2'(wave)});
  endtask

  task automatic do_update();
    @(negedge clk);
    update = 1;
    @(negedge clk);
    update = 0;
  endtask

  // count rising crossings of mid-scale on dout over n clocks
  task automatic count_periods(input int n, output int crossings);
    int prev;
    crossings = 0;
    @(posedge clk); #2;
    prev = int'(dout);
    repeat (n) begin
      @(posedge clk); #2;
      if (prev < 512 && int'(dout) >= 512) crossings++;
      prev = int'(dout);
    end
  endtask

  initial begin
    repeat (MAXE + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, cr;
    real i_before;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (30) @(posedge clk);
    checking = 1;

    // 1. frequency switching time: sine at frequency 0, then a new word
    load(32'h0040_0000, 12'h000, 0, 0);
    repeat (25) @(posedge clk);
    @(negedge clk);
    i_before = real'(dout);
    update = 1;
    @(posedge clk);            // stage 1: the update edge
    lat = 1;
    @(negedge clk);
    update = 0;
    while (real'(dout) == i_before && lat < 40) begin
      @(posedge clk);
      lat++;
      #1;
    end
    checks++;
    if (lat != DOUT_LAT) begin
      failures++;
      $display("update to dout took %0d clocks, expected %0d", lat, DOUT_LAT);
    end

    // 2. 2 MHz sine: ftw = round(2e6 / 100e6 * 2^32); 40 periods in 2000 clocks
    load(32'd85899346, 12'h000, 0, 0);
    do_update();
    repeat (30) @(posedge clk);
    count_periods(2000, cr);
    checks++;
    if (cr < 39 || cr > 41) begin failures++; $display("2 MHz: %0d periods", cr); end

    // 3. 25 MHz sine: ftw = 2^30, 4 samples per period; 500 periods in 2000 clocks
    load(32'h4000_0000, 12'h000, 0, 0);
    do_update();
    repeat (30) @(posedge clk);
    count_periods(2000, cr);
    checks++;
    if (cr < 499 || cr > 501) begin failures++; $display("25 MHz: %0d periods", cr); end

    // 4. 35 MHz, the top of the usable band: ftw = round(0.35 * 2^32)
    load(32'd1503238554, 12'h000, 0, 0);
    do_update();
    repeat (30) @(posedge clk);
    count_periods(2000, cr);
    checks++;
    if (cr < 699 || cr > 701) begin failures++; $display("35 MHz: %0d periods", cr); end

    // 5. phase modulation: 90 degrees (ptw = 1024) at 1/64 of the clock
    load(32'h0400_0000, 12'd1024, 0, 0);
    do_update();
    repeat (200) @(posedge clk);

    // 6. each waveform, then power-down
    for (int w = 1; w < 4; w++) begin
      load(32'h0123_4567 << w, 12'(w * 300), w, 0);
      do_update();
      repeat (600) @(posedge clk);
    end
    load(32'h0200_0000, 12'h000, 0, 1);
    do_update();
    repeat (100) @(posedge clk);

    // 7. random reconfigurations
    for (int n = 0; n < 40; n++) begin
      logic [31:0] f;
      case ($urandom_range(0, 2))
        0: f = 32'($urandom);
        1: f = 32'($urandom) >> $urandom_range(4, 28);
        default: f = 32'($urandom_range(0, 1503238554));
      endcase
      load(f, 12'($urandom), $urandom_range(0, 3), ($urandom_range(0, 7) == 0));
      do_update();
      repeat ($urandom_range(20, 400)) @(posedge clk);
    end
    checking = 0;

    begin
      string names [8];
      int    cnt [8];
      names = '{"frequency switch", "phase modulation", "waveform switch", "power-down",
                "accumulator wrap", "sine", "triangle", "saw-tooth"};
      cnt   = '{n_fswitch, n_pmod, n_wswitch, n_pd, n_wrap, n_wave[0], n_wave[1], n_wave[2]};
      foreach (names[i]) begin
        $display("%-18s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("  never happened"); end
      end
      $display("%-18s %0d", "random", n_wave[3]);
      $display("%-18s %0d", "write while running", n_staged_run);
      checks += 2;
      if (n_wave[3] == 0) failures++;
      if (n_staged_run == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
