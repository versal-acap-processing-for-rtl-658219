// tb_tilecal_nn_system: end-to-end test of the core array at its default
// size (10 cores, no parameters overridden).
// Every core receives its own block of 1000 piled-up pulse-train samples,
// split into frames of 100 by TLAST, with random input gaps and random output
// backpressure, all cores at the same time. Each result is compared
// bit-exactly with the integer model and to within 5 ADC counts with the
// floating-point model; a histogram of |fixed - float| in 0.5-count bins is
// printed. The cores must run in parallel: all 10 blocks must finish within
// twice the time one block needs at one sample per clock. Each mechanism of
// the design must occur at least once: input gap (bubble), output
// backpressure (stall), TLAST framing, tanh table clamp below and above, and
// neuron-sum saturation.
module tb_tilecal_nn_system;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 10;           // default core count of the design
  localparam int N  = 1000;         // samples per core

  logic    clk = 0, rst_n;
  logic    s_axis_tvalid [NC], s_axis_tready [NC], s_axis_tlast [NC];
  sample_t s_axis_tdata  [NC];
  logic    m_axis_tvalid [NC], m_axis_tready [NC], m_axis_tlast [NC];
  sample_t m_axis_tdata  [NC];
  logic    ev_clamp_lo [NC], ev_clamp_hi [NC], ev_sum_sat [NC];
  int checks = 0, failures = 0;

  tilecal_nn_system dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  stream_t st [NC];
  longint  raw [NC][NUM_TAPS];
  longint  exp_d [NC][$];
  bit      exp_l [NC][$];
  real     exp_f [NC][$];
  bit      exp_fok [NC][$];
  int      idx [NC], n_out [NC];
  bit      accepted [NC];
  int      hist [12];
  real     max_err = 0.0, sum_err = 0.0;
  int      n_err = 0;
  // mechanism counters
  int n_gap = 0, n_stall = 0, n_last = 0, n_lo = 0, n_hi = 0, n_sat = 0;
  int exp_lo = 0, exp_hi = 0, exp_sat = 0;

  // monitor: model inputs, compare outputs (values seen before the edge)
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      accepted[c] = s_axis_tvalid[c] && s_axis_tready[c];
      if (accepted[c]) begin
        bit lo, hi, sat, fok;
        for (int i = 0; i < NUM_TAPS - 1; i++) raw[c][i] = raw[c][i+1];
        raw[c][NUM_TAPS-1] = longint'(s_axis_tdata[c]);
        exp_d[c].push_back(ref_perceptron(raw[c], lo, hi, sat));
        exp_l[c].push_back(s_axis_tlast[c]);
        exp_f[c].push_back(flt_perceptron(raw[c]));
        fok = 1;
        foreach (raw[c][i])
          if (raw[c][i] * DEFAULT_IN_SCALE >= 32768 || raw[c][i] * DEFAULT_IN_SCALE < -32768) fok = 0;
        exp_fok[c].push_back(fok);
        exp_lo += int'(lo); exp_hi += int'(hi); exp_sat += int'(sat);
      end
      if (!s_axis_tvalid[c] && idx[c] < N) n_gap++;
      if (m_axis_tvalid[c] && !m_axis_tready[c]) n_stall++;
      n_lo += int'(ev_clamp_lo[c]); n_hi += int'(ev_clamp_hi[c]); n_sat += int'(ev_sum_sat[c]);
      if (m_axis_tvalid[c] && m_axis_tready[c]) begin
        if (exp_d[c].size() == 0) check(0, $sformatf("core %0d: output without input", c));
        else begin
          real e;
          e = real'(m_axis_tdata[c]) - exp_f[c][0];
          if (e < 0) e = -e;
          check(longint'(m_axis_tdata[c]) == exp_d[c][0] && m_axis_tlast[c] == exp_l[c][0],
                $sformatf("core %0d result %0d: %0d last %b, expected %0d %b", c, n_out[c],
                          m_axis_tdata[c], m_axis_tlast[c], exp_d[c][0], exp_l[c][0]));
          if (exp_fok[c][0]) begin
            check(e <= 5.0, $sformatf("core %0d: fixed %0d vs float %f", c, m_axis_tdata[c], exp_f[c][0]));
            if (e > max_err) max_err = e;
            sum_err += e; n_err++;
            hist[(e >= 5.5) ? 11 : int'($floor(e * 2.0))]++;
          end
          n_last += int'(m_axis_tlast[c]);
          void'(exp_d[c].pop_front()); void'(exp_l[c].pop_front());
          void'(exp_f[c].pop_front()); void'(exp_fok[c].pop_front());
          n_out[c]++;
        end
      end
    end
  end

  // drivers: one sample stream per core, random gaps and backpressure
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (accepted[c]) begin idx[c]++; accepted[c] = 0; end
      if (idx[c] < N) begin
        if (!s_axis_tvalid[c] || !s_axis_tready[c]) s_axis_tvalid[c] = ($urandom_range(0, 9) != 0);
        s_axis_tdata[c] = sample_t'(st[c][idx[c]]);
        s_axis_tlast[c] = (idx[c] % 100 == 99);
      end else begin
        s_axis_tvalid[c] = 0;
        s_axis_tlast[c]  = 0;
      end
      m_axis_tready[c] = ($urandom_range(0, 4) != 0);
    end
  end

  initial begin
    int t0, t;
    bit done;
    rst_n = 0;
    for (int c = 0; c < NC; c++) begin
      st[c] = make_stream(N, 15 + c, 1800, 1);
      foreach (raw[c][i]) raw[c][i] = 0;
      idx[c] = 0; n_out[c] = 0; accepted[c] = 0;
      s_axis_tvalid[c] = 0; s_axis_tdata[c] = '0; s_axis_tlast[c] = 0; m_axis_tready[c] = 1;
    end
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t = 0;
    do begin
      @(negedge clk); t++;
      done = 1;
      for (int c = 0; c < NC; c++) if (n_out[c] < N) done = 0;
    end while (!done && t < 20 * N);
    repeat (2 * PIPE_LATENCY) @(negedge clk);

    for (int c = 0; c < NC; c++) begin
      check(n_out[c] == N, $sformatf("core %0d produced %0d of %0d results", c, n_out[c], N));
      check(exp_d[c].size() == 0, $sformatf("core %0d: %0d results missing", c, exp_d[c].size()));
    end
    check(t <= 2 * N, $sformatf("10 blocks of %0d took %0d cycles: cores not parallel", N, t));
    check(n_lo == exp_lo && n_hi == exp_hi && n_sat == exp_sat, "status pulse counts differ from model");
    check(n_gap  > 0, "no input gap");
    check(n_stall > 0, "no output stall");
    check(n_last == NC * N / 100, $sformatf("%0d TLASTs out, expected %0d", n_last, NC * N / 100));
    check(n_lo  > 0, "tanh table never clamped below");
    check(n_hi  > 0, "tanh table never clamped above");
    check(n_sat > 0, "neuron sum never saturated");
    $display("cycles=%0d gaps=%0d stalls=%0d tlast=%0d clamp_lo=%0d clamp_hi=%0d sum_sat=%0d",
             t, n_gap, n_stall, n_last, n_lo, n_hi, n_sat);
    $display("|fixed - float| over %0d results: max %f, mean %f ADC counts", n_err, max_err,
             sum_err / real'(n_err));
    for (int i = 0; i < 11; i++) $display("  [%4.1f, %4.1f) %0d", i * 0.5, i * 0.5 + 0.5, hist[i]);
    $display("  >= 5.5      %0d", hist[11]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
