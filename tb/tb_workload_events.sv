// tb_workload_events: the event-count workloads of the original measurements
// (processing time against number of events, one core against ten), as far
// as they can be simulated: 1e4, 1e5, 1e6 and 1e7 events, each on one core
// and on ten cores, on the default top (10 cores).
// Samples are offered back to back and results always taken, so the run
// must take exactly ceil(E / cores) + PIPE_LATENCY - 1 clock edges from the
// first accepted sample to the last result; every result is compared
// bit-exactly with the integer model.
module tb_workload_events;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 10;

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
    repeat (30000000) @(posedge clk);
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

  longint raw [NC][NUM_TAPS];
  longint exp_d [NC][$];
  int     n_in [NC], n_out [NC], todo [NC];
  int     bad = 0;
  longint cyc = 0;
  bit     running = 0;
  longint t_first, t_last;   // edges of the first acceptance and the last result

  // stimulus: deterministic pulse-like pattern, one new sample per clock
  function automatic longint sample_of(input int c, input int i);
    int k = (i * 7 + c * 13) % 23;
    return longint'(k < 6 ? $rtoi(1200.0 * pulse(k)) : 0) + longint'(i % 5) - 2;
  endfunction

  always @(posedge clk) if (rst_n && running) begin
    cyc <= cyc + 1;
    for (int c = 0; c < NC; c++) begin
      if (s_axis_tvalid[c] && s_axis_tready[c]) begin
        bit lo, hi, sat;
        for (int i = 0; i < NUM_TAPS - 1; i++) raw[c][i] = raw[c][i+1];
        raw[c][NUM_TAPS-1] = longint'(s_axis_tdata[c]);
        exp_d[c].push_back(ref_perceptron(raw[c], lo, hi, sat));
        if (n_in[0] + n_in[c] == 0) t_first = cyc;
        n_in[c]++;
      end
      if (m_axis_tvalid[c] && m_axis_tready[c]) begin
        if (exp_d[c].size() == 0 || longint'(m_axis_tdata[c]) != exp_d[c][0]) bad++;
        if (exp_d[c].size() != 0) void'(exp_d[c].pop_front());
        n_out[c]++;
        t_last = cyc;
      end
    end
  end

  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      s_axis_tvalid[c] = running && (n_in[c] < todo[c]);
      s_axis_tdata[c]  = sample_t'(sample_of(c, n_in[c]));
      s_axis_tlast[c]  = (n_in[c] == todo[c] - 1);
      m_axis_tready[c] = 1'b1;
    end
  end

  task automatic run(input int events, input int cores);
    int per, expect_cycles, total;
    bit done;
    longint t_end;
    per = (events + cores - 1) / cores;
    rst_n = 0; running = 0;
    for (int c = 0; c < NC; c++) begin
      foreach (raw[c][i]) raw[c][i] = 0;
      exp_d[c].delete();
      n_in[c] = 0; n_out[c] = 0;
      todo[c] = (c < cores) ? ((events - c * per) < per ? events - c * per : per) : 0;
    end
    bad = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; cyc = 0;
    running = 1;
    do begin
      @(posedge clk); #1;
      done = 1;
      for (int c = 0; c < cores; c++) if (n_out[c] < todo[c]) done = 0;
    end while (!done);
    t_end = t_last - t_first;
    running = 0;
    total = 0;
    for (int c = 0; c < NC; c++) total += n_out[c];
    // the last sample is accepted per-1 edges after the first, its result is
    // offered PIPE_LATENCY-1 edges later and taken on the edge after that
    expect_cycles = per + PIPE_LATENCY - 1;
    check(total == events, $sformatf("%0d events on %0d cores: %0d results", events, cores, total));
    check(bad == 0, $sformatf("%0d events on %0d cores: %0d wrong results", events, cores, bad));
    check(int'(t_end) == expect_cycles,
          $sformatf("%0d events on %0d cores: %0d cycles, expected %0d", events, cores, t_end, expect_cycles));
    $display("%0d events on %0d core(s): %0d cycles (%0.2f events per cycle)",
             events, cores, t_end, real'(events) / real'(t_end));
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0;
    for (int c = 0; c < NC; c++) begin todo[c] = 0; n_in[c] = 0; n_out[c] = 0; end
    for (int e = 10000; e <= 10000000; e *= 10) begin
      run(e, 1);
      run(e, 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
