// tb_axis_perceptron: end-to-end test of one streaming perceptron.
//  1. latency: a single sample into an idle unit must come out PIPE_LATENCY-1
//     edges after the edge that accepted it;
//  2. throughput: a block of samples with tvalid and tready held high must
//     come out as an unbroken burst, one result per clock;
//  3. random traffic: a piled-up pulse train with random input gaps and random
//     output backpressure, every result compared bit-exactly with the integer
//     model and to within 5 ADC counts with the floating-point model;
//     TLAST must come out with the result of the sample that carried it.
// The status pulses (table clamps, sum saturation) are checked against the
// model and each must occur.
module tb_axis_perceptron;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0, rst_n;
  logic    s_axis_tvalid, s_axis_tready, s_axis_tlast;
  sample_t s_axis_tdata;
  logic    m_axis_tvalid, m_axis_tready, m_axis_tlast;
  sample_t m_axis_tdata;
  logic    ev_clamp_lo, ev_clamp_hi, ev_sum_sat;
  int checks = 0, failures = 0;
  longint cycle = 0;

  axis_perceptron dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // ---- reference: window of raw samples and expected outputs ------------------
  longint raw [NUM_TAPS];
  longint exp_d [$];
  bit     exp_l [$];
  real    exp_f [$];
  bit     exp_fok [$];
  int     exp_lo = 0, exp_hi = 0, exp_sat = 0;
  int     got_lo = 0, got_hi = 0, got_sat = 0;
  int     n_stall = 0, n_gap = 0;
  real    max_err = 0.0;

  always @(posedge clk) if (rst_n) begin
    if (s_axis_tvalid && s_axis_tready) begin
      bit lo, hi, sat, fok;
      for (int i = 0; i < NUM_TAPS - 1; i++) raw[i] = raw[i+1];
      raw[NUM_TAPS-1] = longint'(s_axis_tdata);
      exp_d.push_back(ref_perceptron(raw, lo, hi, sat));
      exp_l.push_back(s_axis_tlast);
      exp_f.push_back(flt_perceptron(raw));
      fok = 1;
      foreach (raw[i]) if (raw[i] * DEFAULT_IN_SCALE >= 32768 || raw[i] * DEFAULT_IN_SCALE < -32768) fok = 0;
      exp_fok.push_back(fok);
      exp_lo += int'(lo); exp_hi += int'(hi); exp_sat += int'(sat);
    end
    if (!s_axis_tvalid) n_gap++;
    if (m_axis_tvalid && !m_axis_tready) n_stall++;
    got_lo += int'(ev_clamp_lo); got_hi += int'(ev_clamp_hi); got_sat += int'(ev_sum_sat);
    if (m_axis_tvalid && m_axis_tready) begin
      if (exp_d.size() == 0) check(0, "output without input");
      else begin
        real e;
        e = real'(m_axis_tdata) - exp_f[0];
        if (e < 0) e = -e;
        check(longint'(m_axis_tdata) == exp_d[0] && m_axis_tlast == exp_l[0],
              $sformatf("out %0d last %b, expected %0d %b", m_axis_tdata, m_axis_tlast, exp_d[0], exp_l[0]));
        if (exp_fok[0]) begin
          check(e <= 5.0, $sformatf("fixed %0d vs float %f", m_axis_tdata, exp_f[0]));
          if (e > max_err) max_err = e;
        end
        void'(exp_d.pop_front()); void'(exp_l.pop_front());
        void'(exp_f.pop_front()); void'(exp_fok.pop_front());
      end
    end
  end

  initial begin
    stream_t st;
    longint t0, t_first, t_last;
    int n_out;
    foreach (raw[i]) raw[i] = 0;
    rst_n = 0; s_axis_tvalid = 0; s_axis_tdata = '0; s_axis_tlast = 0; m_axis_tready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. latency
    check(s_axis_tready, "not ready after reset");
    // the sample is taken on the next edge; count the edges after that one
    // until the result is offered
    s_axis_tvalid = 1; s_axis_tdata = 16'sd1000; s_axis_tlast = 1;
    @(negedge clk); s_axis_tvalid = 0; s_axis_tlast = 0;
    t0 = 0;
    while (!m_axis_tvalid) begin @(negedge clk); t0++; end
    check(t0 == PIPE_LATENCY - 1, $sformatf("latency %0d edges", t0));
    @(negedge clk);

    // 2. throughput: 200 back-to-back samples
    st = make_stream(200, 20, 1500, 0);
    n_out = 0;
    fork
      begin
        for (int i = 0; i < 200; i++) begin
          s_axis_tvalid = 1; s_axis_tdata = sample_t'(st[i]); s_axis_tlast = (i == 199);
          @(negedge clk);
        end
        s_axis_tvalid = 0; s_axis_tlast = 0;
      end
      begin
        while (n_out < 200) begin
          @(posedge clk);
          if (m_axis_tvalid && m_axis_tready) begin
            if (n_out == 0) t_first = cycle;
            t_last = cycle;
            n_out++;
          end
        end
      end
    join
    check(t_last - t_first == 199, $sformatf("200 results took %0d cycles", t_last - t_first + 1));
    @(negedge clk);

    // 3. random traffic with gaps and backpressure
    st = make_stream(3000, 15, 1800, 1);
    fork
      for (int i = 0; i < 3000; i++) begin
        s_axis_tvalid = ($urandom_range(0, 9) != 0);
        s_axis_tdata  = sample_t'(st[i]);
        s_axis_tlast  = (i % 250 == 249);
        @(posedge clk);
        while (!(s_axis_tvalid && s_axis_tready)) begin
          @(negedge clk); s_axis_tvalid = 1; @(posedge clk);
        end
        @(negedge clk);
      end
      forever begin
        @(negedge clk); m_axis_tready = ($urandom_range(0, 3) != 0);
      end
    join_any
    s_axis_tvalid = 0;
    disable fork;
    m_axis_tready = 1;
    repeat (3 * PIPE_LATENCY) @(negedge clk);

    check(exp_d.size() == 0, $sformatf("%0d results missing", exp_d.size()));
    check(got_lo == exp_lo && got_hi == exp_hi && got_sat == exp_sat,
          $sformatf("status pulses lo/hi/sat %0d/%0d/%0d, expected %0d/%0d/%0d",
                    got_lo, got_hi, got_sat, exp_lo, exp_hi, exp_sat));
    check(exp_lo > 0 && exp_hi > 0 && exp_sat > 0, "a clamp or saturation never happened");
    check(n_stall > 0 && n_gap > 0, "no backpressure or no input gap");
    $display("clamp_lo=%0d clamp_hi=%0d sum_sat=%0d stalls=%0d gaps=%0d max |fixed-float|=%f counts",
             got_lo, got_hi, got_sat, n_stall, n_gap, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
