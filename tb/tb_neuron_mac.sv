// tb_neuron_mac: feeds random windows (small, full-scale and extreme values)
// through the weighted-sum pipeline with non-default weights and bias, with
// random stalls, and compares z, the saturation flag and the valid bit with
// an integer model. Checks the three-cycle latency and that a stall holds
// the pipeline.
module tb_neuron_mac;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  localparam weights_t W = '{16'sd1000, -16'sd2000, 16'sd3000, -16'sd4000, 16'sd16384,
                             16'sd5000, -16'sd6000, 16'sd7000, -16'sd32768};
  localparam q_t B = -16'sd1234;

  logic clk = 0, rst_n, en, in_valid, out_valid, saturated;
  q_t   win [NUM_TAPS];
  q_t   z;
  int checks = 0, failures = 0, n_sat = 0;

  neuron_mac #(.WEIGHTS(W), .BIAS(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, queued in issue order
  longint exp_z [$];
  bit     exp_s [$];

  function automatic q_t rand_q(input int mode);
    case (mode)
      0: return q_t'($urandom_range(0, 2000)) - 16'sd1000;
      1: return q_t'($urandom);
      default: return ($urandom_range(0, 1) != 0) ? 16'sh7fff : 16'sh8000;
    endcase
  endfunction

  initial begin
    int issued = 0, got = 0;
    longint lw [NUM_TAPS];
    bit s;
    rst_n = 0; en = 1; in_valid = 0;
    foreach (win[i]) win[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: one word, no stall
    foreach (win[i]) begin win[i] = q_t'(16'sd100 * 16'(i + 1)); lw[i] = longint'(win[i]); end
    in_valid = 1;
    exp_z.push_back(ref_mac(lw, W, longint'(B), s)); exp_s.push_back(s);
    @(negedge clk); in_valid = 0;
    repeat (2) begin
      checks++; if (out_valid) failures++;
      @(negedge clk);
    end
    checks++;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    // random traffic with stalls
    while (got < 3000) begin
      if (out_valid && en) begin
        checks++;
        if (longint'(z) != exp_z[0] || saturated != exp_s[0]) begin
          failures++;
          if (failures < 10) $display("FAIL z=%0d sat=%b expected %0d %b", z, saturated, exp_z[0], exp_s[0]);
        end
        n_sat += int'(saturated);
        void'(exp_z.pop_front()); void'(exp_s.pop_front());
        got++;
      end
      en = ($urandom_range(0, 3) != 0);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < NUM_TAPS; i++) begin
        win[i] = rand_q(issued % 3);
        lw[i] = longint'(win[i]);
      end
      if (en && in_valid) begin
        exp_z.push_back(ref_mac(lw, W, longint'(B), s)); exp_s.push_back(s);
        issued++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
