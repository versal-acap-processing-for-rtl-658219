// tb_ref_pkg: reference models used by the testbenches, written from the
// arithmetic definition of each stage rather than from the RTL.
//
// ref_*  : bit-exact fixed-point model of the perceptron (same formats and
//          rounding as specified in tilecal_pkg, computed with plain integer
//          arithmetic and an exact division for the table address).
// flt_*  : floating-point model of the same perceptron (real weights, real
//          tanh on the clamped table interval), used to bound the error of the
//          fixed-point datapath in ADC counts.
// pulse  : an approximate calorimeter pulse shape, sampled every 25 ns, used
//          to build test streams with overlapping (piled-up) pulses.
package tb_ref_pkg;
  import tilecal_pkg::*;

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // arithmetic shift right of a signed value (floor division by 2^s)
  function automatic longint asr(input longint v, input int s);
    longint d = longint'(1) <<< s;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  function automatic longint ref_norm(input longint x, input int off = DEFAULT_IN_OFFSET,
                                      input int scale = DEFAULT_IN_SCALE,
                                      input int shift = DEFAULT_IN_SHIFT);
    return sat16(asr((x - off) * scale, shift));
  endfunction

  function automatic longint ref_mac(input longint win [NUM_TAPS], input weights_t w,
                                     input longint bias, output bit saturated);
    longint acc = bias * 16384;
    longint r;
    for (int i = 0; i < NUM_TAPS; i++) acc += win[i] * longint'(w[i]);
    r = asr(acc, 14);
    saturated = (r > 32767) || (r < -32768);
    return sat16(r);
  endfunction

  // table address: exact floor((z - zmin) * depth / span), clamped
  function automatic int ref_index(input longint z, output bit lo, output bit hi);
    longint offs = z - LUT_ZMIN_Q;
    longint bin;
    lo = 0; hi = 0;
    if (offs < 0) begin lo = 1; return 0; end
    bin = (offs * LUT_DEPTH) / LUT_SPAN_Q;
    if (bin > LUT_DEPTH - 1) begin hi = 1; return LUT_DEPTH - 1; end
    return int'(bin);
  endfunction

  function automatic longint ref_rom(input int i);
    real xc = (real'(LUT_ZMIN_Q) + (real'(i) + 0.5) * real'(LUT_SPAN_Q) / real'(LUT_DEPTH)) / 16384.0;
    return longint'($floor($tanh(xc) * 16384.0 + 0.5));
  endfunction

  function automatic longint ref_out(input longint y, input int scale = DEFAULT_OUT_SCALE,
                                     input int off = DEFAULT_OUT_OFFSET);
    return sat16(asr(y * scale, 14) + off);
  endfunction

  // whole perceptron on a window of raw samples (win[0] oldest)
  function automatic longint ref_perceptron(input longint raw [NUM_TAPS],
                                            output bit lo, output bit hi, output bit sat);
    longint xn [NUM_TAPS];
    longint z;
    for (int i = 0; i < NUM_TAPS; i++) xn[i] = ref_norm(raw[i]);
    z = ref_mac(xn, DEFAULT_WEIGHTS, DEFAULT_BIAS, sat);
    return ref_out(ref_rom(ref_index(z, lo, hi)));
  endfunction

  // floating-point perceptron, tanh argument clamped to the table interval
  function automatic real flt_perceptron(input longint raw [NUM_TAPS]);
    real z = real'(DEFAULT_BIAS) / 16384.0;
    real zmin = real'(LUT_ZMIN_Q) / 16384.0;
    real zmax = real'(LUT_ZMIN_Q + LUT_SPAN_Q) / 16384.0;
    for (int i = 0; i < NUM_TAPS; i++)
      z += (real'(raw[i] - DEFAULT_IN_OFFSET) * real'(DEFAULT_IN_SCALE) / real'(1 << DEFAULT_IN_SHIFT)
            / 16384.0) * (real'(DEFAULT_WEIGHTS[i]) / 16384.0);
    if (z < zmin) z = zmin;
    if (z > zmax) z = zmax;
    return $tanh(z) * real'(DEFAULT_OUT_SCALE) + real'(DEFAULT_OUT_OFFSET);
  endfunction

  // approximate normalised calorimeter pulse, samples 25 ns apart, peak at index 2
  function automatic real pulse(input int k);
    case (k)
      0: return 0.03;
      1: return 0.43;
      2: return 1.00;
      3: return 0.56;
      4: return 0.15;
      5: return 0.04;
      default: return 0.0;
    endcase
  endfunction

  typedef longint stream_t [];

  // n samples of a piled-up pulse train: in each bunch crossing a pulse starts
  // with probability occ_pct %, amplitude 20..amp_max counts, plus +-2 counts
  // of noise. With extremes set, about 1 % of the samples are replaced by
  // out-of-range values (large negative undershoot or a huge deposit) that
  // drive the neuron outside the tanh table and into saturation.
  function automatic stream_t make_stream(input int n, input int occ_pct,
                                          input int amp_max, input bit extremes);
    stream_t s = new[n];
    real acc [] = new[n + 8];
    foreach (acc[i]) acc[i] = 0.0;
    for (int t = 0; t < n; t++) begin
      if ($urandom_range(0, 99) < occ_pct) begin
        real a = real'($urandom_range(20, amp_max));
        for (int k = 0; k < 6; k++) acc[t + k] += a * pulse(k);
      end
    end
    for (int t = 0; t < n; t++) begin
      s[t] = longint'($floor(acc[t] + 0.5)) + longint'($urandom_range(0, 4)) - 2;
      if (extremes) begin
        int r = $urandom_range(0, 199);
        if (r == 0)      s[t] = -longint'($urandom_range(1500, 3000));
        else if (r == 1) s[t] = longint'($urandom_range(9000, 30000));
      end
    end
    return s;
  endfunction

endpackage
