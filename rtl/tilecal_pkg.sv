// tilecal_pkg: shared widths, fixed-point formats and constants of the
// TileCal perceptron datapath.
//
// Samples arrive as signed ADC counts (SAMPLE_W bits). Inside the neuron every
// value is a signed Q2.14 number (Q_W = 16 bits, Q_FRAC = 14 fraction bits):
// range [-2, 2), one LSB = 1/16384. The window of NUM_TAPS = 9 samples and the
// tanh look-up table of LUT_DEPTH = 5000 entries over the input interval
// [-0.7, 0.8] follow the design description; the bit widths, the Q format and
// the default coefficients are choices of this implementation.
package tilecal_pkg;

  // ---- stream and number formats -------------------------------------------
  parameter int SAMPLE_W = 16;   // signed ADC counts on the AXI4-Stream
  parameter int Q_W      = 16;   // neuron-internal word
  parameter int Q_FRAC   = 14;   // fraction bits of the neuron-internal word
  parameter int NUM_TAPS = 9;    // perceptron inputs x0..x8

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [Q_W-1:0]      q_t;

  localparam int Q_MAX = (1 <<< (Q_W - 1)) - 1;
  localparam int Q_MIN = -(1 <<< (Q_W - 1));

  // ---- tanh look-up table ----------------------------------------------------
  // LUT_DEPTH entries cover the Q2.14 input interval [LUT_ZMIN_Q, LUT_ZMIN_Q +
  // LUT_SPAN_Q] = [-0.7, 0.8]. Entry i holds tanh() of the centre of bin i:
  //   x_i = (LUT_ZMIN_Q + (i + 0.5) * LUT_SPAN_Q / LUT_DEPTH) / 2^14
  // The bin of an input z is floor((z - LUT_ZMIN_Q) * LUT_IDX_MUL / 2^LUT_IDX_SHIFT)
  // with LUT_IDX_MUL = ceil(LUT_DEPTH / LUT_SPAN_Q * 2^LUT_IDX_SHIFT), which
  // equals the exact floor division for every input in range; inputs
  // outside the interval use the first or the last entry.
  parameter int LUT_DEPTH     = 5000;
  parameter int LUT_ADDR_W    = $clog2(LUT_DEPTH);
  parameter int LUT_ZMIN_Q    = -11469;  // round(-0.7 * 2^14)
  parameter int LUT_SPAN_Q    = 24576;   // 1.5 * 2^14
  parameter int LUT_IDX_SHIFT = 32;
  parameter int LUT_IDX_MUL   = 873813334; // ceil(5000 / 24576 * 2^32)

  // ---- default coefficients --------------------------------------------------
  // Weights in Q2.14, index 0 = oldest sample of the window, 8 = newest.
  // These stand in for trained values: the centre sample with weight 1.5 and
  // its neighbours subtracted, a simple pile-up suppressing filter.
  typedef q_t weights_t [NUM_TAPS];
  parameter weights_t DEFAULT_WEIGHTS = '{
    16'sd0, 16'sd0, -16'sd4096, -16'sd8192, 16'sd24576,
    -16'sd8192, -16'sd4096, 16'sd0, 16'sd0 };
  parameter q_t DEFAULT_BIAS = 16'sd0;

  // Input normalisation x_n = ((x - IN_OFFSET) * IN_SCALE) >>> IN_SHIFT maps
  // 2048 ADC counts to 1.0; output scaling e = ((y * OUT_SCALE) >>> 14) +
  // OUT_OFFSET maps 1.0 back to 2048 counts.
  parameter int DEFAULT_IN_OFFSET  = 0;
  parameter int DEFAULT_IN_SCALE   = 8;
  parameter int DEFAULT_IN_SHIFT   = 0;
  parameter int DEFAULT_OUT_SCALE  = 2048;
  parameter int DEFAULT_OUT_OFFSET = 0;

  // Register stages between the input and output streams: input register,
  // normalisation, three MAC stages, LUT index, ROM, two output DSP stages and
  // the output register. A sample accepted on clock edge k is offered on the
  // output stream from edge k + PIPE_LATENCY - 1 when the output never stalls.
  parameter int PIPE_LATENCY = 10;

  // Saturate a wide signed value to the Q_W-bit range.
  function automatic q_t sat_q(input logic signed [63:0] v);
    if (v > 64'(Q_MAX)) return q_t'(Q_MAX);
    if (v < 64'(Q_MIN)) return q_t'(Q_MIN);
    return q_t'(v);
  endfunction

endpackage
