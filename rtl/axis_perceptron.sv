// axis_perceptron: the streaming neural-network unit of one core. It takes
// ADC samples on an AXI4-Stream slave port and returns one reconstructed
// energy per sample on an AXI4-Stream master port.
//
// Datapath (one register stage per line, following the block structure of
// the core: REG, DSP, shift register + 3x3 DSP array, LUT, ROM, DSP, DSP, REG):
//   S0  input register
//   S1  normalisation  x_n = sat(((x - IN_OFFSET) * IN_SCALE) >>> IN_SHIFT), Q2.14
//       shift register: the last NUM_TAPS = 9 normalised samples (the window)
//   S2..S4  neuron_mac: z = sum x_i * w_i + b over the window
//   S5  tanh_index: bin address of z in the tanh table, clamped to its range
//   S6  tanh_rom: y = tanh(z), 5000 entries over [-0.7, 0.8]
//   S7  output scaling  p = y * OUT_SCALE
//   S8  output offset   e = sat((p >>> 14) + OUT_OFFSET), ADC counts
//   S9  output register (m_axis_*)
// Every input sample shifts into the window and produces one output, so a
// block of N samples in gives N results out, in order: the result for input
// k is computed from inputs k-8..k (k-4 is the window centre). The window is
// cleared by reset only, so the first eight results of a run see zeros for
// the samples before the first one. TLAST travels with its sample.
// The perceptron itself, the 9-sample window and the 5000-value tanh table
// follow the design description. The number formats, the normalisation and
// output scaling stages, the window-per-sample framing and the default
// coefficients are this implementation's choices.
//
// Timing: one sample per clock. A sample accepted on edge k appears on the
// output from edge k + PIPE_LATENCY - 1 (10 register stages). Flow control is
// a global stall: the whole pipeline, window included, holds while the output
// register is full and m_axis_tready is low, and s_axis_tready is low then.
// Synchronous active-low reset.
module axis_perceptron
  import tilecal_pkg::*;
#(
  parameter weights_t WEIGHTS    = DEFAULT_WEIGHTS,
  parameter q_t       BIAS       = DEFAULT_BIAS,
  parameter int       IN_OFFSET  = DEFAULT_IN_OFFSET,
  parameter int       IN_SCALE   = DEFAULT_IN_SCALE,
  parameter int       IN_SHIFT   = DEFAULT_IN_SHIFT,
  parameter int       OUT_SCALE  = DEFAULT_OUT_SCALE,
  parameter int       OUT_OFFSET = DEFAULT_OUT_OFFSET
) (
  input  logic    clk,
  input  logic    rst_n,
  // AXI4-Stream slave: ADC samples
  input  logic    s_axis_tvalid,
  output logic    s_axis_tready,
  input  sample_t s_axis_tdata,
  input  logic    s_axis_tlast,
  // AXI4-Stream master: reconstructed energies
  output logic    m_axis_tvalid,
  input  logic    m_axis_tready,
  output sample_t m_axis_tdata,
  output logic    m_axis_tlast,
  // status: one-cycle pulses, one per sample, while that sample leaves S5
  output logic    ev_clamp_lo,    // neuron sum below the tanh table range
  output logic    ev_clamp_hi,    // neuron sum above the tanh table range
  output logic    ev_sum_sat      // neuron sum saturated to the Q2.14 range
);

  localparam int MAC_DEPTH = 3;
  // stages whose valid/last bits are kept here: S0, S1, S5..S9 are explicit;
  // the MAC delay is matched by the last-bit pipe below
  logic adv;
  assign adv           = !m_axis_tvalid || m_axis_tready;
  assign s_axis_tready = adv;

  // ---- S0: input register ----------------------------------------------------
  sample_t x0;
  logic    v0, l0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0 <= 1'b0;
      l0 <= 1'b0;
      x0 <= '0;
    end else if (adv) begin
      v0 <= s_axis_tvalid;
      l0 <= s_axis_tlast;
      x0 <= s_axis_tdata;
    end
  end

  // ---- S1: normalisation -----------------------------------------------------
  logic signed [SAMPLE_W+1:0] x_centered;
  logic signed [63:0]         x_scaled;
  q_t   xn1;
  logic v1, l1;
  always_comb begin
    x_centered = (SAMPLE_W+2)'(x0) - (SAMPLE_W+2)'(IN_OFFSET);
    x_scaled   = (64'(x_centered) * 64'(IN_SCALE)) >>> IN_SHIFT;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      l1  <= 1'b0;
      xn1 <= '0;
    end else if (adv) begin
      v1  <= v0;
      l1  <= l0;
      xn1 <= sat_q(x_scaled);
    end
  end

  // ---- window shift register -------------------------------------------------
  // sr holds the eight samples before xn1; the MAC sees {sr, xn1}.
  q_t sr  [NUM_TAPS-1];
  q_t win [NUM_TAPS];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TAPS-1; i++) sr[i] <= '0;
    end else if (adv && v1) begin
      for (int i = 0; i < NUM_TAPS-2; i++) sr[i] <= sr[i+1];
      sr[NUM_TAPS-2] <= xn1;
    end
  end
  always_comb begin
    for (int i = 0; i < NUM_TAPS-1; i++) win[i] = sr[i];
    win[NUM_TAPS-1] = xn1;
  end

  // ---- S2..S4: weighted sum --------------------------------------------------
  q_t   z4;
  logic v4, z_sat;
  logic [MAC_DEPTH-1:0] l_mac;
  neuron_mac #(.WEIGHTS(WEIGHTS), .BIAS(BIAS)) u_mac (
    .clk, .rst_n, .en(adv), .in_valid(v1), .win,
    .out_valid(v4), .z(z4), .saturated(z_sat)
  );
  always_ff @(posedge clk) begin
    if (!rst_n)   l_mac <= '0;
    else if (adv) l_mac <= {l_mac[MAC_DEPTH-2:0], l1};
  end

  // ---- S5: LUT address ---------------------------------------------------------
  logic [LUT_ADDR_W-1:0] addr5;
  logic v5, l5, clamp_lo, clamp_hi;
  tanh_index u_index (
    .clk, .rst_n, .en(adv), .z(z4), .addr(addr5), .clamp_lo, .clamp_hi
  );

  // ---- S6: tanh ROM ------------------------------------------------------------
  q_t   y6;
  logic v6, l6;
  tanh_rom u_rom (.clk, .en(adv), .addr(addr5), .data(y6));

  // ---- S7, S8: output scaling and offset -------------------------------------
  logic signed [Q_W+31:0] p7;
  sample_t e8;
  logic    v7, l7, v8, l8;
  logic signed [Q_W+33:0] e_wide;
  always_comb e_wide = (Q_W+34)'(p7 >>> Q_FRAC) + (Q_W+34)'(OUT_OFFSET);

  always_ff @(posedge clk) begin
    if (adv) begin
      p7 <= (Q_W+32)'(y6) * (Q_W+32)'(OUT_SCALE);
      if (e_wide > (Q_W+34)'(Q_MAX))      e8 <= sample_t'(Q_MAX);
      else if (e_wide < (Q_W+34)'(Q_MIN)) e8 <= sample_t'(Q_MIN);
      else                                e8 <= sample_t'(e_wide);
    end
  end

  // ---- valid / last for S5..S9 and the output register -----------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {v5, v6, v7, v8} <= '0;
      {l5, l6, l7, l8} <= '0;
      m_axis_tvalid    <= 1'b0;
      m_axis_tlast     <= 1'b0;
      m_axis_tdata     <= '0;
    end else if (adv) begin
      v5 <= v4;            l5 <= l_mac[MAC_DEPTH-1];
      v6 <= v5;            l6 <= l5;
      v7 <= v6;            l7 <= l6;
      v8 <= v7;            l8 <= l7;
      m_axis_tvalid <= v8;
      m_axis_tlast  <= l8;
      m_axis_tdata  <= e8;
    end
  end

  // ---- status ---------------------------------------------------------------
  logic sat5;
  always_ff @(posedge clk) begin
    if (!rst_n)   sat5 <= 1'b0;
    else if (adv) sat5 <= z_sat;
  end
  assign ev_clamp_lo = adv && v5 && clamp_lo;
  assign ev_clamp_hi = adv && v5 && clamp_hi;
  assign ev_sum_sat  = adv && v5 && sat5;

  // ---- stream rule -------------------------------------------------------------
  // An offered output word stays put until it is taken.
  logic    held_valid, held_last;
  sample_t held_data;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_valid <= 1'b0;
      held_last  <= 1'b0;
      held_data  <= '0;
    end else begin
      if (held_valid)
        a_hold: assert (m_axis_tvalid && m_axis_tdata == held_data && m_axis_tlast == held_last)
          else $error("m_axis word changed while stalled");
      held_valid <= m_axis_tvalid && !m_axis_tready;
      held_last  <= m_axis_tlast;
      held_data  <= m_axis_tdata;
    end
  end

endmodule
