// tilecal_nn_system: the programmable-logic part of the TileCal
// reconstruction system, NUM_CORES neural-network cores working side by side.
//
// Each core is an axis_perceptron with its own AXI4-Stream input and output.
// In the complete system every core sits behind its own DMA engine, which
// reads sample blocks from DDR memory through the network on chip and writes
// the results back; the host spreads the events over the cores so that they
// process independent blocks in parallel. The DMA engines, the AXI
// interconnect, the network on chip, the memory and the processors are
// vendor or hard blocks and are not part of this RTL: each core's stream
// ports are brought out here, indexed by core, where its DMA engine's MM2S
// (samples in) and S2MM (results out) streams connect.
//
// The replicated-core organisation follows the design description; 10 cores
// is the default because it is the configuration that gave the shortest
// transfer times in the reported measurements. All cores share the same
// coefficients. Timing per core is that of axis_perceptron: one sample per
// clock, 10 register stages, global stall on output backpressure.
module tilecal_nn_system
  import tilecal_pkg::*;
#(
  parameter int       NUM_CORES  = 10,
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
  // per-core sample streams (from each core's DMA MM2S channel)
  input  logic    s_axis_tvalid [NUM_CORES],
  output logic    s_axis_tready [NUM_CORES],
  input  sample_t s_axis_tdata  [NUM_CORES],
  input  logic    s_axis_tlast  [NUM_CORES],
  // per-core result streams (to each core's DMA S2MM channel)
  output logic    m_axis_tvalid [NUM_CORES],
  input  logic    m_axis_tready [NUM_CORES],
  output sample_t m_axis_tdata  [NUM_CORES],
  output logic    m_axis_tlast  [NUM_CORES],
  // per-core status pulses, see axis_perceptron
  output logic    ev_clamp_lo   [NUM_CORES],
  output logic    ev_clamp_hi   [NUM_CORES],
  output logic    ev_sum_sat    [NUM_CORES]
);

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    axis_perceptron #(
      .WEIGHTS(WEIGHTS), .BIAS(BIAS),
      .IN_OFFSET(IN_OFFSET), .IN_SCALE(IN_SCALE), .IN_SHIFT(IN_SHIFT),
      .OUT_SCALE(OUT_SCALE), .OUT_OFFSET(OUT_OFFSET)
    ) u_core (
      .clk, .rst_n,
      .s_axis_tvalid(s_axis_tvalid[c]), .s_axis_tready(s_axis_tready[c]),
      .s_axis_tdata (s_axis_tdata[c]),  .s_axis_tlast (s_axis_tlast[c]),
      .m_axis_tvalid(m_axis_tvalid[c]), .m_axis_tready(m_axis_tready[c]),
      .m_axis_tdata (m_axis_tdata[c]),  .m_axis_tlast (m_axis_tlast[c]),
      .ev_clamp_lo(ev_clamp_lo[c]), .ev_clamp_hi(ev_clamp_hi[c]), .ev_sum_sat(ev_sum_sat[c])
    );
  end

endmodule
