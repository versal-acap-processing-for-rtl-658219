// neuron_mac: the perceptron's weighted sum, z = sum_{i=0..8} x_i * w_i + b.
//
// Nine parallel multipliers (one DSP slice each) form the products of the
// window samples and the weights; the products are added in groups of three
// (the three DSP columns of a 3x3 array) and the three group sums are then
// added together with the bias. All operands are signed Q2.14; the full
// Q4.28 sum is kept until the end, where it is shifted back to Q2.14
// (rounding towards minus infinity) and saturated to 16 bits. The nine-input
// sum with bias follows the design description; the grouping, rounding and
// saturation are this implementation's choices.
//
// Interface: win[0] is the oldest sample, win[NUM_TAPS-1] the newest. The
// pipeline is three registers deep and advances only while en is high
// (global stall); in_valid travels with the data and comes out as out_valid.
// Synchronous active-low reset clears the valid bits.
module neuron_mac
  import tilecal_pkg::*;
#(
  parameter weights_t WEIGHTS = DEFAULT_WEIGHTS,
  parameter q_t       BIAS    = DEFAULT_BIAS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  q_t   win [NUM_TAPS],
  output logic out_valid,
  output q_t   z,
  output logic saturated
);

  localparam int NUM_GROUPS = NUM_TAPS / 3;
  localparam int ACC_W      = 2 * Q_W + 4;

  typedef logic signed [2*Q_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  prod_t prod  [NUM_TAPS];
  acc_t  group [NUM_GROUPS];
  acc_t  total;
  logic  v_prod, v_group;

  // stage 1: products
  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < NUM_TAPS; i++) prod[i] <= win[i] * WEIGHTS[i];
    end
  end

  // stage 2: three sums of three products
  always_ff @(posedge clk) begin
    if (en) begin
      for (int g = 0; g < NUM_GROUPS; g++) begin
        group[g] <= acc_t'(prod[3*g]) + acc_t'(prod[3*g+1]) + acc_t'(prod[3*g+2]);
      end
    end
  end

  // stage 3: group sums plus bias, back to Q2.14 with saturation
  always_comb begin
    total = acc_t'(BIAS) <<< Q_FRAC;
    for (int g = 0; g < NUM_GROUPS; g++) total += group[g];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      z         <= sat_q(64'(total >>> Q_FRAC));
      saturated <= (total >>> Q_FRAC) > acc_t'(Q_MAX) || (total >>> Q_FRAC) < acc_t'(Q_MIN);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_prod    <= 1'b0;
      v_group   <= 1'b0;
      out_valid <= 1'b0;
    end else if (en) begin
      v_prod    <= in_valid;
      v_group   <= v_prod;
      out_valid <= v_group;
    end
  end

endmodule
