// tanh_index: turns the neuron's weighted sum into the address of its tanh
// quantisation bin (the "LUT" stage in front of the tanh ROM).
//
// For a Q2.14 input z the bin is floor((z - ZMIN_Q) * IDX_MUL / 2^IDX_SHIFT),
// a multiply by the reciprocal of the bin width instead of a division. Inputs
// below the table interval give address 0 and raise clamp_lo; inputs at or
// above its upper end give DEPTH-1 and raise clamp_hi, so tanh saturates at
// the table's end values. The table range and depth follow the design
// description; the reciprocal-multiply form and the clamping are this
// implementation's choice.
//
// Interface: registered, one cycle latency; z is sampled on a rising clk edge
// while en is high. Synchronous active-low reset clears the outputs.
module tanh_index
  import tilecal_pkg::*;
#(
  parameter int DEPTH     = LUT_DEPTH,
  parameter int ZMIN_Q    = LUT_ZMIN_Q,
  parameter int IDX_MUL   = LUT_IDX_MUL,
  parameter int IDX_SHIFT = LUT_IDX_SHIFT,
  parameter int ADDR_W    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  q_t                z,
  output logic [ADDR_W-1:0] addr,
  output logic              clamp_lo,
  output logic              clamp_hi
);

  logic signed [Q_W+1:0]  offs;   // z - ZMIN_Q, never overflows
  logic signed [Q_W+33:0] scaled; // offs * IDX_MUL
  logic signed [Q_W+33:0] bin;

  always_comb begin
    offs   = (Q_W+2)'(z) - (Q_W+2)'(ZMIN_Q);
    scaled = (Q_W+34)'(offs) * (Q_W+34)'(IDX_MUL);
    bin    = scaled >>> IDX_SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr     <= '0;
      clamp_lo <= 1'b0;
      clamp_hi <= 1'b0;
    end else if (en) begin
      clamp_lo <= offs < 0;
      clamp_hi <= bin > (Q_W+34)'(DEPTH - 1);
      if (offs < 0)                         addr <= '0;
      else if (bin > (Q_W+34)'(DEPTH - 1))  addr <= ADDR_W'(DEPTH - 1);
      else                                  addr <= ADDR_W'(bin);
    end
  end

endmodule
