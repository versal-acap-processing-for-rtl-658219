// tanh_rom: read-only table of the quantised hyperbolic tangent used as the
// perceptron's activation function.
//
// DEPTH entries (5000 by default, as in the design description) hold tanh()
// of the centres of equal bins spanning the Q2.14 input interval
// [ZMIN_Q, ZMIN_Q + SPAN_Q] = [-0.7, 0.8]:
//   rom[i] = round(tanh((ZMIN_Q + (i + 0.5) * SPAN_Q / DEPTH) / 2^14) * 2^14)
// The table is computed when the design is elaborated, so no data file is
// needed; synthesis maps it to a block ROM. Storing bin centres and Q1.14
// outputs is this implementation's choice.
//
// Interface: addr is sampled on a rising clk edge while en is high; data holds
// the entry from the next edge on (one cycle read latency) and is kept while
// en is low. An address of DEPTH or more reads the last entry.
module tanh_rom
  import tilecal_pkg::*;
#(
  parameter int DEPTH  = LUT_DEPTH,
  parameter int ZMIN_Q = LUT_ZMIN_Q,
  parameter int SPAN_Q = LUT_SPAN_Q,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output q_t                data
);

  q_t rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      rom[i] = q_t'($rtoi($floor($tanh((real'(ZMIN_Q) + (real'(i) + 0.5) * real'(SPAN_Q)
                                        / real'(DEPTH)) / 16384.0) * 16384.0 + 0.5)));
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (int'(addr) < DEPTH) data <= rom[addr];
      else                    data <= rom[DEPTH-1];
    end
  end

endmodule
