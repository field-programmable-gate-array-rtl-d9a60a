// input_reg_chain: first-stage input registers with the second-stage
// demultiplexers of the hidden unit.
//
// DEPTH registers of W bits form a chain loaded from the top: while the
// control input C is 1, each clock shifts `din` into the top register and
// every register's content moves to the next one, so after DEPTH loads input
// X1 sits in the bottom register. While C is 0 the registers hold and the
// demultiplexers route their contents to the multiplier side: `x[i]` is
// input X(i+1); it reads zero while C is 1. The register chain and the C
// control follow the architecture; the zero value on the idle demux outputs
// is this design's choice.
module input_reg_chain #(
  parameter int DEPTH = 16,
  parameter int W     = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                c,      // 1: load/shift, 0: feed multipliers
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] x [DEPTH]
);
  logic signed [W-1:0] r [DEPTH];   // r[0] is the top register

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
    end else if (c) begin
      r[0] <= din;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) x[i] = c ? '0 : r[DEPTH-1-i];
  end

endmodule
