// adder_array: pipelined adder array with bias adder.
//
// Sums L products and a bias with only L/4 + L/8 + ... + 1 adders plus one
// bias adder. Each adder stage has half the adders a plain tree would need
// and is used in two consecutive clocks: in the first (select E = 0) it adds
// the first half of its inputs, in the second (E = 1) the second half, and a
// demultiplexer stores the results in separate stage registers (R1..R12 of
// the 16-input array). The last stage reduces four values to two; the bias
// adder adds the bias to the first of them in the same clock in which the
// second is formed, and adds the second one clock later. For L = 16 this is
// the 4-2-1 array of 7 adders plus the bias adder, 2+2+2+1 = 7 clocks.
//
// Interface: `start` (one cycle) marks that `v` holds the products and
// `bias` the bias; stage 0 adds in that clock and the next, so `v` must stay
// stable for one more clock. The 2*log2(L)-1 adding clocks start with the
// `start` clock; `sum` and the one-cycle `valid` pulse follow the last one.
// A new `start` may follow 2*log2(L)-3 clocks after the previous one, when
// the bias register is free again.
// The stage structure, the two-clock use of each adder and the cycle count
// follow the architecture; the internal width (input width + log2(L) + 1 for
// every register instead of growing by one bit per stage) is this design's
// choice and cannot overflow.
module adder_array #(
  parameter int L   = 16,   // number of products (power of two, >= 4)
  parameter int IW  = 10,   // product width
  parameter int BIW = 9,    // bias width
  localparam int S  = $clog2(L) - 1,      // adder stages before the bias
  localparam int SW = IW + $clog2(L) + 1  // internal and output width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [IW-1:0]  v [L],
  input  logic signed [BIW-1:0] bias,
  output logic signed [SW-1:0]  sum,
  output logic                  valid
);
  // node[0..L-1]: the products; node[L..2L-3]: the stage registers, stage k
  // occupying L>>(k+1) entries from offset L - (L>>k) of r.
  logic signed [SW-1:0] node [2*L-2];
  logic signed [SW-1:0] r    [L-2];     // stage registers (demux targets)
  logic signed [SW-1:0] t;              // bias adder register
  logic signed [SW-1:0] bias_r;
  logic [2*S-1:0]       ph;             // clocks 1..2S of the operation
  logic [2*S:0]         act;            // act[c]: clock c of an operation

  assign act = {ph, start};

  always_comb begin
    for (int i = 0; i < L; i++)     node[i]     = SW'(v[i]);
    for (int i = 0; i < L - 2; i++) node[L + i] = r[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph     <= '0;
      t      <= '0;
      bias_r <= '0;
      sum    <= '0;
      valid  <= 1'b0;
      for (int i = 0; i < L - 2; i++) r[i] <= '0;
    end else begin
      ph    <= act[2*S-1:0];
      valid <= act[2*S];
      if (start) bias_r <= SW'(bias);
            // adder stages: stage k works in clocks 2k (E=0) and 2k+1 (E=1) with
      // L>>(k+2) adders, each adding one pair of its inputs per clock
      for (int k = 0; k < S; k++) begin
        for (int e = 0; e < 2; e++) begin
          if (act[2*k+e]) begin
            for (int j = 0; j < (L >> (k + 2)); j++) begin
              r[L - (L >> k) + j + e*(L >> (k+2))] <=
                  node[2*L - 2*(L >> k) + 2*(j + e*(L >> (k+2)))]
                + node[2*L - 2*(L >> k) + 2*(j + e*(L >> (k+2))) + 1];
            end
          end
        end
      end
      // bias adder: first half with the bias, then the second half
      if (act[2*S-1]) t   <= r[L-4] + bias_r;
      if (act[2*S])   sum <= t + r[L-3];
    end
  end

endmodule
