// weight_siso: serial-in serial-out circular register memory.
//
// Holds the trained weights (or biases) of a layer as a chain of DEPTH
// registers. `load` shifts an external word `din` into the chain, so after
// DEPTH loads the first word written is at the head; `rot` shifts the chain
// and feeds the head back into the tail, so the words come out of `head` in
// the order they were written and, after DEPTH rotations, the memory is back
// in its original state. `load` has priority over `rot`. One shift per clock.
// The 64-deep SISO of the hidden unit and the weight memory and bias FIFO of
// the output units are all instances of this block; making it circular so the
// weights can be reused for every input vector is this design's choice.
module weight_siso #(
  parameter int DEPTH = 64,
  parameter int W     = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] din,
  input  logic                rot,
  output logic signed [W-1:0] head
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (load || rot) begin
      mem[0] <= load ? din : mem[DEPTH-1];
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  assign head = mem[DEPTH-1];

endmodule
