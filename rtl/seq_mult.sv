// seq_mult: serial shift-add multiplier for two's complement operands.
//
// The multiplier is computed one bit per clock, least significant bit first:
// for bit i of b the shifted multiplicand a*2^i is added to the accumulator,
// and for the sign bit (i = BW-1) it is subtracted, which gives the signed
// product without sign-extending b. A pulse on `start` latches both operands;
// the product appears on `p` together with a one-cycle `done` pulse exactly
// BW clock cycles later, so the operands may change right after `start`.
// The N-cycle serial multiplier follows the architecture description; the
// shift-add algorithm used for it is this design's choice.
module seq_mult #(
  parameter int AW = 9,   // multiplicand (data) width
  parameter int BW = 9    // multiplier (weight) width = cycles per product
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic signed [AW-1:0]      a,
  input  logic signed [BW-1:0]      b,
  output logic                      busy,
  output logic                      done,
  output logic signed [AW+BW-1:0]   p
);
  localparam int PW = AW + BW;
  localparam int CW = $clog2(BW + 1);

  logic signed [PW-1:0] a_sh;
  logic        [BW-1:0] b_sh;
  logic        [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sh <= '0;
      b_sh <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      p    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        // bit 0 is handled in the start clock itself
        p    <= b[0] ? PW'(a) : '0;
        a_sh <= PW'(a) <<< 1;
        b_sh <= b >> 1;
        cnt  <= CW'(1);
        busy <= 1'b1;
      end else if (busy) begin
        if (b_sh[0]) begin
          if (cnt == CW'(BW - 1)) p <= p - a_sh;
          else                    p <= p + a_sh;
        end
        a_sh <= a_sh <<< 1;
        b_sh <= b_sh >> 1;
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(BW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
