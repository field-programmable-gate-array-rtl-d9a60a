// mult_array: reduced multiplier array (half as many multipliers as inputs).
//
// M serial multipliers serve 2*M inputs in two rounds. Each multiplier is
// fed by a serial-in serial-out weight register of depth two; the M small
// SISOs are chained, so 2*M pulses of `w_shift` move the serially supplied
// weights `w_in` (weight of input 1 first) into place, multiplier k holding
// the weights of inputs 2k+1 and 2k+2. A `start` pulse runs round 0 (inputs
// 1, 3, 5, ...) and then round 1 (inputs 2, 4, 6, ...), each BW cycles long;
// the output demultiplexer writes each product, scaled back by dropping its
// FRAC least significant bits, into product register V(i). `v_valid` pulses
// for one cycle when all 2*M products are in `v`, 2*BW cycles after `start`.
// The multipliers latch their operands at the start of a round, so the
// weight chain may be reloaded once round 1 has begun. The two-round use of
// the multipliers and the depth-2 SISOs follow the architecture; the chained
// SISO loading order is this design's choice.
module mult_array #(
  parameter int M    = 8,    // multipliers
  parameter int AW   = 9,    // data width
  parameter int BW   = 9,    // weight width (cycles per round)
  parameter int FRAC = 8,    // LSBs dropped from each product
  localparam int L   = 2 * M,
  localparam int PW  = AW + BW - FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [BW-1:0] w_in,
  input  logic                 w_shift,
  input  logic                 start,
  input  logic signed [AW-1:0] x [L],   // x[i] is input i+1
  output logic signed [PW-1:0] v [L],   // v[i] = (x[i]*w[i]) >>> FRAC
  output logic                 v_valid,
  output logic                 busy
);
  typedef enum logic [1:0] {S_IDLE, S_R0, S_R1} state_e;
  state_e state;

  logic signed [BW-1:0]    wc [L];      // chained depth-2 SISOs
  logic                    sel;         // 0: odd inputs (round 0), 1: even
  logic                    m_start;
  logic signed [AW-1:0]    m_a [M];
  logic signed [BW-1:0]    m_b [M];
  logic signed [AW+BW-1:0] m_p [M];
  logic [M-1:0]            m_done;
  logic [M-1:0]            m_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) wc[i] <= '0;
    end else if (w_shift) begin
      wc[0] <= w_in;
      for (int i = 1; i < L; i++) wc[i] <= wc[i-1];
    end
  end

  assign sel     = (state == S_R0);
  assign m_start = (state == S_IDLE && start) || (state == S_R0 && m_done[0]);

  for (genvar k = 0; k < M; k++) begin : g_mul
    assign m_a[k] = x[2*k + int'(sel)];
    assign m_b[k] = wc[L-1-(2*k + int'(sel))];
    seq_mult #(.AW(AW), .BW(BW)) u_mul (
      .clk, .rst_n,
      .start (m_start),
      .a     (m_a[k]),
      .b     (m_b[k]),
      .busy  (m_busy[k]),
      .done  (m_done[k]),
      .p     (m_p[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      v_valid <= 1'b0;
      for (int i = 0; i < L; i++) v[i] <= '0;
    end else begin
      v_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) state <= S_R0;
        S_R0: if (m_done[0]) begin
          for (int k = 0; k < M; k++) v[2*k] <= m_p[k][AW+BW-1:FRAC];
          state <= S_R1;
        end
        S_R1: if (m_done[0]) begin
          for (int k = 0; k < M; k++) v[2*k+1] <= m_p[k][AW+BW-1:FRAC];
          v_valid <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // All multipliers start together and take the same number of clocks.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    m_done[0] |-> &m_done) else $error("multipliers out of step");
  a_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE) |-> !(|m_busy)) else $error("multiplier busy while idle");

endmodule
