// output_neuron: pipelined single neuron of the output layer.
//
// One neuron datapath computes NO outputs of the output layer one after the
// other. A `start` pulse (accepted while `ready`) loads the four hidden
// outputs into input registers Reg1..Reg4. For each output j the four weights
// are shifted from the circular weight memory into the depth-2 SISOs of a
// 2-multiplier array (4 clocks), the array forms the four products in two
// rounds of N clocks, and the adder array (one adder used twice, then the
// bias adder) adds them and the output's bias from the circular bias FIFO.
// The activation is purelin: the sum is only saturated to OW bits and stored
// in the output memory `o` at index j. Adding overlaps the weight loading of
// the next output. `done` pulses when all NO outputs are stored; `o` then
// holds them until the next vector's first result is written.
//
// Configuration: while idle, `cfg_w_load` shifts `cfg_data` into the weight
// memory (output 1 w1..w4, output 2 w1..w4, ...) and `cfg_b_load` into the
// bias FIFO (b1..bNO). Formats: Y 10-bit Q8, weights and biases 9-bit Q8,
// outputs 10-bit Q8. Timing (N = 9 = weight width): output j (from 0) is
// stored 2N+9 + j*(2N+6) clocks after the `start` clock, and `done` pulses
// one clock after the last: 16N+52 = 196 clocks after `start` for NO = 8.
// The register, multiplier, adder, bias-FIFO and output-memory stages follow
// the architecture; the multiplier and adder split (2 multipliers, 2 adders
// per unit), the serial weight loading and the saturation are this design's
// choices.
module output_neuron
  import fcnn_pkg::*;
#(
  parameter int NO  = N_OUT / OUT_UNITS,  // outputs computed by this unit
  parameter int NI  = N_HID,              // inputs (hidden outputs)
  parameter int M   = OUT_MULT,           // multipliers (NI/2)
  parameter int AW  = YW,                 // input data width
  parameter int W   = N,                  // weight / bias width
  parameter int F   = FRAC,
  parameter int OUTW = OW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_w_load,
  input  logic                   cfg_b_load,
  input  logic signed [W-1:0]    cfg_data,
  input  logic                   start,
  input  logic signed [AW-1:0]   y [NI],
  output logic                   ready,
  output logic signed [OUTW-1:0] o [NO],
  output logic                   done
);
  localparam int PW = AW + W - F;
  localparam int SW = PW + $clog2(NI) + 1;
  localparam int CW = $clog2(NI + 1);
  localparam int JW = $clog2(NO + 1);

  typedef enum logic [2:0] {S_IDLE, S_WLOAD, S_MSTART, S_MWAIT, S_DRAIN} state_e;
  state_e state;

  logic [CW-1:0] cnt;
  logic [JW-1:0] j_started, j_done;

  logic signed [AW-1:0] reg_in [NI];    // Reg1..Reg4
  logic signed [W-1:0]  w_head, b_head;
  logic signed [PW-1:0] v [NI];
  logic                 v_valid, m_busy;
  logic                 d_load, m_start, b_take;
  logic signed [SW-1:0] c_sum;
  logic                 c_valid;
  logic signed [OUTW-1:0] a_out;

  assign ready   = (state == S_IDLE);
  assign d_load  = (state == S_WLOAD);
  assign m_start = (state == S_MSTART);
  assign b_take  = (state == S_MWAIT) && v_valid;

  weight_siso #(.DEPTH(NI*NO), .W(W)) u_wmem (
    .clk, .rst_n, .load(cfg_w_load), .din(cfg_data), .rot(d_load), .head(w_head)
  );

  weight_siso #(.DEPTH(NO), .W(W)) u_bfifo (
    .clk, .rst_n, .load(cfg_b_load), .din(cfg_data), .rot(b_take), .head(b_head)
  );

  mult_array #(.M(M), .AW(AW), .BW(W), .FRAC(F)) u_mul (
    .clk, .rst_n, .w_in(w_head), .w_shift(d_load), .start(m_start),
    .x(reg_in), .v, .v_valid, .busy(m_busy)
  );

  adder_array #(.L(NI), .IW(PW), .BIW(W)) u_add (
    .clk, .rst_n, .start(b_take), .v, .bias(b_head), .sum(c_sum), .valid(c_valid)
  );

  // purelin activation, saturated to the output width
  always_comb begin
    if (c_sum > SW'(2**(OUTW-1) - 1))      a_out = OUTW'(2**(OUTW-1) - 1);
    else if (c_sum < -SW'(2**(OUTW-1)))    a_out = OUTW'(2**(OUTW-1));
    else                                   a_out = c_sum[OUTW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      j_started <= '0;
      j_done    <= '0;
      done      <= 1'b0;
      for (int i = 0; i < NI; i++) reg_in[i] <= '0;
      for (int i = 0; i < NO; i++) o[i] <= '0;
    end else begin
      done <= 1'b0;
      if (c_valid) begin
        o[j_done[$clog2(NO)-1:0]] <= a_out;
        j_done <= j_done + 1'b1;
      end
      case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < NI; i++) reg_in[i] <= y[i];
          j_started <= '0;
          j_done    <= '0;
          cnt       <= '0;
          state     <= S_WLOAD;
        end
        S_WLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NI - 1)) begin
            cnt   <= '0;
            state <= S_MSTART;
          end
        end
        S_MSTART: state <= S_MWAIT;
        S_MWAIT: if (v_valid) begin
          j_started <= j_started + 1'b1;
          state     <= (j_started == JW'(NO - 1)) ? S_DRAIN : S_WLOAD;
        end
        S_DRAIN: if (j_done == JW'(NO)) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_mul_free: assert property (@(posedge clk) disable iff (!rst_n)
    m_start |-> !m_busy) else $error("multiplier array restarted while busy");

  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (cfg_w_load || cfg_b_load) |-> (state == S_IDLE))
    else $error("configuration written while busy");

endmodule
