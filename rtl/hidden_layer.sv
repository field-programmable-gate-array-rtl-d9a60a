// hidden_layer: reduced, pipelined hidden layer of the 16:4:16 network.
//
// One neuron datapath is reused for the four hidden neurons. An input vector
// X1..X16 is shifted into the input register chain (control C = 1), one word
// per accepted `x_valid`, while the weights of neuron 1 are shifted from the
// 64-deep circular weight SISO into the depth-2 SISOs of the 8-multiplier
// array (control D). Then, for each neuron n = 1..4:
//   * the multiplier array forms the 16 products in two rounds of N clocks
//     (odd inputs, then even inputs) into registers V1..V16;
//   * the pipelined adder array adds them and the neuron's bias (7 clocks),
//     and the tansig ROM maps the saturated sum to Y(n), which is stored in
//     the depth-4 output register;
//   * meanwhile the next neuron's 16 weights are shifted in, so the adder
//     array of neuron n overlaps the weight loading of neuron n+1.
// When all four outputs are stored, `y_valid` is raised and held until the
// next stage takes them (`y_ready`); then a new vector is accepted. After
// each vector the weight and bias SISOs have made a full turn and are back in
// their loaded order.
//
// Configuration: while idle, `cfg_w_load` shifts `cfg_data` into the weight
// SISO (64 words: neuron 1 w1..w16, then neuron 2, ...) and `cfg_b_load`
// into the bias SISO (b1..b4). Number format: weights and biases 9-bit Q8,
// X 9-bit, products scaled back by 2^-8, Y 10-bit Q8.
// Timing (N = 9 = weight width): the first output is stored 2N+10 clocks
// after the clock that takes the last input word, each further one 2N+18
// clocks later, and `y_valid` rises one clock after the fourth: 8N+65 = 137
// clocks after the last input word.
// The datapath stages follow the architecture; the handshakes, the
// saturation of the ROM address and the overlap of adding with weight
// loading are this design's choices.
module hidden_layer
  import fcnn_pkg::*;
#(
  parameter int NI   = N_IN,      // inputs
  parameter int NH   = N_HID,     // hidden neurons
  parameter int M    = HID_MULT,  // multipliers (NI/2)
  parameter int W    = N,         // data / weight width
  parameter int F    = FRAC,
  parameter int OUTW = YW         // tansig output width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  cfg_w_load,
  input  logic                  cfg_b_load,
  input  logic signed [W-1:0]   cfg_data,
  // input vector, one word per accepted cycle, X1 first
  input  logic                  x_valid,
  input  logic signed [W-1:0]   x_data,
  output logic                  x_ready,
  // hidden outputs Y1..Y4
  output logic signed [OUTW-1:0] y [NH],
  output logic                  y_valid,
  input  logic                  y_ready
);
  localparam int PW = 2*W - F;                 // scaled product width
  localparam int SW = PW + $clog2(NI) + 1;     // adder array output width
  localparam int CW = $clog2(NI + 1);
  localparam int HW = $clog2(NH + 1);

  typedef enum logic [2:0] {S_LOAD, S_MSTART, S_MWAIT, S_WLOAD, S_DRAIN, S_HOLD} state_e;
  state_e state;

  logic [CW-1:0] cnt;
  logic [HW-1:0] n_started, n_done;

  // control signals
  logic c_load;      // C: input chain shifts
  logic d_load;      // D: weight chain shifts (and weight SISO turns)
  logic m_start, b_take;

  logic signed [W-1:0]  xv [NI];
  logic signed [W-1:0]  w_head, b_head;
  logic signed [PW-1:0] v [NI];
  logic                 v_valid, m_busy;
  logic signed [SW-1:0] c_sum;
  logic                 c_valid;
  logic        [W-1:0]  rom_addr;
  logic signed [OUTW-1:0] rom_q;
  logic                 rom_valid;

  assign x_ready = (state == S_LOAD);
  assign c_load  = (state == S_LOAD) && x_valid;
  assign d_load  = c_load || (state == S_WLOAD);
  assign m_start = (state == S_MSTART);
  assign b_take  = (state == S_MWAIT) && v_valid;
  assign y_valid = (state == S_HOLD);

  input_reg_chain #(.DEPTH(NI), .W(W)) u_in (
    .clk, .rst_n, .c(c_load), .din(x_data), .x(xv)
  );

  weight_siso #(.DEPTH(NI*NH), .W(W)) u_wmem (
    .clk, .rst_n, .load(cfg_w_load), .din(cfg_data), .rot(d_load), .head(w_head)
  );

  weight_siso #(.DEPTH(NH), .W(W)) u_bmem (
    .clk, .rst_n, .load(cfg_b_load), .din(cfg_data), .rot(b_take), .head(b_head)
  );

  mult_array #(.M(M), .AW(W), .BW(W), .FRAC(F)) u_mul (
    .clk, .rst_n, .w_in(w_head), .w_shift(d_load), .start(m_start),
    .x(xv), .v, .v_valid, .busy(m_busy)
  );

  adder_array #(.L(NI), .IW(PW), .BIW(W)) u_add (
    .clk, .rst_n, .start(b_take), .v, .bias(b_head), .sum(c_sum), .valid(c_valid)
  );

  // ROM address: the Q8 sum saturated to the ROM's input range [-1, 1)
  always_comb begin
    if (c_sum > SW'(2**(W-1) - 1))       rom_addr = W'(2**(W-1) - 1);
    else if (c_sum < -SW'(2**(W-1)))     rom_addr = W'(2**(W-1));
    else                                 rom_addr = c_sum[W-1:0];
  end

  tansig_rom #(.AW(W), .DW(OUTW)) u_rom (
    .clk, .en(c_valid), .addr(rom_addr), .q(rom_q)
  );

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      n_started <= '0;
      n_done    <= '0;
      rom_valid <= 1'b0;
      for (int i = 0; i < NH; i++) y[i] <= '0;
    end else begin
      rom_valid <= c_valid;
      if (rom_valid) begin
        y[n_done[$clog2(NH)-1:0]] <= rom_q;
        n_done <= n_done + 1'b1;
      end
      case (state)
        S_LOAD: if (c_load) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NI - 1)) begin
            cnt   <= '0;
            state <= S_MSTART;
          end
        end
        S_MSTART: state <= S_MWAIT;
        S_MWAIT: if (v_valid) begin
          n_started <= n_started + 1'b1;
          state     <= (n_started == HW'(NH - 1)) ? S_DRAIN : S_WLOAD;
        end
        S_WLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NI - 1)) begin
            cnt   <= '0;
            state <= S_MSTART;
          end
        end
        S_DRAIN: if (n_done == HW'(NH)) state <= S_HOLD;
        S_HOLD: if (y_ready) begin
          n_started <= '0;
          n_done    <= '0;
          state     <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  a_mul_free: assert property (@(posedge clk) disable iff (!rst_n)
    m_start |-> !m_busy) else $error("multiplier array restarted while busy");

  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (cfg_w_load || cfg_b_load) |-> (state == S_LOAD && cnt == '0))
    else $error("configuration written while a vector is in progress");

endmodule
