// fcnn_top: 16:4:16 fully connected network (reduced pipelined structure).
//
// An input vector of 16 words is streamed in on x_data/x_valid (X1 first,
// accepted while x_ready). The hidden layer unit computes the four tansig
// outputs Y1..Y4 with one shared neuron datapath (8 multipliers, 8 adders,
// one tansig ROM) and hands them to the output layer, whose two parallel
// units compute the 16 purelin outputs X'1..X'16 (4 multipliers, 4 adders in
// all). The two layers form a two-stage pipeline: while the output layer
// works on vector k, the hidden layer already accepts and computes vector
// k+1, and waits with its result if the output layer is still busy.
// `out_valid` pulses for one clock when `out_data` holds a complete result
// vector (X'1 at index 0); it stays there until the next vector's first
// output is written (about 2N+14 clocks later).
//
// Configuration: all weights and biases are written once, while the network
// is idle, through a serial bus: each cycle with `cfg_valid` shifts
// `cfg_data` into the memory chosen by `cfg_sel` (see fcnn_pkg::cfg_sel_e
// for the order of the words). Formats: X and all weights and biases 9-bit
// two's complement scaled by 256; hidden and network outputs 10-bit scaled
// by 256. Timing at the default sizes (N = 9): a vector's result appears
// 24N+134 = 350 clocks after its first word; with the input kept full, a
// result follows every 16N+53 = 197 clocks, the output layer being the
// slower stage.
// The network shape and its datapath stages follow the architecture; the
// streaming and configuration interfaces are this design's own.
module fcnn_top
  import fcnn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_valid,
  input  cfg_sel_e             cfg_sel,
  input  logic signed [N-1:0]  cfg_data,
  input  logic                 x_valid,
  input  logic signed [N-1:0]  x_data,
  output logic                 x_ready,
  output logic signed [YW-1:0] hid_y [N_HID],   // hidden outputs (observation)
  output logic                 hid_valid,       // hidden result waiting
  output logic signed [OW-1:0] out_data [N_OUT],
  output logic                 out_valid
);
  logic                 y_ready;
  logic [OUT_UNITS-1:0] ow_load, ob_load;

  assign ow_load = {cfg_valid && cfg_sel == CFG_OUT_W1, cfg_valid && cfg_sel == CFG_OUT_W0};
  assign ob_load = {cfg_valid && cfg_sel == CFG_OUT_B1, cfg_valid && cfg_sel == CFG_OUT_B0};

  hidden_layer u_hidden (
    .clk, .rst_n,
    .cfg_w_load (cfg_valid && cfg_sel == CFG_HID_W),
    .cfg_b_load (cfg_valid && cfg_sel == CFG_HID_B),
    .cfg_data,
    .x_valid, .x_data, .x_ready,
    .y          (hid_y),
    .y_valid    (hid_valid),
    .y_ready
  );

  output_layer u_output (
    .clk, .rst_n,
    .cfg_w_load (ow_load),
    .cfg_b_load (ob_load),
    .cfg_data,
    .start      (hid_valid),
    .y          (hid_y),
    .ready      (y_ready),
    .o          (out_data),
    .done       (out_valid)
  );

endmodule
