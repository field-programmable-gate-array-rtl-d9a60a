// fcnn_pkg: sizes, number formats and shared types of the 16:4:16 fully
// connected network.
//
// All weights and biases are 9-bit two's complement numbers scaled by 256
// (Q8), the input data are 9-bit two's complement and every product is
// scaled back by dropping its 8 least significant bits. Hidden-layer outputs
// (tansig) and network outputs (purelin) are 10-bit two's complement Q8.
// The network shape and the arithmetic counts (8 multipliers in the hidden
// unit, two output units of 2 multipliers each) follow the reduced
// architecture; the configuration-bus encoding below is this design's own.
package fcnn_pkg;

  localparam int N        = 9;   // data / weight width
  localparam int FRAC     = 8;   // fraction bits (scale 256)
  localparam int N_IN     = 16;  // input layer size
  localparam int N_HID    = 4;   // hidden neurons
  localparam int N_OUT    = 16;  // output neurons
  localparam int HID_MULT = 8;   // multipliers in the reduced hidden unit
  localparam int OUT_UNITS = 2;  // parallel output-neuron units
  localparam int OUT_MULT = 2;   // multipliers per output unit
  localparam int YW       = 10;  // hidden output / output-layer data width
  localparam int OW       = 10;  // network output width

  // Target of a word written on the serial configuration bus.
  typedef enum logic [2:0] {
    CFG_HID_W  = 3'd0,   // hidden weights, neuron 1 w1..w16, neuron 2 ...
    CFG_HID_B  = 3'd1,   // hidden biases b1..b4
    CFG_OUT_W0 = 3'd2,   // output unit 0 weights (outputs 1..8, 4 each)
    CFG_OUT_B0 = 3'd3,   // output unit 0 biases
    CFG_OUT_W1 = 3'd4,   // output unit 1 weights (outputs 9..16)
    CFG_OUT_B1 = 3'd5    // output unit 1 biases
  } cfg_sel_e;

endpackage
