// output_layer: parallel output layer built from two pipelined neurons.
//
// The 16 output neurons are shared between UNITS identical output_neuron
// datapaths working in parallel on the same hidden vector: unit 0 computes
// outputs O1..O8 and unit 1 outputs O9..O16, so the layer needs 4
// multipliers and 4 adders in all and takes as long as one unit needs for 8
// outputs. `start` (accepted while `ready`) hands over the hidden outputs Y;
// `done` pulses when all 16 outputs are in the output memory `o` (O1 at
// index 0). Each unit has its own weight memory and bias FIFO, written
// through `cfg_w_load[u]` / `cfg_b_load[u]` with the shared `cfg_data`.
// The split into two units of eight outputs follows the architecture.
module output_layer
  import fcnn_pkg::*;
#(
  parameter int UNITS = OUT_UNITS,
  parameter int NOUT  = N_OUT,
  parameter int NI    = N_HID,
  parameter int AW    = YW,
  parameter int W     = N,
  parameter int OUTW  = OW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [UNITS-1:0]       cfg_w_load,
  input  logic [UNITS-1:0]       cfg_b_load,
  input  logic signed [W-1:0]    cfg_data,
  input  logic                   start,
  input  logic signed [AW-1:0]   y [NI],
  output logic                   ready,
  output logic signed [OUTW-1:0] o [NOUT],
  output logic                   done
);
  localparam int NO = NOUT / UNITS;

  logic [UNITS-1:0] u_ready, u_done;

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    logic signed [OUTW-1:0] uo [NO];
    output_neuron #(.NO(NO), .NI(NI), .AW(AW), .W(W), .OUTW(OUTW)) u_neuron (
      .clk, .rst_n,
      .cfg_w_load (cfg_w_load[u]),
      .cfg_b_load (cfg_b_load[u]),
      .cfg_data,
      .start      (start && ready),
      .y,
      .ready      (u_ready[u]),
      .o          (uo),
      .done       (u_done[u])
    );
    for (genvar j = 0; j < NO; j++) begin : g_o
      assign o[u*NO + j] = uo[j];
    end
  end

  assign ready = &u_ready;
  assign done  = u_done[0];

  a_units_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    u_done[0] |-> &u_done) else $error("output units out of step");

endmodule
