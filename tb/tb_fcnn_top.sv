// tb_fcnn_top: end-to-end test of the 16:4:16 network at its default sizes.
//
// Writes all weights and biases through the configuration bus, then
// streams input vectors as fast as the network takes them (with occasional
// gaps) and checks every 16-word result against a reference model of the
// whole network: Y = tansig(sum floor(x*w/256) + b) for the hidden layer,
// X' = sat10(sum floor(Y*w/256) + b) for the output layer. It checks the
// latency of the first vector and the spacing of results once both layers
// are busy, and counts each mechanism of the design, failing if one never
// happens: gaps in the input stream, the hidden layer waiting for the output
// layer (back-pressure), both layers working at once (layer pipelining),
// tansig-address saturation at both ends and purelin output saturation.
module tb_fcnn_top;
  import fcnn_ref_pkg::*;
  import fcnn_pkg::*;
  localparam int NV = 12;
  // first result: 16 input clocks, hidden 8N+65, handover 1, output 16N+52
  localparam int LAT_FIRST = 16 + (8 * N + 65) + 1 + (16 * N + 52);
  localparam int PERIOD    = 16 * N + 53;   // output layer: 196 + 1 handover

  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0;
  cfg_sel_e cfg_sel;
  logic signed [N-1:0] cfg_data;
  logic x_valid = 0, x_ready;
  logic signed [N-1:0] x_data;
  logic signed [YW-1:0] hid_y [N_HID];
  logic hid_valid;
  logic signed [OW-1:0] out_data [N_OUT];
  logic out_valid;

  int checks = 0, failures = 0;
  int hw [N_HID][N_IN], hb [N_HID];
  int ow [N_OUT][N_HID], ob [N_OUT];
  int xs [NV][N_IN];
  int cyc = 0, first_word_cyc = -1, last_out_cyc = -1, n_out = 0;
  int n_gap = 0, n_backpressure = 0, n_overlap = 0, n_tsat_hi = 0, n_tsat_lo = 0, n_osat = 0;

  fcnn_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_word(cfg_sel_e s, int v);
    cfg_valid = 1; cfg_sel = s; cfg_data = N'(v);
    @(negedge clk);
    cfg_valid = 0;
  endtask

  // reference model of one vector
  task automatic reference(int t, output int res [N_OUT]);
    int y [N_HID];
    for (int n = 0; n < N_HID; n++) begin
      int c;
      c = hb[n];
      for (int i = 0; i < N_IN; i++) c += sprod(xs[t][i], hw[n][i]);
      if (c > 255) n_tsat_hi++;
      if (c < -256) n_tsat_lo++;
      y[n] = tansig_ref(c);
    end
    for (int j = 0; j < N_OUT; j++) begin
      int c;
      c = ob[j];
      for (int i = 0; i < N_HID; i++) c += sprod(y[i], ow[j][i]);
      if (c != sat(c, OW)) n_osat++;
      res[j] = sat(c, OW);
    end
  endtask

  // mechanism monitors
  always @(negedge clk) begin
    if (rst_n) begin
      if (hid_valid && !dut.y_ready) n_backpressure++;
      if (x_ready && !dut.y_ready) n_overlap++;
    end
  end

  // result checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int res [N_OUT];
      reference(n_out, res);
      for (int j = 0; j < N_OUT; j++) begin
        checks++;
        if (out_data[j] !== OW'(res[j])) begin
          failures++;
          $display("FAIL vector %0d X'%0d = %0d expected %0d", n_out, j + 1, out_data[j], res[j]);
        end
      end
      checks++;
      if (n_out == 0 && cyc - first_word_cyc != LAT_FIRST) begin
        failures++;
        $display("FAIL first latency %0d expected %0d", cyc - first_word_cyc, LAT_FIRST);
      end
      if (n_out >= 2 && cyc - last_out_cyc != PERIOD) begin
        failures++;
        $display("FAIL result spacing %0d expected %0d", cyc - last_out_cyc, PERIOD);
      end
      last_out_cyc = cyc;
      n_out++;
    end
  end

  initial begin
    cfg_sel = CFG_HID_W; cfg_data = '0; x_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // weights and biases; hidden neuron 1 has large positive weights and
    // neuron 4 large negative ones so that the tansig address saturates
    for (int n = 0; n < N_HID; n++)
      for (int i = 0; i < N_IN; i++) begin
        hw[n][i] = (n == 0) ? 150 + $urandom_range(100) :
                   (n == 3) ? -150 - $urandom_range(100) : srand(255);
        cfg_word(CFG_HID_W, hw[n][i]);
      end
    for (int n = 0; n < N_HID; n++) begin hb[n] = srand(100); cfg_word(CFG_HID_B, hb[n]); end
    for (int j = 0; j < N_OUT; j++) begin
      for (int i = 0; i < N_HID; i++) ow[j][i] = (j == 0) ? 255 : srand(256);
      ob[j] = (j == 0) ? 255 : srand(255);
    end
    for (int u = 0; u < 2; u++) begin
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < N_HID; i++)
          cfg_word(u ? CFG_OUT_W1 : CFG_OUT_W0, ow[u*8 + j][i]);
      for (int j = 0; j < 8; j++) cfg_word(u ? CFG_OUT_B1 : CFG_OUT_B0, ob[u*8 + j]);
    end
    // input vectors: inputs within +/-64, a few at the extremes
    for (int t = 0; t < NV; t++)
      for (int i = 0; i < N_IN; i++)
        xs[t][i] = (t == 1) ? 255 : (t == 2) ? -256 : srand(64);
    for (int t = 0; t < NV; t++) begin
      for (int i = 0; i < N_IN; i++) begin
        while (!x_ready) @(negedge clk);
        x_valid = 1; x_data = N'(xs[t][i]);
        @(negedge clk);
        if (first_word_cyc < 0) first_word_cyc = cyc - 1;
        x_valid = 0;
        if (t >= NV - 3 && i == 5) begin n_gap++; repeat (3) @(negedge clk); end
      end
    end
    while (n_out < NV) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (n_gap == 0 || n_backpressure == 0 || n_overlap == 0 || n_tsat_hi == 0 ||
        n_tsat_lo == 0 || n_osat == 0) begin
      failures++;
    end
    $display("mechanisms: input gaps %0d, back-pressure clocks %0d, overlap clocks %0d, tansig sat +%0d -%0d, output sat %0d",
             n_gap, n_backpressure, n_overlap, n_tsat_hi, n_tsat_lo, n_osat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
