// tb_output_neuron: loads random weights and biases into one output-neuron
// unit (8 outputs of 4 inputs), applies random hidden vectors and checks
// all 8 outputs against sat10(sum floor(y*w/256) + b), including vectors
// that saturate the purelin output at both ends. Checks that `done` comes
// 16N+52 = 196 clocks after `start` and that `ready` is low meanwhile.
module tb_output_neuron;
  import fcnn_ref_pkg::*;
  localparam int NO = 8, NI = 4, W = 9, NB = 9;
  localparam int LAT = 16 * NB + 52;
  logic clk = 0, rst_n = 0, cfg_w_load = 0, cfg_b_load = 0, start = 0;
  logic signed [W-1:0] cfg_data;
  logic signed [9:0] y [NI];
  logic ready, done;
  logic signed [9:0] o [NO];
  int checks = 0, failures = 0;
  int wt [NO][NI];
  int bs [NO];
  int ys [NI];
  int cyc = 0, n_sat = 0;

  output_neuron dut (.*);

  // output j is stored 2N+9 + j*(2N+6) clocks after start
  int j_store = 0, s_cyc = 0;
  always @(negedge clk) begin
    if (rst_n && start) s_cyc = cyc + 1;
    if (rst_n && dut.c_valid) begin
      checks++;
      if (cyc - s_cyc + 1 != 2 * NB + 9 + j_store * (2 * NB + 6)) begin
        failures++;
        $display("FAIL O%0d stored %0d clocks after start", j_store + 1, cyc - s_cyc + 1);
      end
      j_store = (j_store + 1) % NO;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_data = '0;
    for (int i = 0; i < NI; i++) y[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 0; j < NO; j++)
      for (int i = 0; i < NI; i++) begin
        wt[j][i] = srand(256);
        cfg_w_load = 1; cfg_data = W'(wt[j][i]);
        @(negedge clk);
      end
    cfg_w_load = 0;
    for (int j = 0; j < NO; j++) begin
      bs[j] = srand(255);
      cfg_b_load = 1; cfg_data = W'(bs[j]);
      @(negedge clk);
    end
    cfg_b_load = 0;
    for (int t = 0; t < 30; t++) begin
      int s0, lat;
      for (int i = 0; i < NI; i++) begin
        ys[i] = (t < 4) ? ((t % 2) ? 511 : -512) : srand(195);
        y[i] = 10'(ys[i]);
      end
      start = 1;
      @(negedge clk);
      s0 = cyc;
      start = 0;
      for (int i = 0; i < NI; i++) y[i] = 10'(srand(500));  // inputs are latched
      while (!done) begin
        @(negedge clk);
        checks++;
        if (ready && !done) begin failures++; $display("FAIL ready while busy"); end
      end
      lat = cyc - s0;
      checks++;
      if (lat != LAT) begin failures++; $display("FAIL latency %0d expected %0d", lat, LAT); end
      for (int j = 0; j < NO; j++) begin
        int c;
        c = bs[j];
        for (int i = 0; i < NI; i++) c += sprod(ys[i], wt[j][i]);
        if (c != sat(c, 10)) n_sat++;
        checks++;
        if (o[j] !== 10'(sat(c, 10))) begin
          failures++;
          $display("FAIL vector %0d O%0d = %0d expected %0d", t, j + 1, o[j], sat(c, 10));
        end
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no output saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
