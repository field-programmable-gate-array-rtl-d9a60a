// tb_output_layer: loads weights and biases into both output units of the
// parallel output layer, applies random hidden vectors and checks all 16
// outputs (O1..O8 from unit 0, O9..O16 from unit 1) against the reference,
// and that the layer finishes in the time of one unit: 196 clocks.
module tb_output_layer;
  import fcnn_ref_pkg::*;
  localparam int NOUT = 16, NI = 4, W = 9, NB = 9;
  localparam int LAT = 16 * NB + 52;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] cfg_w_load = '0, cfg_b_load = '0;
  logic signed [W-1:0] cfg_data;
  logic signed [9:0] y [NI];
  logic ready, done;
  logic signed [9:0] o [NOUT];
  int checks = 0, failures = 0;
  int wt [NOUT][NI];
  int bs [NOUT];
  int ys [NI];
  int cyc = 0;

  output_layer dut (.*);

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
    for (int j = 0; j < NOUT; j++) begin
      for (int i = 0; i < NI; i++) wt[j][i] = srand(256);
      bs[j] = srand(255);
    end
    for (int u = 0; u < 2; u++) begin
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < NI; i++) begin
          cfg_w_load = 2'(1 << u); cfg_data = W'(wt[u*8 + j][i]);
          @(negedge clk);
        end
      cfg_w_load = '0;
      for (int j = 0; j < 8; j++) begin
        cfg_b_load = 2'(1 << u); cfg_data = W'(bs[u*8 + j]);
        @(negedge clk);
      end
      cfg_b_load = '0;
    end
    for (int t = 0; t < 20; t++) begin
      int s0, lat;
      checks++;
      if (!ready) begin failures++; $display("FAIL not ready"); end
      for (int i = 0; i < NI; i++) begin
        ys[i] = srand(300);
        y[i] = 10'(ys[i]);
      end
      start = 1;
      @(negedge clk);
      s0 = cyc;
      start = 0;
      while (!done) @(negedge clk);
      lat = cyc - s0;
      checks++;
      if (lat != LAT) begin failures++; $display("FAIL latency %0d expected %0d", lat, LAT); end
      for (int j = 0; j < NOUT; j++) begin
        int c;
        c = bs[j];
        for (int i = 0; i < NI; i++) c += sprod(ys[i], wt[j][i]);
        checks++;
        if (o[j] !== 10'(sat(c, 10))) begin
          failures++;
          $display("FAIL vector %0d O%0d = %0d expected %0d", t, j + 1, o[j], sat(c, 10));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
