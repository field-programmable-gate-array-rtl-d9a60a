// tb_hidden_layer: loads random weights and biases into the hidden layer,
// streams random input vectors (with gaps in x_valid) and checks Y1..Y4
// against the reference arithmetic: tansig(sum floor(x*w/256) + b). Some
// vectors use large inputs so that the ROM address saturates at both ends.
// Checks the latency from the last input word to `y_valid` (8N+65 clocks:
// first output 2N+10 clocks after the last word, each further one 2N+18
// later, then one clock to raise y_valid), and that y_valid waits for
// y_ready (back-pressure) with the outputs held.
module tb_hidden_layer;
  import fcnn_ref_pkg::*;
  localparam int NI = 16, NH = 4, W = 9, NB = 9;
  localparam int LAT = 8 * NB + 65;
  logic clk = 0, rst_n = 0;
  logic cfg_w_load = 0, cfg_b_load = 0;
  logic signed [W-1:0] cfg_data;
  logic x_valid = 0, x_ready;
  logic signed [W-1:0] x_data;
  logic signed [9:0] y [NH];
  logic y_valid, y_ready = 0;
  int checks = 0, failures = 0;
  int wt [NH][NI];
  int bs [NH];
  int xs [NI];
  int cyc = 0, last_x_cyc, n_sat_hi = 0, n_sat_lo = 0, n_stall = 0;

  hidden_layer dut (.*);

  // each hidden output is stored 2N+10 + n*(2N+18) clocks after the last word
  int n_store = 0;
  always @(negedge clk) begin
    if (rst_n && dut.rom_valid) begin
      checks++;
      if (cyc - last_x_cyc + 1 != 2 * NB + 10 + n_store * (2 * NB + 18)) begin
        failures++;
        $display("FAIL Y%0d stored %0d clocks after last word", n_store + 1, cyc - last_x_cyc + 1);
      end
      n_store = (n_store + 1) % NH;
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

  task automatic one_vector(int t);
    int c, e, lat;
    // stream the vector, dropping x_valid now and then
    for (int i = 0; i < NI; i++) begin
      if (t < 4) xs[i] = (t % 2) ? 255 : -256;   // drives saturation
      else       xs[i] = srand(64);
      while (!x_ready) @(negedge clk);   // x_ready is stable at negedge
      x_data = W'(xs[i]);
      x_valid = 1;
      @(negedge clk);
      last_x_cyc = cyc;
      if ($urandom_range(3) == 0) begin
        x_valid = 0;
        repeat ($urandom_range(3)) @(negedge clk);
      end
    end
    x_valid = 0;
    while (!y_valid) @(negedge clk);
    lat = cyc - last_x_cyc;
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL latency %0d expected %0d", lat, LAT); end
    // hold y_ready low for a while: y_valid and y must stay
    repeat ($urandom_range(4)) begin
      @(negedge clk);
      n_stall++;
      checks++;
      if (!y_valid || x_ready) begin failures++; $display("FAIL not held"); end
    end
    for (int n = 0; n < NH; n++) begin
      c = bs[n];
      for (int i = 0; i < NI; i++) c += sprod(xs[i], wt[n][i]);
      if (c > 255) n_sat_hi++;
      if (c < -256) n_sat_lo++;
      e = tansig_ref(c);
      checks++;
      if (y[n] !== 10'(e)) begin
        failures++;
        $display("FAIL vector %0d Y%0d = %0d expected %0d (C = %0d)", t, n + 1, y[n], e, c);
      end
    end
    y_ready = 1;
    @(negedge clk);
    y_ready = 0;
  endtask

  initial begin
    cfg_data = '0; x_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NH; n++)
      for (int i = 0; i < NI; i++) begin
        wt[n][i] = (n == 3) ? -srand(255) : srand(255);
        if (n == 0) wt[n][i] = 200 + $urandom_range(55);
        cfg_w_load = 1; cfg_data = W'(wt[n][i]);
        @(negedge clk);
      end
    cfg_w_load = 0;
    for (int n = 0; n < NH; n++) begin
      bs[n] = srand(255);
      cfg_b_load = 1; cfg_data = W'(bs[n]);
      @(negedge clk);
    end
    cfg_b_load = 0;
    for (int t = 0; t < 40; t++) one_vector(t);
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL coverage: sat_hi %0d sat_lo %0d stall %0d", n_sat_hi, n_sat_lo, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
