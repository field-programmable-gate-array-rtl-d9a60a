// tb_mult_array: loads 16 random weights into the chained depth-2 SISOs of
// the 8-multiplier array, starts it on 16 random inputs and checks all 16
// scaled products floor(x*w/256) and that `v_valid` comes 2*BW+1 = 19 clocks
// after `start`. The first set uses the extreme operands -256 and 255.
module tb_mult_array;
  localparam int M = 8, AW = 9, BW = 9, FRAC = 8, L = 2 * M, PW = AW + BW - FRAC;
  logic clk = 0, rst_n = 0, w_shift = 0, start = 0;
  logic signed [BW-1:0] w_in;
  logic signed [AW-1:0] x [L];
  logic signed [PW-1:0] v [L];
  logic v_valid, busy;
  int checks = 0, failures = 0;
  int xs [L], ws [L];

  mult_array #(.M(M), .AW(AW), .BW(BW), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_in = '0;
    for (int i = 0; i < L; i++) x[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int cyc;
      for (int i = 0; i < L; i++) begin
        ws[i] = (t == 0) ? -256 : fcnn_ref_pkg::srand(256 - (i % 2));
        xs[i] = (t == 0) ? ((i % 2) ? 255 : -256) : fcnn_ref_pkg::srand(255);
        @(negedge clk); w_shift = 1; w_in = BW'(ws[i]);
      end
      @(negedge clk); w_shift = 0;
      for (int i = 0; i < L; i++) x[i] = AW'(xs[i]);
      start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!v_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2 * BW + 1) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int i = 0; i < L; i++) begin
        checks++;
        if (v[i] !== PW'(fcnn_ref_pkg::sprod(xs[i], ws[i]))) begin
          failures++;
          $display("FAIL set %0d V%0d = %0d expected %0d", t, i + 1, v[i],
                   fcnn_ref_pkg::sprod(xs[i], ws[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
