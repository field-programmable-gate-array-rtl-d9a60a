// tb_input_reg_chain: shifts random 16-word vectors into the input register
// chain with C = 1 and checks that the multiplier-side outputs read zero
// during loading and X1..X16 in order once C returns to 0, and that they
// hold while C stays 0.
module tb_input_reg_chain;
  localparam int DEPTH = 16, W = 9;
  logic clk = 0, rst_n = 0, c = 0;
  logic signed [W-1:0] din;
  logic signed [W-1:0] x [DEPTH];
  int checks = 0, failures = 0;
  int vec [DEPTH];

  input_reg_chain #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < DEPTH; i++) begin
        vec[i] = fcnn_ref_pkg::srand(255);
        @(negedge clk); c = 1; din = W'(vec[i]);
        #1;
        checks++;
        if (x[i] !== '0) begin failures++; $display("FAIL demux not idle"); end
      end
      @(negedge clk); c = 0; din = W'(fcnn_ref_pkg::srand(255));
      repeat (1 + t % 3) begin
        #1;
        for (int i = 0; i < DEPTH; i++) begin
          checks++;
          if (x[i] !== W'(vec[i])) begin
            failures++;
            $display("FAIL vec %0d X%0d = %0d expected %0d", t, i + 1, x[i], vec[i]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
