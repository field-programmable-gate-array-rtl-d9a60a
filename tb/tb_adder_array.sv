// tb_adder_array: feeds random 16-value product sets and biases to the
// pipelined 16-input adder array and checks the sum against a plain
// integer sum and that it arrives 7 clocks after `start`; also runs
// operations back to back, five clocks apart, as the array allows.
module tb_adder_array;
  localparam int L = 16, IW = 10, BIW = 9, SW = IW + $clog2(L) + 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [IW-1:0] v [L];
  logic signed [BIW-1:0] bias;
  logic signed [SW-1:0] sum;
  logic valid;
  int checks = 0, failures = 0;
  int exp_q [$];
  int start_cyc_q [$];
  int cyc = 0;

  adder_array #(.L(L), .IW(IW), .BIW(BIW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: results in order, each 7 clocks after its start
  always @(negedge clk) begin
    if (rst_n && valid) begin
      int e, sc;
      e  = exp_q.pop_front();
      sc = start_cyc_q.pop_front();
      checks += 2;
      if (sum !== SW'(e)) begin failures++; $display("FAIL sum %0d expected %0d", sum, e); end
      if (cyc - sc != 2 * $clog2(L) - 1) begin
        failures++; $display("FAIL latency %0d", cyc - sc);
      end
    end
  end

  task automatic op(bit extreme, int gap);
    int s;
    @(negedge clk);
    bias = BIW'(extreme ? -256 : fcnn_ref_pkg::srand(255));
    s = int'(bias);
    for (int i = 0; i < L; i++) begin
      int val;
      val = extreme ? -512 : fcnn_ref_pkg::srand(511);
      v[i] = IW'(val);
      s += val;
    end
    exp_q.push_back(s);
    start_cyc_q.push_back(cyc);
    start = 1;
    @(negedge clk); start = 0;   // v held for this clock too
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    bias = '0;
    for (int i = 0; i < L; i++) v[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    op(1, 8);
    for (int i = 0; i < 100; i++) op(0, (i < 50) ? 8 : 3);
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
