// tb_seq_mult: checks the serial multiplier against integer products of
// random and corner-case 9-bit operands, and that every product arrives
// exactly BW = 9 clocks after `start`.
module tb_seq_mult;
  localparam int AW = 9, BW = 9;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [AW-1:0] a;
  logic signed [BW-1:0] b;
  logic busy, done;
  logic signed [AW+BW-1:0] p;
  int checks = 0, failures = 0;

  seq_mult #(.AW(AW), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int av, int bv);
    int cyc = 0;
    @(negedge clk);
    a = AW'(av); b = BW'(bv); start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0;          // operands may change after start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (p !== (AW+BW)'(av * bv)) begin
      failures++;
      $display("FAIL %0d*%0d got %0d", av, bv, p);
    end
    checks++;
    if (cyc != BW) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, BW);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(-256, -256); run(255, -256); run(-256, 255); run(255, 255);
    run(0, -1); run(-1, -1); run(1, -256);
    for (int i = 0; i < 300; i++) run(fcnn_ref_pkg::srand(255) , fcnn_ref_pkg::srand(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
