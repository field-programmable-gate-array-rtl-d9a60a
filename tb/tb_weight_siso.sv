// tb_weight_siso: loads a 64-deep weight SISO serially and checks that
// rotation returns the words in load order, that a full turn restores the
// memory, that load wins over rotate, and that the head holds when idle.
module tb_weight_siso;
  localparam int DEPTH = 64, W = 9;
  logic clk = 0, rst_n = 0, load = 0, rot = 0;
  logic signed [W-1:0] din, head;
  int checks = 0, failures = 0;
  int ref_q [$];

  weight_siso #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int exp, string what);
    checks++;
    if (head !== W'(exp)) begin
      failures++;
      $display("FAIL %s: head %0d expected %0d", what, head, exp);
    end
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      int v;
      v = fcnn_ref_pkg::srand(255);
      ref_q.push_back(v);
      @(negedge clk); load = 1; din = W'(v);
    end
    @(negedge clk); load = 0;
    for (int turn = 0; turn < 2; turn++) begin
      for (int i = 0; i < DEPTH; i++) begin
        check(ref_q[i], "rotate");
        rot = 1; @(negedge clk); rot = 0;
      end
    end
    // idle: head holds
    repeat (3) @(negedge clk);
    check(ref_q[0], "hold");
    // load has priority over rotate
    load = 1; rot = 1; din = W'(123);
    @(negedge clk);
    load = 0; rot = 0;
    check(ref_q[1], "shifted");
    for (int i = 0; i < DEPTH - 1; i++) begin rot = 1; @(negedge clk); end
    rot = 0;
    check(123, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
