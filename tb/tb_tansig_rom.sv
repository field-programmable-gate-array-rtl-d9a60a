// tb_tansig_rom: reads all 512 entries of the tansig ROM and compares each
// with round(256*tanh(a/256)) computed through the exponential function;
// checks the one-clock read latency and that the output holds when `en` is
// low.
module tb_tansig_rom;
  logic clk = 0, en = 0;
  logic [8:0] addr;
  logic signed [9:0] q;
  int checks = 0, failures = 0;

  tansig_rom #(.AW(9), .DW(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    addr = '0;
    for (int i = 0; i < 512; i++) begin
      int s;
      s = (i >= 256) ? i - 512 : i;
      @(negedge clk); en = 1; addr = 9'(i);
      @(negedge clk); en = 0;
      e = fcnn_ref_pkg::tansig_ref(s);
      checks++;
      if (q !== 10'(e)) begin
        failures++;
        $display("FAIL addr %0d: %0d expected %0d", s, q, e);
      end
    end
    // hold with en low
    addr = 9'd100;
    @(negedge clk);
    checks++;
    if (q !== 10'(fcnn_ref_pkg::tansig_ref(-1))) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
