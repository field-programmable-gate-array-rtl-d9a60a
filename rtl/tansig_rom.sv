// tansig_rom: lookup-table realisation of the tansig (tanh) activation.
//
// A 512-entry ROM addressed by a 9-bit two's complement value a, which
// stands for x = a/256 (512 samples between -1 and +1). Each entry is
// round(256*tanh(x)), a DW-bit two's complement number scaled by 256. The
// contents are computed at elaboration from that formula. The read is
// registered: `q` holds the entry one clock after `addr` is applied with
// `en` high. Depth, input range and scale follow the architecture; the
// 10-bit entry width follows its statement that the LUT is 10 bits wide.
module tansig_rom #(
  parameter int AW = 9,    // address bits (512 entries)
  parameter int DW = 10    // entry width
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic        [AW-1:0] addr,
  output logic signed [DW-1:0] q
);
  typedef logic signed [DW-1:0] table_t [2**AW];

  function automatic table_t build_table();
    table_t tab;
    for (int i = 0; i < 2**AW; i++) begin
      int  s;
      real x;
      s = (i >= 2**(AW-1)) ? i - 2**AW : i;
      x = real'(s) / 256.0;
      tab[i] = DW'($rtoi($floor(256.0 * $tanh(x) + 0.5)));
    end
    return tab;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    if (en) q <= TABLE[addr];
  end

endmodule
