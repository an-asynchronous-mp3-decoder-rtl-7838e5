// pow43_rom: the 4/3-power table of the requantizer. Entry i holds
// i^(4/3) as an unsigned fixed-point number with 18 integer and 14 fraction
// bits (Q18.14), for i = 0 .. DEPTH-1. 8191^(4/3) = 165113 fits in 18 bits.
//
// Synchronous read: q is valid one clock after re. The contents are
// computed when the memory is initialised (round(i^(4/3) * 2^14), through a
// 64-bit integer since the largest entries exceed 2^31), which a
// synthesis flow turns into ROM contents.
module pow43_rom #(
  parameter int DEPTH = 8192,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic [31:0]   q
);
  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      rom[i] = 32'(longint'($pow(real'(i), 4.0 / 3.0) * 16384.0));   // cast rounds
  end

  always_ff @(posedge clk) begin
    if (re) q <= rom[addr];
  end
endmodule
