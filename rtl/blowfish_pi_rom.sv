// blowfish_pi_rom: start values of the Blowfish P-array and S-boxes.
//
// Blowfish starts from fixed tables filled with the fractional part of pi in
// hexadecimal: word 0 holds its first 32 bits (0x243f6a88), and the words
// follow in order. Words 0..17 are the initial P1..P18, words 18..1041 the
// four S-boxes, 256 words each, S-box 1 first. The contents are read from
// rtl/blowfish_pi.hex (one 32-bit word per line, in the order above, the
// digits of pi being floor(frac(pi) * 16^j) for successive j).
//
// Interface: synchronous read, rdata is valid one cycle after addr.
module blowfish_pi_rom #(
  parameter int unsigned DEPTH     = 1042,
  parameter string       INIT_FILE = "rtl/blowfish_pi.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [31:0]              rdata
);

  logic [31:0] rom [DEPTH];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) rdata <= rom[addr];

endmodule
