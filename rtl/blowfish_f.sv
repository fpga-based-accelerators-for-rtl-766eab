// blowfish_f: the combining half of the Blowfish F function.
//
// F splits its 32-bit input into four bytes a (bits 31:24), b, c and d
// (bits 7:0) and looks each up in its own S-box (done by the caller's
// S-box memories). This block combines the four 32-bit lookups as
//   F = ((S1[a] + S2[b]) xor S3[c]) + S4[d]      (additions mod 2^32)
// Purely combinational.
module blowfish_f (
  input  logic [31:0] s1,
  input  logic [31:0] s2,
  input  logic [31:0] s3,
  input  logic [31:0] s4,
  output logic [31:0] f
);

  always_comb f = ((s1 + s2) ^ s3) + s4;

endmodule
