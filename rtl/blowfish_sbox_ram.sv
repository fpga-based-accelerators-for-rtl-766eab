// blowfish_sbox_ram: one Blowfish S-box, 256 words of 32 bits.
//
// A simple dual-port memory with one write port and one synchronous read
// port, the shape of an FPGA block RAM. The Blowfish core keeps each of its
// four S-boxes in one of these so that the F function can look up all four
// bytes of its input in the same cycle. Contents are undefined until the
// core loads them.
//
// Timing: a write takes effect at the clock edge; rdata shows the word at
// raddr one cycle after raddr is presented (old data if the same word is
// written in that cycle).
module blowfish_sbox_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
