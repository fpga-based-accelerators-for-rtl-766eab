// tb_blowfish_core: self-checking test of the Blowfish engine.
//
// Expected values:
//   - key 0000000000000000, block 0 -> 4ef99745 6198dd78 and
//     key ffffffffffffffff, block all ones -> 51866fd5 b85ecb8a, the
//     published Blowfish test vectors (for these two keys the nibble-wise
//     key schedule gives the same P-array XOR words as the usual one);
//   - key 0e52beb9d61e0de7 (the default key of the demonstration) with the
//     nibble-wise schedule, from an independent software model:
//     004973616b45646f -> d09c4ac1117f4750, 0123456789abcdef ->
//     138e54fa0e869158, fedcba9876543210 -> 5ef6ff6dc6f95a67;
//   - key 00000000000000a5 (short key, repeats many times):
//     1111111122222222 -> 39238165d7ad43a6.
// Every ciphertext is decrypted back. A second expansion with an earlier
// key must give the same results again (tables reloaded from pi).
// Cycle counts: table load after reset 1043, key expansion 18749 (1043 +
// 9 * 33 + 512 * 34 + 1), one block 34.
module tb_blowfish_core;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        init_start = 1'b0, crypt_start = 1'b0, decrypt = 1'b0;
  logic [63:0] key = '0;
  logic [31:0] din_l = '0, din_r = '0, dout_l, dout_r;
  logic        busy, done;
  int checks = 0, failures = 0;
  int cycle = 0;

  blowfish_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expand(input logic [63:0] k);
    int t0;
    @(negedge clk); key = k; init_start = 1'b1; t0 = cycle;
    @(negedge clk); init_start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != 18749) begin
      failures++; $display("FAIL key expansion took %0d cycles", cycle - t0);
    end
  endtask

  task automatic crypt(input bit dec, input logic [63:0] blk, output logic [63:0] res);
    int t0;
    @(negedge clk); decrypt = dec; din_l = blk[63:32]; din_r = blk[31:0];
    crypt_start = 1'b1; t0 = cycle;
    @(negedge clk); crypt_start = 1'b0;
    while (!done) @(negedge clk);
    res = {dout_l, dout_r};
    checks++;
    if (cycle - t0 != 34) begin
      failures++; $display("FAIL block took %0d cycles", cycle - t0);
    end
  endtask

  task automatic vec(input logic [63:0] pt, ct);
    logic [63:0] r;
    crypt(1'b0, pt, r);
    checks++;
    if (r != ct) begin failures++; $display("FAIL enc %h = %h, expected %h", pt, r, ct); end
    crypt(1'b1, ct, r);
    checks++;
    if (r != pt) begin failures++; $display("FAIL dec %h = %h, expected %h", ct, r, pt); end
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; t0 = cycle;
    @(negedge clk);
    while (busy) @(negedge clk);
    checks++;
    if (cycle - t0 != 1043) begin
      failures++; $display("FAIL reset table load took %0d cycles", cycle - t0);
    end

    expand(64'h0);
    vec(64'h0, 64'h4ef997456198dd78);
    expand(64'hffffffffffffffff);
    vec(64'hffffffffffffffff, 64'h51866fd5b85ecb8a);
    expand(64'h0e52beb9d61e0de7);
    vec(64'h004973616b45646f, 64'hd09c4ac1117f4750);
    vec(64'h0123456789abcdef, 64'h138e54fa0e869158);
    vec(64'hfedcba9876543210, 64'h5ef6ff6dc6f95a67);
    expand(64'h00000000000000a5);
    vec(64'h1111111122222222, 64'h39238165d7ad43a6);
    expand(64'h0);
    vec(64'h0, 64'h4ef997456198dd78);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
