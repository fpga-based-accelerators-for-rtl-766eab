// tb_blowfish_accel: self-checking test of the streaming Blowfish accelerator.
//
// Runs jobs the way the DMA and GPIO drive them (key word, blocks, one
// trailing word) with random output back-pressure and checks:
//   - encryption with key set-up (control = n) of three blocks under the
//     demonstration key 0e52beb9d61e0de7, expected values from an
//     independent software model of the cipher and its nibble-wise key
//     schedule;
//   - decryption reusing the expanded key (control = 0xC0000000 | n) with a
//     garbage key word, which must give the plaintexts back;
//   - a new key (all zeros) gives the published test vector 4ef997456198dd78;
//   - TLAST on the last block only, the interrupt after it, words dropped
//     while control is zero;
//   - a four-block (32-byte) job including key set-up finishes within the
//     36789 cycles measured for the original accelerator, and each further
//     block within the 70 cycles per block of the measured slope.
module tb_blowfish_accel;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] control = '0;
  logic [63:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tready, m_tvalid, m_tready = 1'b0, m_tlast, irq;
  int checks = 0, failures = 0;
  int cycle = 0, stall_cycles = 0;
  logic [63:0] outq [$];
  logic        lastq [$];
  bit          backpressure = 1'b0;

  blowfish_accel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_tready <= backpressure ? ($urandom % 3 == 0) : 1'b1;
  always @(posedge clk) if (rst_n && m_tvalid) begin
    if (m_tready) begin outq.push_back(m_tdata); lastq.push_back(m_tlast); end
    else stall_cycles++;
  end

  task automatic send(input logic [63:0] d);
    @(negedge clk); s_tdata = d; s_tvalid = 1'b1;
    @(posedge clk); while (!s_tready) @(posedge clk);
    @(negedge clk); s_tvalid = 1'b0;
  endtask

  task automatic job(input logic [31:0] ctl, input logic [63:0] keyw,
                     input logic [63:0] blks [$], input logic [63:0] expv [$],
                     output int cycles);
    int t0;
    control = ctl;
    outq.delete(); lastq.delete();
    t0 = cycle;
    send(keyw);
    foreach (blks[i]) send(blks[i]);
    while (outq.size() < blks.size()) @(posedge clk);
    cycles = cycle - t0;
    foreach (expv[i]) begin
      checks++;
      if (outq[i] != expv[i] || lastq[i] != (i == expv.size() - 1)) begin
        failures++;
        $display("FAIL block %0d: got %h last=%0d, expected %h", i, outq[i], lastq[i], expv[i]);
      end
    end
    @(posedge clk);
    checks++;
    if (!irq) begin failures++; $display("FAIL interrupt not raised"); end
    send(64'h0);
    checks++;
    if (irq) begin failures++; $display("FAIL interrupt not cleared"); end
  endtask

  initial begin
    logic [63:0] pt [$], ct [$];
    int c4, c8;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // dropped while control is zero (also waits out the table load)
    control = 0;
    send(64'h1234);

    pt = '{64'h004973616b45646f, 64'h0123456789abcdef, 64'hfedcba9876543210};
    ct = '{64'hd09c4ac1117f4750, 64'h138e54fa0e869158, 64'h5ef6ff6dc6f95a67};
    backpressure = 1'b1;
    job(32'd3, 64'h0e52beb9d61e0de7, pt, ct, c4);
    job(32'hC000_0003, 64'hbad0_bad0_bad0_bad0, ct, pt, c4);
    backpressure = 1'b0;

    // timing against the measured original: 4 blocks, then 8 blocks
    pt = '{64'h0, 64'h0, 64'h0, 64'h0};
    ct = '{64'h4ef997456198dd78, 64'h4ef997456198dd78, 64'h4ef997456198dd78,
           64'h4ef997456198dd78};
    job(32'd4, 64'h0, pt, ct, c4);
    checks++;
    if (c4 > 36789) begin failures++; $display("FAIL 32-byte job took %0d cycles", c4); end
    pt = {pt, pt}; ct = {ct, ct};
    job(32'd8, 64'h0, pt, ct, c8);
    checks++;
    if ((c8 - c4) / 4 > 70) begin failures++; $display("FAIL %0d cycles per block", (c8 - c4) / 4); end
    $display("32-byte job %0d cycles, 64-byte job %0d cycles", c4, c8);
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
