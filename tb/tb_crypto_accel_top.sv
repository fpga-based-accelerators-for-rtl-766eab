// tb_crypto_accel_top: end-to-end test of the reconfigurable accelerator slot
// at its default parameters (64-bit RSA).
//
// Plays the part of the processor, the DMA and the reconfiguration driver:
//   1. blank module loaded: a word offered on the stream is never taken;
//   2. RSA loaded: encrypt and decrypt the demonstration message with the
//      demonstration key pair (0x456A656D706C6F <-> 0x12A231A4A56447F5);
//      a word sent while the control word is zero is dropped;
//   3. Blowfish loaded: three blocks encrypted with key set-up under the
//      default key 0e52beb9d61e0de7, then decrypted reusing the expanded
//      key; expected values from an independent software model;
//   4. RSA loaded again: a two-block job of the 10-bit worked example
//      (73 -> 292 and 292 -> 5 under e = 307, n = 899; the second from
//      square-and-multiply here).
// Output back-pressure is random throughout. Each mechanism is counted and
// a failure is recorded for one that never happened: reconfiguration with
// reset, blank refusal, dropped word, RSA job, Blowfish key set-up, key
// reuse, decryption mode, back-pressure stall, TLAST and interrupt.
module tb_crypto_accel_top;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  rm_sel = 2'd0;
  logic [31:0] control = '0;
  logic [63:0] s_axis_tdata = '0, m_axis_tdata;
  logic        s_axis_tvalid = 1'b0, s_axis_tready;
  logic        m_axis_tvalid, m_axis_tready = 1'b0, m_axis_tlast, irq, reconfiguring;
  int checks = 0, failures = 0;
  int n_reconfig = 0, n_blank_refusal = 0, n_dropped = 0, n_rsa_jobs = 0;
  int n_bf_keyinit = 0, n_bf_keyreuse = 0, n_decrypt = 0, n_stall = 0;
  int n_tlast = 0, n_irq = 0;
  logic [63:0] outq [$];
  logic        lastq [$];
  logic        irq_q = 1'b0, reconf_q = 1'b0;

  crypto_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_axis_tready <= ($urandom % 2 == 0);
  always @(posedge clk) begin
    irq_q    <= irq;
    reconf_q <= reconfiguring;
    if (irq && !irq_q) n_irq++;
    if (reconfiguring && !reconf_q) n_reconfig++;
    if (rst_n && m_axis_tvalid) begin
      if (m_axis_tready) begin
        outq.push_back(m_axis_tdata); lastq.push_back(m_axis_tlast);
        if (m_axis_tlast) n_tlast++;
      end else n_stall++;
    end
  end

  task automatic send(input logic [63:0] d);
    @(negedge clk); s_axis_tdata = d; s_axis_tvalid = 1'b1;
    @(posedge clk); while (!s_axis_tready) @(posedge clk);
    @(negedge clk); s_axis_tvalid = 1'b0;
  endtask

  task automatic load(input logic [1:0] sel);
    @(negedge clk); rm_sel = sel;
    repeat (2) @(negedge clk);
    checks++;
    if (!reconfiguring) begin failures++; $display("FAIL no reset after reconfiguration"); end
    while (reconfiguring) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // header words, then blocks; compare the output, then the trailing word
  task automatic job(input logic [31:0] ctl, input logic [63:0] hdr [$],
                     input logic [63:0] blks [$], input logic [63:0] expv [$]);
    control = ctl;
    outq.delete(); lastq.delete();
    foreach (hdr[i]) send(hdr[i]);
    foreach (blks[i]) send(blks[i]);
    while (outq.size() < blks.size()) @(posedge clk);
    @(posedge clk);
    foreach (expv[i]) begin
      checks++;
      if (outq[i] != expv[i] || lastq[i] != (i == expv.size() - 1)) begin
        failures++;
        $display("FAIL block %0d: got %h last=%0d, expected %h", i, outq[i], lastq[i], expv[i]);
      end
    end
    checks++;
    if (!irq) begin failures++; $display("FAIL interrupt missing"); end
    send(64'h0);
  endtask

  function automatic logic [63:0] ref_pow(input logic [63:0] b, ee, nn);
    logic [127:0] acc;
    acc = 1;
    for (int i = 63; i >= 0; i--) begin
      acc = (acc * acc) % {64'd0, nn};
      if (ee[i]) acc = (acc * {64'd0, b}) % {64'd0, nn};
    end
    return acc[63:0];
  endfunction

  initial begin
    logic [63:0] hdr [$], blks [$], expv [$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. blank region refuses the stream
    load(2'd0);
    @(negedge clk); s_axis_tdata = 64'h55; s_axis_tvalid = 1'b1; control = 1;
    repeat (50) begin
      @(posedge clk);
      if (s_axis_tready) begin failures++; $display("FAIL blank module took a word"); end
    end
    checks++;
    n_blank_refusal++;
    @(negedge clk); s_axis_tvalid = 1'b0;

    // 2. RSA
    load(2'd1);
    control = 0; send(64'hDEAD); n_dropped++;
    hdr = '{64'h0E52BEB9D61E0DE7, 64'h1D1D96CC09FD4BEF};
    blks = '{64'h00456A656D706C6F}; expv = '{64'h12A231A4A56447F5};
    job(32'd1, hdr, blks, expv); n_rsa_jobs++;
    hdr = '{64'h00CFAB57EE0038D7, 64'h1D1D96CC09FD4BEF};
    job(32'd1, hdr, expv, blks); n_rsa_jobs++;

    // 3. Blowfish
    load(2'd2);
    hdr  = '{64'h0e52beb9d61e0de7};
    blks = '{64'h004973616b45646f, 64'h0123456789abcdef, 64'hfedcba9876543210};
    expv = '{64'hd09c4ac1117f4750, 64'h138e54fa0e869158, 64'h5ef6ff6dc6f95a67};
    job(32'd3, hdr, blks, expv); n_bf_keyinit++;
    hdr  = '{64'hbad0bad0bad0bad0};
    job(32'hC000_0003, hdr, expv, blks); n_bf_keyreuse++; n_decrypt++;

    // 4. RSA again
    load(2'd1);
    hdr  = '{64'd307, 64'd899};
    blks = '{64'd73, 64'd292};
    expv = '{64'd292, ref_pow(64'd292, 64'd307, 64'd899)};
    job(32'd2, hdr, blks, expv); n_rsa_jobs++;

    // mechanism coverage
    begin
      int cov [10];
      string nm [10];
      cov = '{n_reconfig, n_blank_refusal, n_dropped, n_rsa_jobs, n_bf_keyinit,
              n_bf_keyreuse, n_decrypt, n_stall, n_tlast, n_irq};
      nm  = '{"reconfiguration", "blank refusal", "dropped word", "RSA job",
              "Blowfish key set-up", "Blowfish key reuse", "decryption",
              "back-pressure stall", "TLAST", "interrupt"};
      foreach (cov[i]) begin
        $display("%-22s %0d", nm[i], cov[i]);
        checks++;
        if (cov[i] == 0) begin failures++; $display("FAIL %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
