// tb_rsa_accel: self-checking test of the streaming RSA accelerator.
//
// Drives jobs word by word as the DMA would (exponent, modulus, blocks,
// one trailing word) with the block count in the control word, takes the
// output stream with random back-pressure and checks:
//   - the demonstration key pair: 0x456A656D706C6F encrypts to
//     0x12A231A4A56447F5 and decrypts back;
//   - the 10-bit worked example 73^307 mod 899 = 292;
//   - multi-block jobs against square-and-multiply computed here;
//   - TLAST only on the last block, the interrupt after it, and the
//     interrupt clearing when the control word is written to zero;
//   - a word sent while the control word is zero is dropped;
//   - each block takes fewer cycles than the 2354 per block measured for
//     the original accelerator (Table 8 slope, DMA included).
module tb_rsa_accel;
  localparam int unsigned W = 64;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [31:0]   control = '0;
  logic [W-1:0]  s_tdata = '0, m_tdata;
  logic          s_tvalid = 1'b0, s_tready, m_tvalid, m_tready = 1'b0, m_tlast, irq;
  int            checks = 0, failures = 0;
  logic [W-1:0]  outq [$];
  logic          lastq [$];
  int            stall_cycles = 0;
  bit            backpressure = 1'b0;
  int            cycle = 0;

  always @(posedge clk) cycle++;

  rsa_accel #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output sink
  always @(negedge clk) m_tready <= backpressure ? ($urandom % 3 == 0) : 1'b1;
  always @(posedge clk) if (rst_n && m_tvalid) begin
    if (m_tready) begin outq.push_back(m_tdata); lastq.push_back(m_tlast); end
    else stall_cycles++;
  end

  task automatic send(input logic [W-1:0] d);
    @(negedge clk); s_tdata = d; s_tvalid = 1'b1;
    @(posedge clk); while (!s_tready) @(posedge clk);
    @(negedge clk); s_tvalid = 1'b0;
  endtask

  function automatic logic [W-1:0] ref_pow(input logic [W-1:0] b, ee, nn);
    logic [127:0] acc, base;
    acc = 1; base = {64'd0, b} % {64'd0, nn};
    for (int i = W-1; i >= 0; i--) begin
      acc = (acc * acc) % {64'd0, nn};
      if (ee[i]) acc = (acc * base) % {64'd0, nn};
    end
    return acc[W-1:0];
  endfunction

  task automatic job(input logic [W-1:0] ee, nn, input logic [W-1:0] msgs [$],
                     input logic [W-1:0] expv [$]);
    int t0, t1;
    control = 32'(msgs.size());
    outq.delete(); lastq.delete();
    send(ee);
    send(nn);
    foreach (msgs[i]) begin
      t0 = cycle;
      send(msgs[i]);
      while (outq.size() < i + 1) @(posedge clk);
      t1 = cycle;
      checks++;
      if (t1 - t0 > 2354) begin
        failures++; $display("FAIL block took %0d cycles", t1 - t0);
      end
    end
    repeat (2) @(posedge clk);
    foreach (expv[i]) begin
      checks++;
      if (outq[i] != expv[i] || lastq[i] != (i == expv.size() - 1)) begin
        failures++;
        $display("FAIL block %0d: got %h last=%0d, expected %h", i, outq[i], lastq[i], expv[i]);
      end
    end
    checks++;
    if (!irq) begin failures++; $display("FAIL interrupt not raised"); end
    send(64'hFF);                 // trailing word, returns to Exponent
    checks++;
    if (irq) begin failures++; $display("FAIL interrupt not cleared by next word"); end
  endtask

  initial begin
    logic [W-1:0] msgs [$], expv [$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // demonstration key pair
    msgs = '{64'h00456A656D706C6F}; expv = '{64'h12A231A4A56447F5};
    job(64'h0E52BEB9D61E0DE7, 64'h1D1D96CC09FD4BEF, msgs, expv);
    msgs = '{64'h12A231A4A56447F5}; expv = '{64'h00456A656D706C6F};
    job(64'h00CFAB57EE0038D7, 64'h1D1D96CC09FD4BEF, msgs, expv);

    // a word arriving with control = 0 is dropped
    control = 0;
    send(64'hDEAD_BEEF);
    msgs = '{64'd73}; expv = '{64'd292};
    job(64'd307, 64'd899, msgs, expv);

    // interrupt clears when control is written to zero (raise it first)
    msgs = '{64'd292}; expv = '{64'd73};
    control = 1;
    send(64'd643); send(64'd899); send(64'd292);
    while (!irq) @(posedge clk);
    @(negedge clk); control = 0;
    @(negedge clk);
    checks++;
    if (irq) begin failures++; $display("FAIL interrupt not cleared by control = 0"); end
    control = 1; send(64'hFF);
    outq.delete(); lastq.delete();

    // multi-block jobs with back-pressure
    backpressure = 1'b1;
    for (int j = 0; j < 4; j++) begin
      logic [W-1:0] nn, ee;
      nn = {$urandom, $urandom} | 64'h8000_0000_0000_0001;
      if (j == 1) nn = nn >> 7;
      ee = {$urandom, $urandom} % nn;
      msgs.delete(); expv.delete();
      for (int b = 0; b < 3 + j; b++) begin
        msgs.push_back({$urandom, $urandom} % nn);
        expv.push_back(ref_pow(msgs[b], ee, nn));
      end
      job(ee, nn, msgs, expv);
    end
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
