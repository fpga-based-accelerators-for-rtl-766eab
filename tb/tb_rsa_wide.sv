// tb_rsa_wide: the RSA accelerator built with a 128-bit datapath.
//
// The RSA engine is parameterised by its operand width W (64 by default,
// the size the original board could hold). This bench builds rsa_accel with
// W = 128 and runs a 128-bit key pair (n = p * q with two 64-bit primes,
// e * d = 1 mod (p-1)(q-1)) through it:
//   - a fixed message encrypts to its known ciphertext and decrypts back;
//   - random messages in a multi-block job are checked against
//     square-and-multiply computed here with 256-bit intermediates, and
//     each ciphertext is decrypted back in a second job;
//   - TLAST marks only the last block of each job;
//   - one block takes W + k + 4 + 5 * (k + ones + 1) cycles in the engine
//     plus a few for the stream handshake, checked against an upper bound.
module tb_rsa_wide;
  localparam int unsigned W = 128;
  localparam logic [W-1:0] N_KEY = 128'h9db14bc6742d9b7d513760f19566ef55;
  localparam logic [W-1:0] E_KEY = 128'h095ea567faecbd389be4bcfc49b64a09;
  localparam logic [W-1:0] D_KEY = 128'h91223c61169f698e9bb9e8ce8b1825b9;
  localparam logic [W-1:0] M_FIX = 128'h00004d6f6e74676f6d657279206b6579;
  localparam logic [W-1:0] C_FIX = 128'h3a0db96f4ca95fae761be5a86ea83626;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [31:0]   control = '0;
  logic [W-1:0]  s_tdata = '0, m_tdata;
  logic          s_tvalid = 1'b0, s_tready, m_tvalid, m_tready = 1'b0, m_tlast, irq;
  int            checks = 0, failures = 0, cycle = 0, max_block = 0;
  logic [W-1:0]  outq [$];
  logic          lastq [$];

  rsa_accel #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_tready <= ($urandom % 4 != 0);
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    outq.push_back(m_tdata); lastq.push_back(m_tlast);
  end

  task automatic send(input logic [W-1:0] d);
    @(negedge clk); s_tdata = d; s_tvalid = 1'b1;
    @(posedge clk); while (!s_tready) @(posedge clk);
    @(negedge clk); s_tvalid = 1'b0;
  endtask

  function automatic logic [W-1:0] ref_pow(input logic [W-1:0] b, ee, nn);
    logic [2*W-1:0] acc, base, nw;
    nw = {{W{1'b0}}, nn};
    acc = 1; base = {{W{1'b0}}, b} % nw;
    for (int i = W-1; i >= 0; i--) begin
      acc = (acc * acc) % nw;
      if (ee[i]) acc = (acc * base) % nw;
    end
    return acc[W-1:0];
  endfunction

  // one job: exponent, modulus, blocks, trailing word; results in outq
  task automatic job(input logic [W-1:0] ee, input logic [W-1:0] msgs [$]);
    int t0;
    control = 32'(msgs.size());
    outq.delete(); lastq.delete();
    send(ee);
    send(N_KEY);
    foreach (msgs[i]) begin
      t0 = cycle;
      send(msgs[i]);
      while (outq.size() < i + 1) @(posedge clk);
      if (cycle - t0 > max_block) max_block = cycle - t0;
    end
    send('0);
    foreach (lastq[i]) begin
      checks++;
      if (lastq[i] != (i == lastq.size() - 1)) begin failures++; $display("FAIL TLAST on block %0d", i); end
    end
  endtask

  initial begin
    logic [W-1:0] msgs [$], cts [$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // fixed message
    msgs = '{M_FIX};
    job(E_KEY, msgs);
    checks++;
    if (outq[0] != C_FIX) begin failures++; $display("FAIL fixed encrypt %h", outq[0]); end
    msgs = '{C_FIX};
    job(D_KEY, msgs);
    checks++;
    if (outq[0] != M_FIX) begin failures++; $display("FAIL fixed decrypt %h", outq[0]); end

    // random multi-block job and its decryption
    msgs.delete();
    for (int i = 0; i < 6; i++) msgs.push_back({$urandom, $urandom, $urandom, $urandom} % N_KEY);
    job(E_KEY, msgs);
    cts = outq;
    foreach (msgs[i]) begin
      checks++;
      if (cts[i] != ref_pow(msgs[i], E_KEY, N_KEY)) begin failures++; $display("FAIL encrypt block %0d", i); end
    end
    job(D_KEY, cts);
    foreach (msgs[i]) begin
      checks++;
      if (outq[i] != msgs[i]) begin failures++; $display("FAIL decrypt block %0d", i); end
    end

    // k = 128, at most 128 ones: W + k + 4 + 5 * (k + 128 + 1) plus handshakes
    checks++;
    if (max_block > W + 128 + 4 + 5 * (128 + 128 + 1) + 8) begin
      failures++; $display("FAIL block took %0d cycles", max_block);
    end
    $display("longest block: %0d cycles", max_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
