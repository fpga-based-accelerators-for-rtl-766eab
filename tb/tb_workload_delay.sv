// tb_workload_delay: the delay workloads of the original evaluation, run
// through the reconfigurable slot at its default parameters.
//
// For jobs of 32, 64, 128, 256, 512 and 1024 bytes (4 to 128 blocks of 64
// bits) it runs
//   - an RSA encryption with the demonstration key pair, every block checked
//     against square-and-multiply computed here;
//   - a Blowfish encryption with key set-up under the demonstration key
//     (first block checked against a known ciphertext) followed by a
//     decryption reusing the key, which must return every plaintext.
// The cycles from the first input word to the last output word are printed
// next to the cycle counts measured on the original board (which include
// the DMA transfers and the HLS implementation), and each must not exceed
// them. The output side applies light random back-pressure.
module tb_workload_delay;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  rm_sel = 2'd0;
  logic [31:0] control = '0;
  logic [63:0] s_axis_tdata = '0, m_axis_tdata;
  logic        s_axis_tvalid = 1'b0, s_axis_tready;
  logic        m_axis_tvalid, m_axis_tready = 1'b0, m_axis_tlast, irq, reconfiguring;
  int checks = 0, failures = 0, cycle = 0;
  logic [63:0] outq [$];

  localparam int NSIZES = 6;
  localparam int SIZES      [NSIZES] = '{32, 64, 128, 256, 512, 1024};
  localparam int RSA_CYC_0  [NSIZES] = '{14071, 23461, 42319, 79978, 155334, 305985};
  localparam int BF_CYC_0   [NSIZES] = '{36789, 37078, 37633, 38750, 40976, 45481};
  localparam logic [63:0] E_KEY = 64'h0E52BEB9D61E0DE7;
  localparam logic [63:0] N_KEY = 64'h1D1D96CC09FD4BEF;

  crypto_accel_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_axis_tready <= ($urandom % 8 != 0);
  always @(posedge clk) if (rst_n && m_axis_tvalid && m_axis_tready) outq.push_back(m_axis_tdata);

  task automatic send(input logic [63:0] d);
    @(negedge clk); s_axis_tdata = d; s_axis_tvalid = 1'b1;
    @(posedge clk); while (!s_axis_tready) @(posedge clk);
    @(negedge clk); s_axis_tvalid = 1'b0;
  endtask

  task automatic load(input logic [1:0] sel);
    @(negedge clk); rm_sel = sel;
    repeat (3) @(negedge clk);
    while (reconfiguring) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // send header words and blocks, wait for all outputs; returns cycles
  task automatic run_job(input logic [31:0] ctl, input logic [63:0] hdr [$],
                         input logic [63:0] blks [$], output int cyc);
    int t0;
    control = ctl;
    outq.delete();
    t0 = cycle;
    fork
      begin
        foreach (hdr[i]) send(hdr[i]);
        foreach (blks[i]) send(blks[i]);
      end
      while (outq.size() < blks.size()) @(posedge clk);
    join
    cyc = cycle - t0;
    send(64'h0);          // trailing word
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
    logic [63:0] hdr [$], blks [$], ct [$];
    int rsa_cyc [NSIZES], bf_cyc [NSIZES], cyc, nb;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    load(2'd1);
    for (int s = 0; s < NSIZES; s++) begin
      nb = SIZES[s] / 8;
      hdr = '{E_KEY, N_KEY};
      blks.delete();
      for (int b = 0; b < nb; b++) blks.push_back({$urandom, $urandom} % N_KEY);
      run_job(32'(nb), hdr, blks, rsa_cyc[s]);
      for (int b = 0; b < nb; b++) begin
        checks++;
        if (outq[b] != ref_pow(blks[b], E_KEY, N_KEY)) begin
          failures++; $display("FAIL RSA %0d bytes block %0d", SIZES[s], b);
        end
      end
      checks++;
      if (rsa_cyc[s] > RSA_CYC_0[s]) begin failures++; $display("FAIL RSA %0d bytes slower than measured", SIZES[s]); end
    end

    load(2'd2);
    for (int s = 0; s < NSIZES; s++) begin
      nb = SIZES[s] / 8;
      hdr = '{E_KEY};
      blks.delete();
      blks.push_back(64'h004973616b45646f);
      for (int b = 1; b < nb; b++) blks.push_back({$urandom, $urandom});
      run_job(32'(nb), hdr, blks, bf_cyc[s]);
      ct = outq;
      checks++;
      if (ct[0] != 64'hd09c4ac1117f4750) begin failures++; $display("FAIL Blowfish known block"); end
      checks++;
      if (bf_cyc[s] > BF_CYC_0[s]) begin failures++; $display("FAIL Blowfish %0d bytes slower than measured", SIZES[s]); end
      hdr = '{64'h0};
      run_job(32'hC000_0000 | 32'(nb), hdr, ct, cyc);
      for (int b = 0; b < nb; b++) begin
        checks++;
        if (outq[b] != blks[b]) begin failures++; $display("FAIL Blowfish round trip %0d bytes block %0d", SIZES[s], b); end
      end
    end

    $display("bytes  RSA cycles (original)   Blowfish cycles (original)");
    for (int s = 0; s < NSIZES; s++)
      $display("%5d  %7d (%7d)       %7d (%7d)", SIZES[s], rsa_cyc[s], RSA_CYC_0[s], bf_cyc[s], BF_CYC_0[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
