// tb_mont_precompute: self-checking test of the Montgomery set-up block.
//
// For n = 899 the worked example gives k = 10, n' = 213 and r mod n = 125.
// For random odd moduli of all lengths it checks that n * n' + 1 is a
// multiple of 2^k, that n' < 2^k, that 2^(k-1) <= n < 2^k and that
// r mod n matches a remainder computed here. Latency must be k + 3 cycles.
module tb_mont_precompute;
  localparam int unsigned W  = 64;
  localparam int unsigned KW = $clog2(W+1);

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0]  n, nprime, r_mod_n;
  logic [KW-1:0] k;
  logic          busy, done;
  int            checks = 0, failures = 0;

  mont_precompute #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] nn, output int cyc);
    n = nn;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    logic [W:0]   r;
    logic [191:0] prod;
    n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(64'd899, cyc);
    checks++;
    if (k != 10 || nprime != 213 || r_mod_n != 125) begin
      failures++;
      $display("FAIL n=899: k=%0d n'=%0d r mod n=%0d", k, nprime, r_mod_n);
    end
    checks++;
    if (cyc != 13) begin failures++; $display("FAIL latency %0d for k=10", cyc); end
    for (int t = 0; t < 500; t++) begin
      logic [W-1:0] nn;
      nn = ({$urandom, $urandom} >> ($urandom % 62)) | 64'h3;
      if (t % 5 == 0) nn = nn | 64'h8000_0000_0000_0000;
      run(nn, cyc);
      r = '0; r[k] = 1'b1;
      prod = {128'd0, nn} * {128'd0, nprime} + 192'd1;
      checks++;
      if (k == 0 || !nn[k-1] || (k < W && (nn >> k) != 0) ||
          (prod & ((192'd1 << k) - 1)) != 0 || ({1'b0, nprime} >= r) ||
          {1'b0, r_mod_n} != r % {1'b0, nn}) begin
        failures++;
        $display("FAIL n=%h k=%0d n'=%h rmodn=%h", nn, k, nprime, r_mod_n);
      end
      checks++;
      if (cyc != int'(k) + 3) begin failures++; $display("FAIL latency %0d k=%0d", cyc, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
