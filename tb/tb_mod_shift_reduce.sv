// tb_mod_shift_reduce: self-checking test of the M * 2^k mod n reducer.
//
// Uses the worked example (73 * 1024 mod 899 = 135, 292 * 1024 mod 899 = 540)
// and random operands, including M larger than n, against a remainder
// computed here. Latency must be W + k + 2 cycles.
module tb_mod_shift_reduce;
  localparam int unsigned W  = 64;
  localparam int unsigned KW = $clog2(W+1);

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0]  m, n, res;
  logic [KW-1:0] k;
  logic          busy, done;
  int            checks = 0, failures = 0;

  mod_shift_reduce #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] mm, nn, input int kk);
    logic [191:0] exp_v;
    int cyc;
    m = mm; n = nn; k = KW'(kk);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_v = ({128'd0, mm} << kk) % {128'd0, nn};
    checks++;
    if ({128'd0, res} != exp_v) begin
      failures++;
      $display("FAIL m=%h n=%h k=%0d res=%h exp=%h", mm, nn, kk, res, exp_v);
    end
    checks++;
    if (cyc != int'(W) + kk + 2) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    m = 0; n = 1; k = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(64'd73, 64'd899, 10);
    check(64'd292, 64'd899, 10);
    for (int t = 0; t < 300; t++) begin
      logic [W-1:0] nn;
      nn = ({$urandom, $urandom} >> ($urandom % 63)) | 64'h1;
      if (t % 3 == 0) nn = nn | 64'h8000_0000_0000_0000;
      check({$urandom, $urandom}, nn, $urandom % (W + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
