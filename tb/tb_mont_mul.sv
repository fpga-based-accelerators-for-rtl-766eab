// tb_mont_mul: self-checking test of the Montgomery product unit.
//
// Checks the products of the worked 10-bit example (n = 899, k = 10,
// n' = 213) and random 64-bit operands against u * 2^k = a * b (mod n),
// u < n, computed here with wide integer arithmetic. Also checks the
// 4-cycle latency from start to done.
module tb_mont_mul;
  localparam int unsigned W  = 64;
  localparam int unsigned KW = $clog2(W+1);

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0]  a, b, n, nprime, u;
  logic [KW-1:0] k;
  logic          busy, done;
  int            checks = 0, failures = 0;

  mont_mul #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] ia, ib, output logic [W-1:0] res, output int cyc);
    a = ia; b = ib;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    res = u;
  endtask

  // n' = -n^-1 mod 2^k by Newton iteration (independent of the DUT's method)
  function automatic logic [W-1:0] calc_nprime(input logic [W-1:0] nn, input int kk);
    logic [W-1:0] inv;
    inv = nn;                                   // correct to 3 bits for odd n
    for (int i = 0; i < 6; i++) inv = inv * (W'(2) - nn * inv);
    inv = -inv;
    if (kk < W) inv = inv & ((W'(1) << kk) - 1);
    return inv;
  endfunction

  function automatic int bitlen(input logic [W-1:0] v);
    int l = 0;
    for (int i = 0; i < W; i++) if (v[i]) l = i + 1;
    return l;
  endfunction

  initial begin
    logic [W-1:0] res;
    logic [255:0] lhs, rhs;
    int cyc;
    // worked example: n = 899, k = 10, n' = 213 (r = 1024)
    n = 899; k = 10; nprime = 213; a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    begin
      int tv [8][3] = '{'{125,125,125}, '{135,125,135}, '{135,135,865},
                        '{865,865,412}, '{412,412,236}, '{135,236,147},
                        '{649,649,500}, '{540,1,292}};
      foreach (tv[i]) begin
        run(W'(tv[i][0]), W'(tv[i][1]), res, cyc);
        checks++;
        if (res != W'(tv[i][2])) begin
          failures++;
          $display("FAIL monPro(%0d,%0d) = %0d, expected %0d", tv[i][0], tv[i][1], res, tv[i][2]);
        end
        checks++;
        if (cyc != 4) begin failures++; $display("FAIL latency %0d", cyc); end
      end
    end
    // random moduli of various lengths
    for (int t = 0; t < 400; t++) begin
      int kk;
      n = {$urandom, $urandom} | 64'h1;
      if (t % 4 == 1) n = n >> ($urandom % 60);
      if (t % 4 == 2) n = n | 64'h8000_0000_0000_0000;   // near 2^64
      n = n | 64'h1;
      if (n < 3) n = 3;
      kk = bitlen(n); k = KW'(kk); nprime = calc_nprime(n, kk);
      a = {$urandom, $urandom} % n; b = {$urandom, $urandom} % n;
      if (t % 10 == 3) a = n - 1;
      if (t % 10 == 4) begin a = n - 1; b = n - 1; end
      run(a, b, res, cyc);
      lhs = ({192'd0, res} << kk) % {192'd0, n};
      rhs = ({192'd0, a} * {192'd0, b}) % {192'd0, n};
      checks++;
      if (lhs != rhs || res >= n) begin
        failures++;
        $display("FAIL n=%h a=%h b=%h u=%h", n, a, b, res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
