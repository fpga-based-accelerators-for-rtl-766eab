// tb_mont_exp: self-checking test of the Montgomery exponentiation engine.
//
// The modulus set-up (k, n', r mod n) is produced by mont_precompute, as in
// the accelerator. Checks the worked examples 73^307 mod 899 = 292 and
// 292^643 mod 899 = 73, the 64-bit key pair of the demonstration
// (e = 0x0E52BEB9D61E0DE7, d = 0x00CFAB57EE0038D7, n = 0x1D1D96CC09FD4BEF,
// M = 0x456A656D706C6F <-> C = 0x12A231A4A56447F5), and random cases against
// square-and-multiply with remainders computed here. The cycle count of each
// exponentiation must be W + k + 4 + 5 * (k + ones(e) + 1).
module tb_mont_exp;
  localparam int unsigned W  = 64;
  localparam int unsigned KW = $clog2(W+1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          pre_start = 1'b0, start = 1'b0;
  logic [W-1:0]  n, m, e, nprime, r_mod_n, x;
  logic [KW-1:0] k;
  logic          pre_busy, pre_done, busy, done;
  int            checks = 0, failures = 0;

  mont_precompute #(.W(W)) u_pre (
    .clk, .rst_n, .start(pre_start), .n, .k, .nprime, .r_mod_n,
    .busy(pre_busy), .done(pre_done)
  );
  mont_exp #(.W(W)) dut (
    .clk, .rst_n, .start, .m, .e, .n, .nprime, .k, .r_mod_n, .x, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_pow(input logic [W-1:0] b, ee, nn);
    logic [127:0] acc, base;
    acc = 1; base = {64'd0, b} % {64'd0, nn};
    for (int i = W-1; i >= 0; i--) begin
      acc = (acc * acc) % {64'd0, nn};
      if (ee[i]) acc = (acc * base) % {64'd0, nn};
    end
    return acc[W-1:0];
  endfunction

  task automatic set_modulus(input logic [W-1:0] nn);
    n = nn;
    @(negedge clk); pre_start = 1'b1;
    @(negedge clk); pre_start = 1'b0;
    while (!pre_done) @(negedge clk);
  endtask

  task automatic check(input logic [W-1:0] mm, ee, input logic [W-1:0] expv);
    int cyc, ones;
    m = mm; e = ee;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    ones = 0;
    for (int i = 0; i < W; i++) if (i < int'(k) && ee[i]) ones++;
    checks++;
    if (x != expv) begin
      failures++;
      $display("FAIL %h^%h mod %h = %h, expected %h", mm, ee, n, x, expv);
    end
    checks++;
    if (cyc != int'(W) + int'(k) + 4 + 5 * (int'(k) + ones + 1)) begin
      failures++;
      $display("FAIL cycles %0d k=%0d ones=%0d", cyc, k, ones);
    end
  endtask

  initial begin
    n = 0; m = 0; e = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    set_modulus(64'd899);
    check(64'd73, 64'd307, 64'd292);
    check(64'd292, 64'd643, 64'd73);
    set_modulus(64'h1D1D96CC09FD4BEF);
    check(64'h00456A656D706C6F, 64'h0E52BEB9D61E0DE7, 64'h12A231A4A56447F5);
    check(64'h12A231A4A56447F5, 64'h00CFAB57EE0038D7, 64'h00456A656D706C6F);
    for (int t = 0; t < 60; t++) begin
      logic [W-1:0] nn, mm, ee;
      nn = ({$urandom, $urandom} >> ($urandom % 56)) | 64'h3;
      if (t % 3 == 0) nn = nn | 64'h8000_0000_0000_0000;
      set_modulus(nn);
      mm = {$urandom, $urandom} % nn;
      ee = {$urandom, $urandom};
      if (k < W) ee = ee & ((64'd1 << k) - 1);
      check(mm, ee, ref_pow(mm, ee, nn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
