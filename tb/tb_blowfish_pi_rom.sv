// tb_blowfish_pi_rom: self-checking test of the pi table.
//
// Computes the fractional hex digits of pi here with Machin's formula
// pi = 16 atan(1/5) - 4 atan(1/239) in fixed point on an array of 32-bit
// words, and compares all 1042 ROM words with it. Spot checks of well-known
// Blowfish constants (P1 = 243f6a88, P18 = 8979fb1b, first S-box word
// d1310ba6, last S-box word 3ac372e6) are made as well.
module tb_blowfish_pi_rom;
  localparam int NW = 1042;        // table words
  localparam int FW = NW + 4;      // fraction words, with guard words

  logic        clk = 1'b0;
  logic [10:0] addr = '0;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  // fixed point: acc[0] is the integer word, acc[1..FW] the fraction
  int unsigned pi_acc [FW+1];
  int unsigned term   [FW+1];

  blowfish_pi_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_zero(ref int unsigned v [FW+1]);
    foreach (v[i]) if (v[i] != 0) return 1'b0;
    return 1'b1;
  endfunction

  // v = v / d
  function automatic void div_small(ref int unsigned v [FW+1], input int unsigned d);
    longint unsigned rem = 0;
    for (int i = 0; i <= FW; i++) begin
      longint unsigned cur = (rem << 32) | v[i];
      v[i] = 32'(cur / d);
      rem  = cur % d;
    end
  endfunction

  // acc += sign * c * (v / d)
  function automatic void acc_add(ref int unsigned acc [FW+1], ref int unsigned v [FW+1],
                                  input int unsigned d, input int unsigned c, input bit neg);
    int unsigned q [FW+1];
    longint signed carry = 0;
    q = v;
    div_small(q, d);
    for (int i = FW; i >= 0; i--) begin
      longint signed s;
      s = neg ? longint'(acc[i]) - longint'(c) * longint'(q[i]) + carry
              : longint'(acc[i]) + longint'(c) * longint'(q[i]) + carry;
      acc[i] = 32'(s);
      carry  = s >>> 32;
    end
  endfunction

  // acc += c * atan(1/x), or acc -= c * atan(1/x) when neg0 is set
  function automatic void add_atan(ref int unsigned acc [FW+1], input int unsigned x,
                                   input int unsigned c, input bit neg0);
    int unsigned k;
    bit neg;
    foreach (term[i]) term[i] = 0;
    term[0] = 1;
    div_small(term, x);                    // 1/x
    k = 1; neg = neg0;
    while (!is_zero(term)) begin
      acc_add(acc, term, k, c, neg);
      div_small(term, x * x);
      k += 2; neg = !neg;
    end
  endfunction

  task automatic expect_word(input int idx, input logic [31:0] v);
    @(negedge clk); addr = 11'(idx);
    @(posedge clk); #1;
    checks++;
    if (rdata !== v) begin
      failures++;
      $display("FAIL word %0d = %h, expected %h", idx, rdata, v);
    end
  endtask

  initial begin
    foreach (pi_acc[i]) pi_acc[i] = 0;
    add_atan(pi_acc, 5, 16, 1'b0);
    add_atan(pi_acc, 239, 4, 1'b1);
    checks++;
    if (pi_acc[0] != 3) begin failures++; $display("FAIL integer part of pi"); end
    for (int i = 0; i < NW; i++) expect_word(i, pi_acc[i+1]);
    expect_word(0, 32'h243f6a88);
    expect_word(17, 32'h8979fb1b);
    expect_word(18, 32'hd1310ba6);
    expect_word(1041, 32'h3ac372e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
