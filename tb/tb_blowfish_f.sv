// tb_blowfish_f: self-checking test of the F-function combiner.
//
// Random S-box outputs; the expected value is built here byte-serially
// (explicit carries for the two 32-bit additions) rather than with the
// word-wide expression used by the block.
module tb_blowfish_f;
  logic [31:0] s1, s2, s3, s4, f;
  int checks = 0, failures = 0;

  blowfish_f dut (.*);

  function automatic logic [31:0] add32(input logic [31:0] x, y);
    logic [31:0] r;
    logic c;
    c = 1'b0;
    for (int i = 0; i < 32; i++) begin
      r[i] = x[i] ^ y[i] ^ c;
      c    = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    for (int t = 0; t < 2000; t++) begin
      s1 = $urandom; s2 = $urandom; s3 = $urandom; s4 = $urandom;
      if (t == 0) begin s1 = '1; s2 = 32'd1; s3 = '0; s4 = '1; end
      #1;
      expv = add32(add32(s1, s2) ^ s3, s4);
      checks++;
      if (f !== expv) begin
        failures++;
        $display("FAIL %h %h %h %h -> %h, expected %h", s1, s2, s3, s4, f, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
