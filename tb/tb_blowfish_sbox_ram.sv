// tb_blowfish_sbox_ram: self-checking test of the 256 x 32 S-box memory.
//
// Writes every word, then mixes random writes and reads, comparing each read
// (one cycle after its address) with a model array kept here. Also checks
// read-during-write of the same word returns the old data.
module tb_blowfish_sbox_ram;
  logic        clk = 1'b0, we = 1'b0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  blowfish_sbox_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1'b1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      raddr = 8'($urandom);
      we    = ($urandom % 2 == 0);
      waddr = (t % 7 == 0) ? raddr : 8'($urandom);
      wdata = $urandom;
      expv  = model[raddr];          // old data on a same-word collision
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("FAIL read %0d = %h, expected %h", raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
