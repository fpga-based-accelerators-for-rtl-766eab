// mont_precompute: per-modulus set-up of Montgomery arithmetic.
//
// From the modulus n it derives the bit length k (so 2^(k-1) <= n < 2^k),
// r = 2^k and the constant n' with r * r^-1 - n * n' = 1, i.e.
// n * n' = -1 mod r. The document obtains n' with the extended Euclidean
// algorithm; this block computes the same n' bit-serially instead, one bit
// per cycle, which needs only an adder and a shifter: with s = 1 and
// n' = 0, for i = 0 .. k-1, if s is odd then set bit i of n' and add n to s,
// then halve s. Because n is odd, every addition makes s even, and after k
// steps n * n' + 1 is a multiple of 2^k. It also gives r mod n = r - n,
// which is the n-residue of 1 (the start value of the exponentiation).
//
// Interface: pulse start with n valid (n odd, n > 1, stable until done).
// done pulses for one cycle; k, nprime and r_mod_n then hold.
// Timing: done comes k + 3 cycles after start.
module mont_precompute #(
  parameter int unsigned W = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [W-1:0]           n,
  output logic [$clog2(W+1)-1:0] k,
  output logic [W-1:0]           nprime,
  output logic [W-1:0]           r_mod_n,
  output logic                   busy,
  output logic                   done
);

  localparam int unsigned KW = $clog2(W+1);

  typedef enum logic [1:0] {PC_IDLE, PC_LEN, PC_INV} pc_state_e;
  pc_state_e state;

  logic [KW-1:0] bitlen;
  logic [KW-1:0] idx;
  logic [W:0]    s;
  logic [W:0]    s_next;
  logic [W:0]    r_full;

  // number of significant bits of n (highest set bit + 1)
  always_comb begin
    bitlen = '0;
    for (int i = 0; i < W; i++) if (n[i]) bitlen = KW'(i + 1);
  end

  always_comb begin
    s_next = s[0] ? (s + {1'b0, n}) : s;
    s_next = s_next >> 1;
  end

  // r = 2^k in W+1 bits
  always_comb begin
    r_full = '0;
    r_full[k] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= PC_IDLE;
      k       <= '0;
      nprime  <= '0;
      r_mod_n <= '0;
      idx     <= '0;
      s       <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        PC_IDLE: if (start) state <= PC_LEN;
        PC_LEN: begin
          k      <= bitlen;
          idx    <= '0;
          s      <= (W+1)'(1);
          nprime <= '0;
          state  <= PC_INV;
        end
        PC_INV: begin
          if (idx == k) begin
            r_mod_n <= W'(r_full - {1'b0, n});
            done    <= 1'b1;
            state   <= PC_IDLE;
          end else begin
            nprime[idx[$clog2(W)-1:0]] <= s[0];
            s           <= s_next;
            idx         <= idx + 1'b1;
          end
        end
        default: state <= PC_IDLE;
      endcase
    end
  end

  assign busy = (state != PC_IDLE);

endmodule
