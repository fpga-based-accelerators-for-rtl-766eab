// mont_mul: Montgomery product u = a * b * r^-1 mod n, with r = 2^k.
//
// Computes the three products of Montgomery's method one after the other on
// a single W x W multiplier:
//   t = a * b,   m = (t * n') mod r,   u = (t + m * n) / r,   u -= n if u >= n
// The reduction by r is a mask and the division a right shift by k, as in
// the document; sharing one multiplier over three cycles is this design's
// choice (it keeps the area of one 64-bit multiplier). The sum t + m*n is
// kept one bit wider than 2W so that moduli close to 2^W do not overflow.
//
// Interface: pulse start with a, b, n, nprime, k valid (they must stay
// stable until done). done pulses for one cycle with the result on u, which
// holds until the next start. Requires a, b < n, n odd, 2^(k-1) <= n < 2^k.
// Timing: done comes 4 cycles after start.
module mont_mul #(
  parameter int unsigned W = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [W-1:0]           a,
  input  logic [W-1:0]           b,
  input  logic [W-1:0]           n,
  input  logic [W-1:0]           nprime,
  input  logic [$clog2(W+1)-1:0] k,
  output logic [W-1:0]           u,
  output logic                   busy,
  output logic                   done
);

  typedef enum logic [1:0] {MM_IDLE, MM_T, MM_M, MM_U} mm_state_e;
  mm_state_e state;

  logic [W-1:0]   op_a, op_b;
  logic [2*W-1:0] prod;
  logic [2*W-1:0] t_q;
  logic [W-1:0]   m_q;
  logic [W-1:0]   kmask;
  logic [2*W:0]   sum;
  logic [W:0]     shifted;
  logic [W:0]     reduced;

  // mask for "mod r": the k low bits set
  always_comb begin
    kmask = '0;
    for (int i = 0; i < W; i++) if (i < int'(k)) kmask[i] = 1'b1;
  end

  // the shared multiplier
  always_comb begin
    unique case (state)
      MM_T:    begin op_a = a;             op_b = b;      end
      MM_M:    begin op_a = t_q[W-1:0];    op_b = nprime; end
      default: begin op_a = m_q;           op_b = n;      end
    endcase
    prod = op_a * op_b;
  end

  always_comb begin
    sum     = {1'b0, t_q} + {1'b0, prod};
    shifted = (W+1)'(sum >> k);
    reduced = (shifted >= {1'b0, n}) ? shifted - {1'b0, n} : shifted;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= MM_IDLE;
      t_q   <= '0;
      m_q   <= '0;
      u     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        MM_IDLE: if (start) state <= MM_T;
        MM_T: begin
          t_q   <= prod;
          state <= MM_M;
        end
        MM_M: begin
          m_q   <= prod[W-1:0] & kmask;
          state <= MM_U;
        end
        MM_U: begin
          u     <= reduced[W-1:0];
          done  <= 1'b1;
          state <= MM_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != MM_IDLE);

endmodule
