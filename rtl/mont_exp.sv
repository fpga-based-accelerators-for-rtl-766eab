// mont_exp: modular exponentiation x = M^e mod n with Montgomery products.
//
// Left-to-right binary method in the Montgomery domain, as the document
// lays it out: M_bar = M * r mod n, x_bar = r mod n, then for each of the k
// exponent bits from bit k-1 down to bit 0, x_bar = monPro(x_bar, x_bar) and,
// when the bit is 1, x_bar = monPro(M_bar, x_bar); finally x = monPro(x_bar, 1).
// Only the k low bits of e are used, so e must be below 2^k (e < n in RSA).
// One mont_mul is shared by all products; M_bar comes from mod_shift_reduce.
//
// Interface: pulse start with m, e stable until done, and the modulus set
// (n, nprime, k, r_mod_n from mont_precompute) stable. done pulses for one
// cycle with the result on x, which holds until the next start.
// Timing: done comes W + k + 4 + 5 * (k + ones + 1) cycles after start,
// where ones is the number of 1 bits among the k exponent bits: the
// reduction takes W + k + 2 cycles and each Montgomery product 5. For a
// 64-bit modulus and an exponent with 32 ones this is 617 cycles.
module mont_exp #(
  parameter int unsigned W = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [W-1:0]           m,
  input  logic [W-1:0]           e,
  input  logic [W-1:0]           n,
  input  logic [W-1:0]           nprime,
  input  logic [$clog2(W+1)-1:0] k,
  input  logic [W-1:0]           r_mod_n,
  output logic [W-1:0]           x,
  output logic                   busy,
  output logic                   done
);

  localparam int unsigned KW = $clog2(W+1);

  typedef enum logic [2:0] {E_IDLE, E_RED, E_SQ, E_MUL, E_FIN} exp_state_e;
  exp_state_e state;

  logic          issued;     // product of the current step has been started
  logic [KW-1:0] bit_idx;    // exponent bit being processed
  logic [W-1:0]  m_bar;
  logic [W-1:0]  x_bar;

  logic          red_start, red_done;
  logic [W-1:0]  red_res;
  logic          mm_start, mm_done, mm_busy;
  logic [W-1:0]  mm_a, mm_b, mm_u;

  mod_shift_reduce #(.W(W)) u_reduce (
    .clk, .rst_n, .start(red_start), .m, .n, .k,
    .res(red_res), .busy(), .done(red_done)
  );

  mont_mul #(.W(W)) u_mul (
    .clk, .rst_n, .start(mm_start), .a(mm_a), .b(mm_b), .n, .nprime, .k,
    .u(mm_u), .busy(mm_busy), .done(mm_done)
  );

  always_comb begin
    unique case (state)
      E_MUL:   begin mm_a = m_bar; mm_b = x_bar;  end
      E_FIN:   begin mm_a = x_bar; mm_b = W'(1);  end
      default: begin mm_a = x_bar; mm_b = x_bar;  end
    endcase
  end

  assign red_start = (state == E_RED) && !issued;
  assign mm_start  = (state inside {E_SQ, E_MUL, E_FIN}) && !issued;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= E_IDLE;
      issued  <= 1'b0;
      bit_idx <= '0;
      m_bar   <= '0;
      x_bar   <= '0;
      x       <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != E_IDLE && !issued) issued <= 1'b1;
      unique case (state)
        E_IDLE: if (start) begin
          state  <= E_RED;
          issued <= 1'b0;
        end
        E_RED: if (red_done) begin
          m_bar   <= red_res;
          x_bar   <= r_mod_n;
          bit_idx <= k - 1'b1;
          issued  <= 1'b0;
          state   <= (k == '0) ? E_FIN : E_SQ;
        end
        E_SQ: if (mm_done) begin
          x_bar  <= mm_u;
          issued <= 1'b0;
          if (e[bit_idx[$clog2(W)-1:0]])         state <= E_MUL;
          else if (bit_idx == '0)   state <= E_FIN;
          else                      bit_idx <= bit_idx - 1'b1;
        end
        E_MUL: if (mm_done) begin
          x_bar  <= mm_u;
          issued <= 1'b0;
          if (bit_idx == '0) state <= E_FIN;
          else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= E_SQ;
          end
        end
        E_FIN: if (mm_done) begin
          x      <= mm_u;
          done   <= 1'b1;
          issued <= 1'b0;
          state  <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  assign busy = (state != E_IDLE);

endmodule
