// rsa_accel: streaming RSA encryption/decryption accelerator, C = M^e mod n.
//
// The accelerator takes 64-bit words from an AXI4-Stream style input and a
// 32-bit control word (the block count) from a GPIO register. It steps
// through the sequence of the document's state diagram, one input word per
// state:
//   Exponent : the word is the exponent e; the control word is latched as
//              the number of blocks.
//   Modulus  : the word is the modulus n; k, n' and r mod n are computed.
//   Crypt    : each word is a message block M; M^e mod n is computed by
//              Montgomery exponentiation and sent on the output stream. The
//              last block goes out with TLAST set and raises the interrupt.
//   Flush    : one more (don't-care) word is taken, which returns the
//              accelerator to Exponent for the next job.
// Encryption and decryption are the same operation with a different key.
// While the control word is zero the accelerator stays idle: an arriving
// word is taken and dropped, as the document's accelerator does, and the
// interrupt is cleared. The interrupt is a level that stays high until the
// control word is written to zero or the next word is taken (this
// clearing rule is this design's choice).
//
// Timing: an input word is accepted only while the engine waits for one
// (s_tready high). Exponent takes 1 cycle, Modulus k + 3 cycles, and each
// block the mont_exp time plus 2 cycles and the output handshake.
module rsa_accel
  import crypto_pkg::*;
#(
  parameter int unsigned W = 64   // key / block width in bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CONTROL_W-1:0] control,
  // input stream (from the DMA read channel)
  input  logic [W-1:0]         s_tdata,
  input  logic                 s_tvalid,
  output logic                 s_tready,
  // output stream (to the DMA write channel)
  output logic [W-1:0]         m_tdata,
  output logic                 m_tvalid,
  input  logic                 m_tready,
  output logic                 m_tlast,
  // interrupt (the accelerator's return value)
  output logic                 irq
);

  localparam int unsigned KW = $clog2(W+1);

  typedef enum logic [1:0] {P_WAIT, P_PRE, P_EXP, P_OUT} phase_e;

  rsa_state_e           state;
  phase_e               phase;
  logic [W-1:0]         e_q, n_q, m_q;
  logic [CONTROL_W-1:0] blocks_left;

  logic                 pre_start, pre_busy, pre_done;
  logic [KW-1:0]        k;
  logic [W-1:0]         nprime, r_mod_n;
  logic                 exp_start, exp_busy, exp_done;
  logic [W-1:0]         x;

  logic                 take;

  mont_precompute #(.W(W)) u_pre (
    .clk, .rst_n, .start(pre_start), .n(n_q),
    .k, .nprime, .r_mod_n, .busy(pre_busy), .done(pre_done)
  );

  mont_exp #(.W(W)) u_exp (
    .clk, .rst_n, .start(exp_start), .m(m_q), .e(e_q), .n(n_q), .nprime,
    .k, .r_mod_n, .x, .busy(exp_busy), .done(exp_done)
  );

  assign s_tready = (phase == P_WAIT);
  assign take     = s_tvalid && s_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= RSA_EXPONENT;
      phase       <= P_WAIT;
      e_q         <= '0;
      n_q         <= '0;
      m_q         <= '0;
      blocks_left <= '0;
      pre_start   <= 1'b0;
      exp_start   <= 1'b0;
      m_tdata     <= '0;
      m_tvalid    <= 1'b0;
      m_tlast     <= 1'b0;
      irq         <= 1'b0;
    end else begin
      pre_start <= 1'b0;
      exp_start <= 1'b0;
      if (control == '0) irq <= 1'b0;
      unique case (phase)
        P_WAIT: if (take) begin
          irq <= 1'b0;
          if (control != '0) begin
            unique case (state)
              RSA_EXPONENT: begin
                e_q         <= s_tdata;
                blocks_left <= control;
                state       <= RSA_MODULUS;
              end
              RSA_MODULUS: begin
                n_q       <= s_tdata;
                pre_start <= 1'b1;
                phase     <= P_PRE;
              end
              RSA_CRYPT: begin
                m_q       <= s_tdata;
                exp_start <= 1'b1;
                phase     <= P_EXP;
              end
              RSA_FLUSH: begin
                blocks_left <= '0;
                state       <= RSA_EXPONENT;
              end
            endcase
          end
        end
        P_PRE: if (pre_done) begin
          state <= RSA_CRYPT;
          phase <= P_WAIT;
        end
        P_EXP: if (exp_done) begin
          m_tdata  <= x;
          m_tvalid <= 1'b1;
          m_tlast  <= (blocks_left == CONTROL_W'(1));
          phase    <= P_OUT;
        end
        P_OUT: if (m_tready) begin
          m_tvalid    <= 1'b0;
          m_tlast     <= 1'b0;
          blocks_left <= blocks_left - 1'b1;
          phase       <= P_WAIT;
          if (blocks_left == CONTROL_W'(1)) begin
            irq   <= 1'b1;
            state <= RSA_FLUSH;
          end
        end
        default: phase <= P_WAIT;
      endcase
    end
  end

  // AXI4-Stream rule: a word offered on the output stays until taken
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast))
    else $error("rsa_accel: output word changed before it was taken");

endmodule
