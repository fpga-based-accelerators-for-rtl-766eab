// blowfish_accel: streaming Blowfish encryption/decryption accelerator.
//
// Takes 64-bit words from an AXI4-Stream style input and a 32-bit control
// word from a GPIO register:
//   bit 31     0: expand the key carried by the first word, 1: keep the key
//              expanded by an earlier job (the first word is then ignored)
//   bit 30     0: encrypt, 1: decrypt
//   bits 29:0  number of 64-bit blocks in the job
// The job is a sequence of words: the key word (Setup state), then the
// blocks (Crypt state; each block is split into left = bits 63:32 and
// right = bits 31:0, ciphered by blowfish_core and sent back in the same
// layout; the last one goes out with TLAST and raises the interrupt), then
// one don't-care word (Flush) that returns the accelerator to Setup. The
// control word is sampled when the key word is taken.
// While the control word is zero, arriving words are taken and dropped and
// the interrupt is cleared, like the RSA accelerator. The interrupt stays
// high until the control word is written to zero or the next word is taken
// (this design's choice).
//
// Timing: key set-up takes 18749 cycles after the key word; each block
// takes 34 cycles in the core plus 3 for the stream handshakes (about 37
// cycles per block when words arrive back to back). After reset the core
// first spends 1043 cycles loading the pi tables, with s_tready low.
module blowfish_accel
  import crypto_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CONTROL_W-1:0] control,
  input  logic [63:0]          s_tdata,
  input  logic                 s_tvalid,
  output logic                 s_tready,
  output logic [63:0]          m_tdata,
  output logic                 m_tvalid,
  input  logic                 m_tready,
  output logic                 m_tlast,
  output logic                 irq
);

  typedef enum logic [1:0] {P_WAIT, P_INIT, P_CRYPT, P_OUT} phase_e;

  bfa_state_e            state;
  phase_e                phase;
  logic [BF_COUNT_W-1:0] blocks_left;
  logic                  dec_q;

  logic        init_start, crypt_start, core_busy, core_done;
  logic [63:0] key_q, blk_q;
  logic [31:0] dout_l, dout_r;
  logic        take;

  blowfish_core u_core (
    .clk, .rst_n, .init_start, .key(key_q), .crypt_start, .decrypt(dec_q),
    .din_l(blk_q[63:32]), .din_r(blk_q[31:0]), .dout_l, .dout_r,
    .busy(core_busy), .done(core_done)
  );

  assign s_tready = (phase == P_WAIT) && !core_busy;
  assign take     = s_tvalid && s_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= BFA_SETUP;
      phase       <= P_WAIT;
      blocks_left <= '0;
      dec_q       <= 1'b0;
      key_q       <= '0;
      blk_q       <= '0;
      init_start  <= 1'b0;
      crypt_start <= 1'b0;
      m_tdata     <= '0;
      m_tvalid    <= 1'b0;
      m_tlast     <= 1'b0;
      irq         <= 1'b0;
    end else begin
      init_start  <= 1'b0;
      crypt_start <= 1'b0;
      if (control == '0) irq <= 1'b0;
      unique case (phase)
        P_WAIT: if (take) begin
          irq <= 1'b0;
          if (control != '0) begin
            unique case (state)
              BFA_SETUP: begin
                blocks_left <= control[BF_COUNT_W-1:0];
                dec_q       <= control[BF_DECRYPT_BIT];
                state       <= BFA_CRYPT;
                if (!control[BF_SKIP_INIT_BIT]) begin
                  key_q      <= s_tdata;
                  init_start <= 1'b1;
                  phase      <= P_INIT;
                end
              end
              BFA_CRYPT: begin
                blk_q       <= s_tdata;
                crypt_start <= 1'b1;
                phase       <= P_CRYPT;
              end
              default: begin    // BFA_FLUSH
                blocks_left <= '0;
                dec_q       <= 1'b0;
                state       <= BFA_SETUP;
              end
            endcase
          end
        end
        P_INIT: if (core_done) phase <= P_WAIT;
        P_CRYPT: if (core_done) begin
          m_tdata  <= {dout_l, dout_r};
          m_tvalid <= 1'b1;
          m_tlast  <= (blocks_left == BF_COUNT_W'(1));
          phase    <= P_OUT;
        end
        P_OUT: if (m_tready) begin
          m_tvalid    <= 1'b0;
          m_tlast     <= 1'b0;
          blocks_left <= blocks_left - 1'b1;
          phase       <= P_WAIT;
          if (blocks_left == BF_COUNT_W'(1)) begin
            irq   <= 1'b1;
            state <= BFA_FLUSH;
          end
        end
        default: phase <= P_WAIT;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast))
    else $error("blowfish_accel: output word changed before it was taken");

endmodule
