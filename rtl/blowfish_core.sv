// blowfish_core: Blowfish block cipher engine with key expansion.
//
// Holds the 18-word P-array in registers and the four S-boxes in four
// blowfish_sbox_ram memories, and runs the 16-round Feistel network of
// Blowfish on one 64-bit block (left and right 32-bit halves). Each round
// is two cycles: first L ^= P[i] and the four S-box reads are issued from
// the bytes of the new L, then R ^= F(L) and the halves swap. After 16
// rounds the last swap is undone and the halves are whitened with P17/P18
// (encryption) or P2/P1 (decryption, which walks the P-array backwards).
//
// Key expansion (init_start), as the document describes it:
//   1. the P-array and S-boxes are reloaded with the digits of pi from
//      blowfish_pi_rom, and each P word is XORed with 32 bits taken from
//      the 64-bit key one hex digit at a time: starting from the least
//      significant digit, each digit is shifted into the word from the
//      right; when the remaining key runs out (becomes zero) the key is
//      started again;
//   2. a zero block is encrypted repeatedly and each result replaces the
//      next two P words (P1,P2 .. P17,P18) and then the next two entries
//      of S-box 1 .. S-box 4, 521 encryptions in all.
// Reloading pi at the start of every key expansion is this design's choice:
// it makes a second key independent of the first. After reset the core
// loads the pi tables once with no key, so that the tables hold the plain
// pi values before any key is given.
//
// Interface: init_start (with key) or crypt_start (with decrypt, din_l,
// din_r) is taken while busy is low. done pulses when either finishes;
// dout_l/dout_r hold the result of the last block.
// Timing: key expansion 1043 + 9 * 33 + 512 * 34 + 1 = 18749 cycles (table
// reload, then 521 encryptions); one block 34 cycles
// from crypt_start to done. The reset-time table load takes 1043 cycles.
module blowfish_core
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init_start,
  input  logic [63:0] key,
  input  logic        crypt_start,
  input  logic        decrypt,
  input  logic [31:0] din_l,
  input  logic [31:0] din_r,
  output logic [31:0] dout_l,
  output logic [31:0] dout_r,
  output logic        busy,
  output logic        done
);

  localparam int unsigned RW = $clog2(BF_PI_WORDS);   // 11-bit ROM index
  localparam int unsigned EW = 10;                    // expansion step index

  typedef enum logic [2:0] {
    C_IDLE, C_LOAD, C_EXP_RUN, C_EXP_WR2, C_CRYPT_RUN
  } core_state_e;

  core_state_e state;

  // P-array
  logic [31:0] p_arr [BF_P_WORDS];

  // S-box memories
  logic [3:0]        sb_we;
  logic [7:0]        sb_waddr;
  logic [31:0]       sb_wdata;
  logic [7:0]        sb_raddr [BF_SBOXES];
  logic [31:0]       sb_rdata [BF_SBOXES];

  // pi ROM and load pipeline
  logic [RW-1:0] rom_addr;
  logic [31:0]   rom_data;
  logic [RW-1:0] ld_idx;        // next ROM address to read
  logic          wr_vld;        // a ROM word arrives this cycle
  logic [RW-1:0] wr_idx;        // its index
  logic [63:0]   key_q;
  logic [63:0]   aux;           // remaining key digits
  logic [63:0]   aux_next;
  logic [31:0]   key_word;
  logic          expand_after;  // load is followed by the expansion

  // round engine
  logic        eng_run;
  logic        eng_phase;       // 0: XOR P and read S-boxes, 1: apply F
  logic [4:0]  eng_round;
  logic        eng_dec;
  logic [31:0] eng_l, eng_r;
  logic [31:0] x_l;             // L ^ P[i]
  logic [31:0] f_out;
  logic        eng_fin;
  logic [31:0] fin_l, fin_r;
  logic [4:0]  p_idx;

  // expansion
  logic [EW-1:0] exp_idx;       // 0..8 P pairs, 9..520 S-box pairs
  logic [EW-1:0] s_pair;        // S-box pair index (bits 8:7 box, 6:0 pair)

  // ---------------------------------------------------------------- memories
  blowfish_pi_rom u_rom (.clk, .addr(rom_addr), .rdata(rom_data));

  for (genvar g = 0; g < BF_SBOXES; g++) begin : g_sbox
    blowfish_sbox_ram u_sbox (
      .clk, .we(sb_we[g]), .waddr(sb_waddr), .wdata(sb_wdata),
      .raddr(sb_raddr[g]), .rdata(sb_rdata[g])
    );
  end

  blowfish_f u_f (
    .s1(sb_rdata[0]), .s2(sb_rdata[1]), .s3(sb_rdata[2]), .s4(sb_rdata[3]),
    .f(f_out)
  );

  // ------------------------------------------------------- key digit stream
  always_comb begin
    logic [63:0] a;
    a        = aux;
    key_word = '0;
    for (int i = 0; i < 8; i++) begin
      key_word = {key_word[27:0], a[3:0]};
      a        = a >> 4;
      if (a == '0) a = key_q;
    end
    aux_next = a;
  end

  // ----------------------------------------------------------- round engine
  always_comb begin
    p_idx = eng_dec ? 5'(17 - int'(eng_round)) : eng_round;
    x_l   = eng_l ^ p_arr[p_idx];
    for (int i = 0; i < 4; i++) sb_raddr[i] = x_l[31-8*i -: 8];
    if (eng_dec) begin
      fin_l = eng_r ^ p_arr[0];
      fin_r = eng_l ^ p_arr[1];
    end else begin
      fin_l = eng_r ^ p_arr[17];
      fin_r = eng_l ^ p_arr[16];
    end
    eng_fin = !eng_run && (eng_round == 5'd16) &&
              (state inside {C_EXP_RUN, C_CRYPT_RUN});
  end

  // --------------------------------------------------- S-box write steering
  assign s_pair = exp_idx - EW'(9);

  always_comb begin
    sb_we    = '0;
    sb_waddr = '0;
    sb_wdata = '0;
    if (state == C_LOAD && wr_vld && wr_idx >= RW'(BF_P_WORDS)) begin
      sb_we[2'((wr_idx - RW'(BF_P_WORDS)) >> 8)] = 1'b1;
      sb_waddr = 8'(wr_idx - RW'(BF_P_WORDS));
      sb_wdata = rom_data;
    end else if (state == C_EXP_RUN && eng_fin && exp_idx >= EW'(9)) begin
      sb_we[s_pair[8:7]] = 1'b1;
      sb_waddr = {s_pair[6:0], 1'b0};
      sb_wdata = fin_l;
    end else if (state == C_EXP_WR2) begin
      sb_we[s_pair[8:7]] = 1'b1;
      sb_waddr = {s_pair[6:0], 1'b1};
      sb_wdata = eng_l;           // right half parked in eng_l, see below
    end
  end

  assign rom_addr = ld_idx;

  // -------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_LOAD;     // load the plain pi tables after reset
      ld_idx       <= '0;
      wr_vld       <= 1'b0;
      wr_idx       <= '0;
      key_q        <= '0;
      aux          <= '0;
      expand_after <= 1'b0;
      eng_run      <= 1'b0;
      eng_phase    <= 1'b0;
      eng_round    <= '0;
      eng_dec      <= 1'b0;
      eng_l        <= '0;
      eng_r        <= '0;
      exp_idx      <= '0;
      dout_l       <= '0;
      dout_r       <= '0;
      done         <= 1'b0;
      for (int i = 0; i < BF_P_WORDS; i++) p_arr[i] <= '0;
    end else begin
      done <= 1'b0;

      // round engine
      if (eng_run) begin
        if (!eng_phase) begin
          eng_l     <= x_l;
          eng_phase <= 1'b1;
        end else begin
          eng_l     <= eng_r ^ f_out;
          eng_r     <= eng_l;
          eng_phase <= 1'b0;
          eng_round <= eng_round + 1'b1;
          if (eng_round == 5'd15) eng_run <= 1'b0;
        end
      end

      unique case (state)
        C_IDLE: begin
          if (init_start) begin
            key_q        <= key;
            aux          <= key;
            ld_idx       <= '0;
            wr_vld       <= 1'b0;
            expand_after <= 1'b1;
            state        <= C_LOAD;
          end else if (crypt_start) begin
            eng_l     <= din_l;
            eng_r     <= din_r;
            eng_dec   <= decrypt;
            eng_round <= '0;
            eng_phase <= 1'b0;
            eng_run   <= 1'b1;
            state     <= C_CRYPT_RUN;
          end
        end

        C_LOAD: begin
          wr_vld <= (ld_idx < RW'(BF_PI_WORDS));
          wr_idx <= ld_idx;
          if (ld_idx < RW'(BF_PI_WORDS)) ld_idx <= ld_idx + 1'b1;
          if (wr_vld && wr_idx < RW'(BF_P_WORDS)) begin
            p_arr[5'(wr_idx)] <= rom_data ^ key_word;
            aux               <= aux_next;
          end
          if (wr_vld && wr_idx == RW'(BF_PI_WORDS - 1)) begin
            wr_vld <= 1'b0;
            if (expand_after) begin
              exp_idx   <= '0;
              eng_l     <= '0;
              eng_r     <= '0;
              eng_dec   <= 1'b0;
              eng_round <= '0;
              eng_phase <= 1'b0;
              eng_run   <= 1'b1;
              state     <= C_EXP_RUN;
            end else begin
              state <= C_IDLE;
            end
          end
        end

        C_EXP_RUN: if (eng_fin) begin
          // the encrypted block becomes the next plaintext and the next
          // pair of table entries
          if (exp_idx < EW'(9)) begin
            p_arr[5'(2*exp_idx)]     <= fin_l;
            p_arr[5'(2*exp_idx + 1)] <= fin_r;
            eng_l <= fin_l;
            eng_r <= fin_r;
            exp_idx   <= exp_idx + 1'b1;
            eng_round <= '0;
            eng_run   <= 1'b1;
          end else begin
            // first S-box word is written now; park the right half in
            // eng_l for the second write, keep the left half in eng_r
            eng_l <= fin_r;
            eng_r <= fin_l;
            state <= C_EXP_WR2;
          end
        end

        C_EXP_WR2: begin
          eng_l <= eng_r;   // restore: left half
          eng_r <= eng_l;   // right half
          if (exp_idx == EW'(BF_P_WORDS/2 + BF_SBOXES*BF_SBOX_SIZE/2 - 1)) begin
            done  <= 1'b1;
            state <= C_IDLE;
          end else begin
            exp_idx   <= exp_idx + 1'b1;
            eng_round <= '0;
            eng_phase <= 1'b0;
            eng_run   <= 1'b1;
            state     <= C_EXP_RUN;
          end
        end

        C_CRYPT_RUN: if (eng_fin) begin
          dout_l <= fin_l;
          dout_r <= fin_r;
          done   <= 1'b1;
          state  <= C_IDLE;
        end

        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE);

endmodule
