// acorn_core: ACORN-128 authenticated stream cipher, one state step per clock.
//
// ACORN keeps a 293-bit state made of six LFSRs and a short shift register.
// Each step first mixes the six LFSR taps, then forms a keystream bit ks and a
// feedback bit f from AND/XOR functions of the state, and shifts the state by
// one bit with f XOR the input bit m entering at position 292:
//   S289^=S235^S230  S230^=S196^S193  S193^=S160^S154
//   S154^=S111^S107  S107^=S66^S61    S61 ^=S23^S0
//   ks = S12 ^ S154 ^ maj(S235,S61,S193) ^ ch(S230,S111,S66)
//   f  = S0 ^ ~S107 ^ maj(S244,S23,S160) ^ (ca & S196) ^ (cb & ks)
// A message runs: 1792 initialisation steps (128 key bits, 128 nonce bits,
// then the key repeated with its first bit inverted), the associated data
// (ca=cb=1), 256 padding steps (a single 1 then zeros, ca=1 for the first
// 128), the message (ca=1, cb=0, c = p ^ ks), 256 padding steps with cb=0,
// and 768 finalisation steps (m=0, ca=cb=1) whose last 128 keystream bits are
// the tag. This is the published ACORN-128 (version 3) algorithm, checked
// against its known-answer tag for an all-zero key and nonce. The original design
// names ACORN as the cipher of the low-power mode and describes it only as a
// stream cipher of XOR and AND gates with a narrow data path. The one-bit
// datapath is this design's choice; with the per-block handshake it costs a
// little over 8 cycles per byte.
//
// Bit order: in 32-bit words and 128-bit keys/tags, byte 0 is the most
// significant byte; within a byte the least significant bit is processed
// first.
//
// Interface (valid/ready): a BDI_NPUB block on bdi starts an operation; the
// core then takes the 4 nonce words, one AD segment (blocks until bdi_eot),
// one message segment, and for decryption 4 tag words. bdi_size gives the
// valid bytes of a block (0..4; 0 only for an empty segment, with bdi_eot).
// Each message block of non-zero size produces one bdo word (ciphertext or
// plaintext, bytes past bdi_size undefined). Encryption ends with the tag on
// tag/tag_valid; decryption with auth_valid/auth_ok. key must be stable from
// the start of an operation until initialisation ends.
module acorn_core
  import aead_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KEY_W-1:0]  key,
  input  logic              decrypt,
  input  logic [W-1:0]      bdi,
  input  logic              bdi_valid,
  output logic              bdi_ready,
  input  bdi_type_e         bdi_type,
  input  logic [2:0]        bdi_size,
  input  logic              bdi_eot,
  output logic [W-1:0]      bdo,
  output logic              bdo_valid,
  input  logic              bdo_ready,
  output logic [TAG_W-1:0]  tag,
  output logic              tag_valid,
  input  logic              tag_ready,
  output logic              auth_valid,
  output logic              auth_ok,
  input  logic              auth_ready,
  output logic              idle
);
  localparam int unsigned INIT_K_STEPS  = 128;
  localparam int unsigned INIT_K2_STEPS = 1536;
  localparam int unsigned PAD_STEPS     = 256;
  localparam int unsigned FINAL_STEPS   = 768;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT_K, S_IV_LOAD, S_IV_RUN, S_INIT_K2,
    S_AD_LOAD, S_AD_RUN, S_AD_PAD,
    S_MSG_LOAD, S_MSG_RUN, S_MSG_OUT, S_MSG_PAD,
    S_FINAL, S_TAG_OUT, S_TAG_LOAD, S_AUTH
  } state_e;

  state_e       state;
  logic [292:0] st;
  logic [10:0]  cnt;
  logic [5:0]   nbits;
  logic [1:0]   wcnt;
  logic [W-1:0] w, o;
  logic         eot, dec, mismatch;

  // position of bit i (byte i/8, bit i%8) in a big-endian-byte vector
  function automatic int unsigned bidx32(logic [4:0] i);
    return 24 - 8 * int'(i[4:3]) + int'(i[2:0]);
  endfunction
  function automatic int unsigned bidx128(logic [6:0] i);
    return 120 - 8 * int'(i[6:3]) + int'(i[2:0]);
  endfunction

  // ---------------------------------------------------------------- step
  logic         m, ca, cb, step, ks, f;
  logic [292:0] t, st_next;

  always_comb begin
    t = st;
    t[289] = st[289] ^ st[235] ^ st[230];
    t[230] = st[230] ^ st[196] ^ st[193];
    t[193] = st[193] ^ st[160] ^ st[154];
    t[154] = st[154] ^ st[111] ^ st[107];
    t[107] = st[107] ^ st[66]  ^ st[61];
    t[61]  = st[61]  ^ st[23]  ^ st[0];
    ks = t[12] ^ t[154]
       ^ ((t[235] & t[61]) ^ (t[235] & t[193]) ^ (t[61] & t[193]))
       ^ ((t[230] & t[111]) ^ (~t[230] & t[66]));
    f  = t[0] ^ ~t[107]
       ^ ((t[244] & t[23]) ^ (t[244] & t[160]) ^ (t[23] & t[160]))
       ^ (ca & t[196]) ^ (cb & ks);
    st_next = {f ^ m, t[292:1]};
  end

  logic wbit, run_done;
  assign wbit     = w[bidx32(cnt[4:0])];
  assign run_done = (cnt[5:0] == nbits);

  always_comb begin
    m = 1'b0; ca = 1'b1; cb = 1'b1; step = 1'b0;
    unique case (state)
      S_INIT_K:  begin step = 1'b1; m = key[bidx128(cnt[6:0])]; end
      S_IV_RUN:  begin step = 1'b1; m = wbit; end
      S_INIT_K2: begin step = 1'b1; m = key[bidx128(cnt[6:0])] ^ (cnt == '0); end
      S_AD_RUN:  begin step = !run_done; m = wbit; end
      S_AD_PAD:  begin step = 1'b1; m = (cnt == '0); ca = (cnt < 11'd128); end
      // encryption absorbs the plaintext bit; decryption the recovered one
      S_MSG_RUN: begin step = !run_done; cb = 1'b0; m = dec ? (wbit ^ ks) : wbit; end
      S_MSG_PAD: begin step = 1'b1; m = (cnt == '0); ca = (cnt < 11'd128); cb = 1'b0; end
      S_FINAL:   begin step = 1'b1; end
      default:   ;
    endcase
  end

  // ------------------------------------------------------------- control
  assign bdi_ready  = (state == S_IV_LOAD  && bdi_type == BDI_NPUB) ||
                      (state == S_AD_LOAD  && bdi_type == BDI_AD)   ||
                      (state == S_MSG_LOAD && bdi_type == BDI_MSG)  ||
                      (state == S_TAG_LOAD && bdi_type == BDI_TAG);
  assign bdo        = o;
  assign bdo_valid  = (state == S_MSG_OUT);
  assign tag_valid  = (state == S_TAG_OUT);
  assign auth_valid = (state == S_AUTH);
  assign auth_ok    = !mismatch;
  assign idle       = (state == S_IDLE);

  logic take;
  assign take = bdi_valid && bdi_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      st       <= '0;
      cnt      <= '0;
      nbits    <= '0;
      wcnt     <= '0;
      w        <= '0;
      o        <= '0;
      eot      <= 1'b0;
      dec      <= 1'b0;
      mismatch <= 1'b0;
      tag      <= '0;
    end else begin
      if (step) begin
        st  <= st_next;
        cnt <= cnt + 1'b1;
      end
      if (take) begin
        w     <= bdi;
        o     <= bdi;
        nbits <= {bdi_size, 3'b000};
        eot   <= bdi_eot;
        cnt   <= '0;
      end
      unique case (state)
        S_IDLE:
          if (bdi_valid && bdi_type == BDI_NPUB) begin
            state    <= S_INIT_K;
            st       <= '0;
            cnt      <= '0;
            wcnt     <= '0;
            dec      <= decrypt;
            mismatch <= 1'b0;
          end
        S_INIT_K:
          if (cnt == 11'(INIT_K_STEPS - 1)) state <= S_IV_LOAD;
        S_IV_LOAD:
          if (take) state <= S_IV_RUN;
        S_IV_RUN:
          if (cnt == 11'd31) begin
            wcnt <= wcnt + 1'b1;
            if (wcnt == 2'd3) begin
              state <= S_INIT_K2;
              cnt   <= '0;
            end else begin
              state <= S_IV_LOAD;
            end
          end
        S_INIT_K2:
          if (cnt == 11'(INIT_K2_STEPS - 1)) begin
            state <= S_AD_LOAD;
            cnt   <= '0;
          end
        S_AD_LOAD:
          if (take) state <= S_AD_RUN;
        S_AD_RUN:
          if (run_done) begin
            state <= eot ? S_AD_PAD : S_AD_LOAD;
            cnt   <= '0;
          end
        S_AD_PAD:
          if (cnt == 11'(PAD_STEPS - 1)) begin
            state <= S_MSG_LOAD;
            cnt   <= '0;
          end
        S_MSG_LOAD:
          if (take) state <= S_MSG_RUN;
        S_MSG_RUN:
          if (run_done) begin
            cnt   <= '0;
            state <= (nbits != '0) ? S_MSG_OUT : S_MSG_PAD;
          end else begin
            o[bidx32(cnt[4:0])] <= wbit ^ ks;
          end
        S_MSG_OUT:
          if (bdo_ready) state <= eot ? S_MSG_PAD : S_MSG_LOAD;
        S_MSG_PAD:
          if (cnt == 11'(PAD_STEPS - 1)) begin
            state <= S_FINAL;
            cnt   <= '0;
          end
        S_FINAL: begin
          if (cnt >= 11'(FINAL_STEPS - TAG_W))
            tag[bidx128(cnt[6:0])] <= ks;
          if (cnt == 11'(FINAL_STEPS - 1)) begin
            state <= dec ? S_TAG_LOAD : S_TAG_OUT;
            cnt   <= '0;
            wcnt  <= '0;
          end
        end
        S_TAG_OUT:
          if (tag_ready) state <= S_IDLE;
        S_TAG_LOAD:
          if (take) begin
            if (bdi != tag[TAG_W-1-32*int'(wcnt) -: 32]) mismatch <= 1'b1;
            wcnt <= wcnt + 1'b1;
            if (wcnt == 2'd3) state <= S_AUTH;
          end
        S_AUTH:
          if (auth_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // blocks of a segment other than the last are full words
  assert property (@(posedge clk) disable iff (!rst_n)
                   take && !bdi_eot && bdi_type != BDI_NPUB && bdi_type != BDI_TAG |-> bdi_size == 3'd4);

endmodule
