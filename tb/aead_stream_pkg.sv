// aead_stream_pkg: builds the PDI/SDI word streams of AEAD instructions and
// the DO words the AEAD must answer with, using the ACORN software model.
package aead_stream_pkg;
  import aead_pkg::*;
  import acorn_ref_pkg::*;

  typedef logic [31:0] words_t[$];

  // key activation: ACTKEY on PDI, LDKEY + KEY header + key on SDI
  function automatic void key_op(bytes_t key, ref words_t pdi, ref words_t sdi);
    pdi.push_back({OP_ACTKEY, 28'h0});
    sdi.push_back({OP_LDKEY, 28'h0});
    sdi.push_back(hdr_word(HDR_KEY, 16'd16));
    for (int w = 0; w < 4; w++) sdi.push_back(word_of(key, w));
  endfunction

  function automatic void push_seg(ref words_t q, input logic [3:0] t, bytes_t a, bit junk);
    q.push_back(hdr_word(t, 16'(a.size())));
    for (int w = 0; 4 * w < a.size(); w++) begin
      logic [31:0] v = word_of(a, w);
      // junk in the bytes past the end must not matter
      if (junk) for (int b = 0; b < 4; b++) if (4 * w + b >= a.size()) v[31-8*b -: 8] = 8'($urandom);
      q.push_back(v);
    end
  endfunction

  // one encryption (dec=0) or decryption (dec=1; bad_tag flips a tag bit)
  function automatic void aead_op(bytes_t key, bytes_t npub, bytes_t ad, bytes_t pt,
                                  bit dec, bit bad_tag, ref words_t pdi, ref words_t exp_do);
    acorn_ref m = new();
    bytes_t ct, tg;
    m.encrypt(key, npub, ad, pt, ct, tg);
    pdi.push_back({dec ? OP_DEC : OP_ENC, 28'h0});
    push_seg(pdi, HDR_NPUB, npub, 1'b0);
    push_seg(pdi, HDR_AD, ad, 1'b1);
    if (!dec) begin
      push_seg(pdi, HDR_PT, pt, 1'b1);
      exp_do.push_back(hdr_word(HDR_CT, 16'(ct.size())));
      for (int w = 0; 4 * w < ct.size(); w++) exp_do.push_back(word_of(ct, w));
      exp_do.push_back(hdr_word(HDR_TAG, 16'd16));
      for (int w = 0; w < 4; w++) exp_do.push_back(word_of(tg, w));
      exp_do.push_back({STAT_SUCCESS, 28'h0});
    end else begin
      bytes_t t2 = tg;
      if (bad_tag) t2[$urandom_range(15)] ^= 8'h01;
      push_seg(pdi, HDR_CT, ct, 1'b1);
      push_seg(pdi, HDR_TAG, t2, 1'b0);
      exp_do.push_back(hdr_word(HDR_PT, 16'(pt.size())));
      for (int w = 0; 4 * w < pt.size(); w++) exp_do.push_back(word_of(pt, w));
      exp_do.push_back({bad_tag ? STAT_FAILURE : STAT_SUCCESS, 28'h0});
    end
  endfunction
endpackage
