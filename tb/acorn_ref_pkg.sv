// acorn_ref_pkg: bit-by-bit software model of ACORN-128 used by the
// testbenches to compute expected ciphertexts and tags.
//
// Written straight from the algorithm, one byte at a time with the least
// significant bit first, independently of the RTL's structure: the state is
// an array of 293 bits, each step XORs the six LFSR taps, forms the keystream
// and feedback bits and shifts the array down by one.
package acorn_ref_pkg;

  typedef byte unsigned bytes_t[];

  class acorn_ref;
    bit s[293];

    static function bit maj(bit x, bit y, bit z);
      return (x & y) ^ (x & z) ^ (y & z);
    endfunction
    static function bit ch(bit x, bit y, bit z);
      return (x & y) ^ (~x & z);
    endfunction

    // one state update; returns the keystream bit
    function bit step(bit m, bit ca, bit cb);
      bit ks, f;
      s[289] ^= s[235] ^ s[230];
      s[230] ^= s[196] ^ s[193];
      s[193] ^= s[160] ^ s[154];
      s[154] ^= s[111] ^ s[107];
      s[107] ^= s[66] ^ s[61];
      s[61]  ^= s[23] ^ s[0];
      ks = s[12] ^ s[154] ^ maj(s[235], s[61], s[193]) ^ ch(s[230], s[111], s[66]);
      f  = s[0] ^ ~s[107] ^ maj(s[244], s[23], s[160]) ^ (ca & s[196]) ^ (cb & ks);
      for (int j = 0; j < 292; j++) s[j] = s[j+1];
      s[292] = f ^ m;
      return ks;
    endfunction

    static function bit bit_of(bytes_t a, int i);
      return a[i / 8][i % 8];
    endfunction

    // encrypt; key and npub are 16 bytes each
    function void encrypt(bytes_t key, bytes_t npub, bytes_t ad, bytes_t pt,
                          output bytes_t ct, output bytes_t tag);
      bit ks;
      foreach (s[j]) s[j] = 1'b0;
      for (int i = 0; i < 1792; i++) begin
        bit m;
        if (i < 128)      m = bit_of(key, i);
        else if (i < 256) m = bit_of(npub, i - 128);
        else if (i == 256) m = bit_of(key, 0) ^ 1'b1;
        else              m = bit_of(key, i % 128);
        void'(step(m, 1'b1, 1'b1));
      end
      for (int i = 0; i < 8 * ad.size(); i++) void'(step(bit_of(ad, i), 1'b1, 1'b1));
      for (int i = 0; i < 256; i++) void'(step(i == 0, i < 128, 1'b1));
      ct = new[pt.size()];
      foreach (ct[k]) ct[k] = 8'h00;
      for (int i = 0; i < 8 * pt.size(); i++) begin
        // the keystream of this step does not depend on its input bit
        bit p;
        p  = bit_of(pt, i);
        ks = step(p, 1'b1, 1'b0);
        ct[i / 8][i % 8] = p ^ ks;
      end
      for (int i = 0; i < 256; i++) void'(step(i == 0, i < 128, 1'b0));
      tag = new[16];
      foreach (tag[k]) tag[k] = 8'h00;
      for (int i = 0; i < 768; i++) begin
        ks = step(1'b0, 1'b1, 1'b1);
        if (i >= 640) tag[(i - 640) / 8][(i - 640) % 8] = ks;
      end
    endfunction
  endclass

  // byte k of a stream -> word k/4, byte 0 in bits 31:24
  function automatic logic [31:0] word_of(bytes_t a, int w);
    logic [31:0] r = '0;
    for (int b = 0; b < 4; b++)
      if (4 * w + b < a.size()) r[31-8*b -: 8] = a[4 * w + b];
    return r;
  endfunction

  function automatic logic [127:0] vec128(bytes_t a);
    logic [127:0] r = '0;
    for (int b = 0; b < 16; b++) r[127-8*b -: 8] = a[b];
    return r;
  endfunction

  function automatic bytes_t rand_bytes(int n);
    bytes_t a = new[n];
    foreach (a[k]) a[k] = 8'($urandom);
    return a;
  endfunction

endpackage
