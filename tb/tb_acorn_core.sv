// tb_acorn_core: self-checking test of the ACORN-128 core.
//
// Drives the core's block interface directly with random keys, nonces,
// associated data and messages of lengths 0..13 bytes (empty segments,
// partial last words, several words), and compares the ciphertext words and
// the tag with the software model in acorn_ref_pkg. Each encryption is then
// decrypted: the plaintext must come back and the tag must be accepted; with
// one tag bit flipped it must be rejected. Also checks the cycle cost of the
// initialisation (1792 steps plus per-word overhead) and that a message costs
// no more than 10.475 cycles per byte, the latency the design targets.
// Finally one known-answer test from the published ACORN-128 test vectors
// (all-zero key and nonce, empty AD and message).
module tb_acorn_core;
  import aead_pkg::*;
  import acorn_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [KEY_W-1:0] key;
  logic             decrypt;
  logic [W-1:0]     bdi;
  logic             bdi_valid, bdi_ready, bdi_eot;
  bdi_type_e        bdi_type;
  logic [2:0]       bdi_size;
  logic [W-1:0]     bdo;
  logic             bdo_valid, bdo_ready;
  logic [TAG_W-1:0] tag;
  logic             tag_valid, tag_ready, auth_valid, auth_ok, auth_ready, idle;

  acorn_core dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] outw[$];   // message words returned by the core
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog in core state %s valid %b type %s", dut.state.name(), bdi_valid, bdi_type.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one block and wait until the core takes it
  task automatic send(logic [31:0] d, bdi_type_e t, int size, bit eot);
    bdi = d; bdi_type = t; bdi_size = 3'(size); bdi_eot = eot; bdi_valid = 1'b1;
    do @(negedge clk); while (!bdi_ready);
    @(posedge clk); #1;
    bdi_valid = 1'b0;
  endtask

  // send a segment, collecting output words for message segments
  task automatic send_seg(bytes_t a, bdi_type_e t);
    int n = a.size();
    if (n == 0) send('0, t, 0, 1'b1);
    for (int w = 0; 4 * w < n; w++) begin
      int sz = (n - 4 * w >= 4) ? 4 : n - 4 * w;
      send(word_of(a, w), t, sz, (4 * w + 4 >= n));
      if (t == BDI_MSG) begin
        bdo_ready = 1'b1;
        do @(negedge clk); while (!bdo_valid);
        outw.push_back(bdo);
        @(posedge clk); #1;
        bdo_ready = 1'b0;
      end
    end
  endtask

  initial begin
    acorn_ref ref_m = new();
    bytes_t k, n, ad, pt, ct, tg, data;
    int lens[] = '{0, 1, 3, 4, 5, 8, 13};
    longint t0, t_init, t_msg;
    bdi_valid = 1'b0; bdo_ready = 1'b0; tag_ready = 1'b0; auth_ready = 1'b0;
    bdi = '0; bdi_type = BDI_AD; bdi_size = '0; bdi_eot = 1'b0; decrypt = 1'b0; key = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    for (int tcase = 0; tcase < 10; tcase++) begin
      automatic int adl = lens[$urandom_range(lens.size() - 1)];
      automatic int ml  = (tcase == 0) ? 8 : lens[$urandom_range(lens.size() - 1)];
      k = rand_bytes(16); n = rand_bytes(16); ad = rand_bytes(adl); pt = rand_bytes(ml);
      ref_m.encrypt(k, n, ad, pt, ct, tg);

      for (int mode = 0; mode < 3; mode++) begin   // 0 enc, 1 dec, 2 dec with bad tag
        automatic logic [127:0] tv = vec128(tg);
        if (mode == 2) tv[$urandom_range(127)] ^= 1'b1;
        key = vec128(k);
        decrypt = (mode != 0);
        outw.delete();
        t0 = cyc;
        for (int w = 0; w < 4; w++) send(word_of(n, w), BDI_NPUB, 4, w == 3);
        while (dut.state != dut.S_AD_LOAD) begin @(posedge clk); #1; end
        t_init = cyc - t0;
        send_seg(ad, BDI_AD);
        while (dut.state != dut.S_MSG_LOAD) begin @(posedge clk); #1; end
        t0 = cyc;
        data = (mode == 0) ? pt : ct;
        send_seg(data, BDI_MSG);
        t_msg = cyc - t0;
        for (int w = 0; w < (ml + 3) / 4; w++) begin
          automatic logic [31:0] exp_w = word_of((mode == 0) ? ct : pt, w);
          automatic logic [31:0] mask = '0;
          for (int b = 0; b < 4; b++) if (4 * w + b < ml) mask[31-8*b -: 8] = 8'hff;
          check(w < outw.size() && ((outw[w] & mask) == exp_w),
                $sformatf("case %0d mode %0d word %0d got %h exp %h", tcase, mode, w,
                          (w < outw.size()) ? outw[w] & mask : 32'h0, exp_w));
        end
        check(outw.size() == (ml + 3) / 4, "number of output words");
        if (mode == 0) begin
          tag_ready = 1'b1;
          do @(negedge clk); while (!tag_valid);
          check(tag == vec128(tg), $sformatf("tag got %h exp %h", tag, vec128(tg)));
          @(posedge clk); #1;
          tag_ready = 1'b0;
        end else begin
          for (int w = 0; w < 4; w++) send(tv[127-32*w -: 32], BDI_TAG, 4, w == 3);
          auth_ready = 1'b1;
          do @(negedge clk); while (!auth_valid);
          check(auth_ok == (mode == 1), $sformatf("auth_ok=%0b mode %0d", auth_ok, mode));
          @(posedge clk); #1;
          auth_ready = 1'b0;
        end
        @(negedge clk);
        check(idle, "core idle after operation");
        if (tcase == 0 && mode == 0) begin
          // 1792 init steps plus one take cycle per nonce word and the start cycle
          check(t_init >= 1792 && t_init <= 1800, $sformatf("init cycles %0d", t_init));
          check(real'(t_msg) / ml <= 10.475, $sformatf("message cycles %0d for %0d bytes", t_msg, ml));
          $display("init %0d cycles, message %0d cycles for %0d bytes", t_init, t_msg, ml);
        end
      end
    end
    // published known answer: all-zero key and nonce, no AD, no message
    key = '0;
    decrypt = 1'b0;
    outw.delete();
    for (int w = 0; w < 4; w++) send('0, BDI_NPUB, 4, w == 3);
    send('0, BDI_AD, 0, 1'b1);
    send('0, BDI_MSG, 0, 1'b1);
    tag_ready = 1'b1;
    do @(negedge clk); while (!tag_valid);
    check(tag == 128'h835e5317896e86b2447143c74f6ffc1e, $sformatf("known-answer tag %h", tag));
    check(outw.size() == 0, "no message word for an empty message");
    @(posedge clk); #1;
    tag_ready = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
