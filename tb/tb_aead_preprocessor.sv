// tb_aead_preprocessor: self-checking test of the AEAD preprocessor.
//
// A list of instructions (key activation, encryptions and decryptions with
// segments of 0..13 bytes) is fed on PDI and SDI with random gaps, while the
// core side and the CMD FIFO side accept with random back-pressure. Every
// block handed to the core is compared with the expected one (data with
// the bytes past the segment end cleared although the input word carries
// junk there, type, size, end-of-segment mark, decrypt flag, and the key
// assembled from SDI), and every CMD FIFO entry with the instruction or
// message header it should carry.
module tb_aead_preprocessor;
  import aead_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0]     pdi_data, sdi_data, bdi;
  logic             pdi_valid, pdi_ready, sdi_valid, sdi_ready;
  logic [KEY_W-1:0] key;
  logic             decrypt, bdi_valid, bdi_ready, bdi_eot, cmd_valid, cmd_ready, idle;
  bdi_type_e        bdi_type;
  logic [2:0]       bdi_size;
  cmd_t             cmd_data;

  aead_preprocessor dut (.*);

  typedef struct { logic [31:0] d; bdi_type_e t; int sz; bit eot; bit dec; logic [127:0] k; } beat_t;
  logic [31:0] pdi_q[$], sdi_q[$];
  beat_t       exp_b[$];
  cmd_t        exp_c[$];
  int checks = 0, failures = 0, n_empty = 0, n_partial = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one segment: header on PDI, words with junk past the end, expected blocks
  task automatic add_seg(logic [3:0] ht, int len, bdi_type_e bt, bit dec, logic [127:0] k);
    pdi_q.push_back(hdr_word(ht, 16'(len)));
    if (ht == HDR_PT || ht == HDR_CT) exp_c.push_back('{code: ht, flags: 4'h0, len: 16'(len)});
    if (len == 0) begin
      exp_b.push_back('{d: '0, t: bt, sz: 0, eot: 1'b1, dec: dec, k: k});
      n_empty++;
    end
    for (int w = 0; 4 * w < len; w++) begin
      logic [31:0] raw = $urandom, clean = '0;
      int sz = (len - 4 * w >= 4) ? 4 : len - 4 * w;
      for (int b = 0; b < sz; b++) clean[31-8*b -: 8] = raw[31-8*b -: 8];
      if (sz < 4) n_partial++;
      pdi_q.push_back(raw);
      exp_b.push_back('{d: clean, t: bt, sz: sz, eot: (4 * w + 4 >= len), dec: dec, k: k});
    end
  endtask

  initial begin
    logic [127:0] k = '0;
    pdi_valid = 1'b0; sdi_valid = 1'b0; bdi_ready = 1'b0; cmd_ready = 1'b0;
    pdi_data = '0; sdi_data = '0;
    for (int op = 0; op < 12; op++) begin
      if (op % 4 == 0) begin
        k = {$urandom, $urandom, $urandom, $urandom};
        pdi_q.push_back({OP_ACTKEY, 28'h0});
        sdi_q.push_back({OP_LDKEY, 28'h0});
        sdi_q.push_back(hdr_word(HDR_KEY, 16'd16));
        for (int w = 0; w < 4; w++) sdi_q.push_back(k[127-32*w -: 32]);
      end else begin
        automatic bit dec = op[0];
        pdi_q.push_back({dec ? OP_DEC : OP_ENC, 28'h0});
        exp_c.push_back('{code: dec ? OP_DEC : OP_ENC, flags: 4'h0, len: 16'h0});
        add_seg(HDR_NPUB, 16, BDI_NPUB, dec, k);
        add_seg(HDR_AD, (op == 1) ? 0 : $urandom_range(13), BDI_AD, dec, k);
        add_seg(dec ? HDR_CT : HDR_PT, (op == 2) ? 0 : (op == 3) ? 7 : $urandom_range(13), BDI_MSG, dec, k);
        if (dec) add_seg(HDR_TAG, 16, BDI_TAG, dec, k);
      end
    end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    while (exp_b.size() > 0 || exp_c.size() > 0 || pdi_q.size() > 0) begin
      bit px, sx;
      pdi_valid = (pdi_q.size() > 0) && (pdi_valid || $urandom_range(3) != 0);
      pdi_data  = (pdi_q.size() > 0) ? pdi_q[0] : '0;
      sdi_valid = (sdi_q.size() > 0) && $urandom_range(3) != 0;
      sdi_data  = (sdi_q.size() > 0) ? sdi_q[0] : '0;
      bdi_ready = $urandom_range(2) != 0;
      cmd_ready = $urandom_range(2) != 0;
      @(negedge clk);
      px = pdi_valid && pdi_ready;
      sx = sdi_valid && sdi_ready;
      if (bdi_valid && bdi_ready) begin
        if (exp_b.size() == 0) check(1'b0, "unexpected block");
        else begin
          automatic beat_t e = exp_b.pop_front();
          check(bdi == e.d && bdi_type == e.t && int'(bdi_size) == e.sz && bdi_eot == e.eot,
                $sformatf("block %h %s %0d %0b, expected %h %s %0d %0b", bdi, bdi_type.name(),
                          bdi_size, bdi_eot, e.d, e.t.name(), e.sz, e.eot));
          check(decrypt == e.dec, "decrypt flag");
          check(key == e.k, $sformatf("key %h exp %h", key, e.k));
        end
      end
      if (cmd_valid && cmd_ready) begin
        if (exp_c.size() == 0) check(1'b0, "unexpected CMD entry");
        else begin
          automatic cmd_t c = exp_c.pop_front();
          check(cmd_data == c, $sformatf("cmd %h exp %h", cmd_data, c));
        end
      end
      @(posedge clk); #1;
      if (px) void'(pdi_q.pop_front());
      if (sx) void'(sdi_q.pop_front());
    end
    pdi_valid = 1'b0;
    @(negedge clk);
    check(idle, "idle at the end");
    check(n_empty > 0 && n_partial > 0, "empty and partial segments exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
