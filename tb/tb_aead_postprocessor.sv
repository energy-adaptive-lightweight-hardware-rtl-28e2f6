// tb_aead_postprocessor: self-checking test of the AEAD postprocessor.
//
// Encryptions and decryptions with messages of 0..13 bytes are described by
// CMD FIFO entries (served from a queue with first-word-fall-through
// behaviour), message words from the "core" carrying junk past the message
// end, tags and tag-check results, all offered with random gaps, while DO is
// read with random back-pressure. Every DO word is compared with the
// expected stream: output header, message words with the junk cleared, TAG
// header and the four tag words in order (encryption), and the status word.
module tb_aead_postprocessor;
  import aead_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  cmd_t             cmd_data;
  logic             cmd_empty, cmd_rd;
  logic [W-1:0]     bdo, do_data;
  logic             bdo_valid, bdo_ready;
  logic [TAG_W-1:0] tag;
  logic             tag_valid, tag_ready, auth_valid, auth_ok, auth_ready;
  logic             do_valid, do_ready, idle;

  aead_postprocessor dut (.*);

  cmd_t         cmd_q[$];
  logic [31:0]  bdo_q[$], exp_q[$];
  logic [127:0] tag_q[$];
  bit           auth_q[$];
  int checks = 0, failures = 0, n_fail_stat = 0;

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

  initial begin
    cmd_empty = 1'b1; cmd_data = '0; bdo_valid = 1'b0; bdo = '0; tag_valid = 1'b0; tag = '0;
    auth_valid = 1'b0; auth_ok = 1'b0; do_ready = 1'b0;
    for (int op = 0; op < 16; op++) begin
      automatic bit dec = op[0];
      automatic int len = (op < 2) ? 0 : (op < 4) ? 6 : $urandom_range(13);
      cmd_q.push_back('{code: dec ? OP_DEC : OP_ENC, flags: 4'h0, len: 16'h0});
      cmd_q.push_back('{code: dec ? HDR_CT : HDR_PT, flags: 4'h0, len: 16'(len)});
      exp_q.push_back(hdr_word(dec ? HDR_PT : HDR_CT, 16'(len)));
      for (int w = 0; 4 * w < len; w++) begin
        automatic logic [31:0] raw = $urandom, clean = '0;
        for (int b = 0; b < 4; b++) if (4 * w + b < len) clean[31-8*b -: 8] = raw[31-8*b -: 8];
        bdo_q.push_back(raw);
        exp_q.push_back(clean);
      end
      if (!dec) begin
        automatic logic [127:0] t = {$urandom, $urandom, $urandom, $urandom};
        tag_q.push_back(t);
        exp_q.push_back(hdr_word(HDR_TAG, 16'd16));
        for (int w = 0; w < 4; w++) exp_q.push_back(t[127-32*w -: 32]);
        exp_q.push_back({STAT_SUCCESS, 28'h0});
      end else begin
        automatic bit ok = (op % 4 == 1);
        auth_q.push_back(ok);
        exp_q.push_back({ok ? STAT_SUCCESS : STAT_FAILURE, 28'h0});
        if (!ok) n_fail_stat++;
      end
    end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    while (exp_q.size() > 0) begin
      bit cx, bx, tx, ax;
      cmd_empty  = (cmd_q.size() == 0);
      cmd_data   = (cmd_q.size() > 0) ? cmd_q[0] : '0;
      bdo_valid  = (bdo_q.size() > 0) && $urandom_range(3) != 0;
      bdo        = (bdo_q.size() > 0) ? bdo_q[0] : '0;
      tag_valid  = (tag_q.size() > 0) && $urandom_range(3) != 0;
      tag        = (tag_q.size() > 0) ? tag_q[0] : '0;
      auth_valid = (auth_q.size() > 0) && $urandom_range(3) != 0;
      auth_ok    = (auth_q.size() > 0) ? auth_q[0] : 1'b0;
      do_ready   = $urandom_range(2) != 0;
      @(negedge clk);
      cx = cmd_rd && !cmd_empty;
      bx = bdo_valid && bdo_ready;
      tx = tag_valid && tag_ready;
      ax = auth_valid && auth_ready;
      if (do_valid && do_ready) begin
        automatic logic [31:0] e = exp_q.pop_front();
        check(do_data == e, $sformatf("DO %h exp %h", do_data, e));
      end
      @(posedge clk); #1;
      if (cx) void'(cmd_q.pop_front());
      if (bx) void'(bdo_q.pop_front());
      if (tx) void'(tag_q.pop_front());
      if (ax) void'(auth_q.pop_front());
    end
    do_ready = 1'b0;
    repeat (3) @(negedge clk);
    check(idle && !do_valid, "idle at the end");
    check(cmd_q.size() == 0 && bdo_q.size() == 0 && tag_q.size() == 0 && auth_q.size() == 0,
          "all inputs consumed");
    check(n_fail_stat > 0, "failure status exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
