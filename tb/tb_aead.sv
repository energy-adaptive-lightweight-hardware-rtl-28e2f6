// tb_aead: end-to-end test of the AEAD unit (preprocessor, CMD FIFO, ACORN
// core, postprocessor).
//
// Instruction streams are built with aead_stream_pkg: key activations,
// encryptions, decryptions with the right tag and with a corrupted tag, with
// associated data and messages of 0..13 bytes and junk past the end of
// partial words. PDI and SDI are offered with random gaps and DO is read
// with random back-pressure; every DO word is compared with the stream the
// software model predicts. Two instructions are queued back to back so the
// next one is read while the previous one is still being answered.
module tb_aead;
  import aead_pkg::*;
  import acorn_ref_pkg::*;
  import aead_stream_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] pdi_data, sdi_data, do_data;
  logic         pdi_valid, pdi_ready, sdi_valid, sdi_ready, do_valid, do_ready, idle;

  aead dut (.*);

  words_t pdi_q, sdi_q, exp_q;
  int checks = 0, failures = 0, n_dec_fail = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t k, n, ad, pt;
    int lens[] = '{0, 1, 4, 6, 13};
    pdi_valid = 1'b0; sdi_valid = 1'b0; do_ready = 1'b0; pdi_data = '0; sdi_data = '0;
    for (int op = 0; op < 12; op++) begin
      if (op % 4 == 0) begin
        k = rand_bytes(16);
        key_op(k, pdi_q, sdi_q);
      end
      n  = rand_bytes(16);
      ad = rand_bytes(lens[$urandom_range(4)]);
      pt = rand_bytes((op == 1) ? 0 : lens[$urandom_range(4)]);
      aead_op(k, n, ad, pt, op % 3 != 0, op % 3 == 2, pdi_q, exp_q);
      if (op % 3 == 2) n_dec_fail++;
    end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    while (exp_q.size() > 0) begin
      bit px, sx;
      pdi_valid = (pdi_q.size() > 0) && (pdi_valid || $urandom_range(3) != 0);
      pdi_data  = (pdi_q.size() > 0) ? pdi_q[0] : '0;
      sdi_valid = (sdi_q.size() > 0) && $urandom_range(3) != 0;
      sdi_data  = (sdi_q.size() > 0) ? sdi_q[0] : '0;
      do_ready  = $urandom_range(2) != 0;
      @(negedge clk);
      px = pdi_valid && pdi_ready;
      sx = sdi_valid && sdi_ready;
      if (do_valid && do_ready) begin
        automatic logic [31:0] e = exp_q.pop_front();
        check(do_data == e, $sformatf("DO %h exp %h (%0d words left)", do_data, e, exp_q.size()));
      end
      @(posedge clk); #1;
      if (px) void'(pdi_q.pop_front());
      if (sx) void'(sdi_q.pop_front());
    end
    pdi_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(idle && !do_valid && pdi_q.size() == 0, "idle with all input consumed");
    check(n_dec_fail > 0, "failed tag check exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
