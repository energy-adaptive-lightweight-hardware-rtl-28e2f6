// tb_aead_latency: long-message run of the AEAD to measure the ACORN
// module's rate.
//
// One key activation and one encryption of a 1024-byte message with 16 bytes
// of associated data, with all streams always ready. The output is compared
// with the software model. The cycles between the first and the last
// ciphertext word give the steady rate, which must not exceed 10.475 cycles
// per byte (the latency reported for the ACORN module); the cycles of the
// whole instruction, start-up included, are printed as well.
module tb_aead_latency;
  import aead_pkg::*;
  import acorn_ref_pkg::*;
  import aead_stream_pkg::*;

  localparam int MSG_BYTES = 1024;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] pdi_data, sdi_data, do_data;
  logic         pdi_valid, pdi_ready, sdi_valid, sdi_ready, do_valid, do_ready, idle;

  aead dut (.*);

  words_t pdi_q, sdi_q, exp_q;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t k = rand_bytes(16), n = rand_bytes(16), ad = rand_bytes(16), pt = rand_bytes(MSG_BYTES);
    longint cyc = 0, t_first = -1, t_last = 0, t_start = 0, t_end = 0;
    int nword = 0;
    key_op(k, pdi_q, sdi_q);
    aead_op(k, n, ad, pt, 1'b0, 1'b0, pdi_q, exp_q);
    pdi_valid = 1'b0; sdi_valid = 1'b0; do_ready = 1'b1; pdi_data = '0; sdi_data = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    while (exp_q.size() > 0) begin
      bit px, sx;
      pdi_valid = pdi_q.size() > 0;
      pdi_data  = (pdi_q.size() > 0) ? pdi_q[0] : '0;
      sdi_valid = sdi_q.size() > 0;
      sdi_data  = (sdi_q.size() > 0) ? sdi_q[0] : '0;
      @(negedge clk);
      px = pdi_valid && pdi_ready;
      sx = sdi_valid && sdi_ready;
      if (px && pdi_data[31:28] == OP_ENC && t_start == 0) t_start = cyc;
      if (do_valid) begin
        automatic logic [31:0] e = exp_q.pop_front();
        check(do_data == e, $sformatf("DO %h exp %h", do_data, e));
        // words 1..MSG_BYTES/4 of the answer are ciphertext
        if (nword == 1) t_first = cyc;
        if (nword == MSG_BYTES / 4) t_last = cyc;
        nword++;
        if (exp_q.size() == 0) t_end = cyc;
      end
      @(posedge clk); #1;
      cyc++;
      if (px) void'(pdi_q.pop_front());
      if (sx) void'(sdi_q.pop_front());
    end
    begin
      automatic real steady = real'(t_last - t_first) / real'(MSG_BYTES - 4);
      automatic real total  = real'(t_end - t_start) / real'(MSG_BYTES);
      $display("steady rate %.3f cycles/byte, whole instruction %0d cycles (%.3f cycles/byte)",
               steady, t_end - t_start, total);
      check(steady <= 10.475, "steady rate within 10.475 cycles per byte");
      check(steady >= 8.0, "one state step per cycle at most");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
