// tb_dpr_system: end-to-end test of the energy-adaptive security module at
// its default parameters.
//
// The testbench plays the processing system (AXI4-Lite master) and the
// partial reconfiguration controller (answers each trigger after a delay).
// Scenario:
//   1. after reset no budget is set: no module fits, ACORN stays loaded;
//   2. budget 1.9 mW: ACORN fits; a key is activated and encryptions and
//      decryptions (good and corrupted tag, empty and partial messages) run
//      through the AXI registers, the output read back word by word;
//   3. budgets of 2.3, 4, 12 and 6 mW: the controller reconfigures the
//      partition for JAMBU, CLOC, Pi-Cipher and MORUS in turn (each time the
//      module with the highest power within the budget);
//   4. budget back to 1.9 mW: reconfiguration to ACORN; a PDI word written
//      during it must wait until the partition is released; then more
//      operations, which must still decrypt and encrypt correctly with the
//      key loaded after the reconfiguration.
// Every DO word is compared with the ACORN software model. Each mechanism
// (no-fit, reconfiguration, held write, encryption, accepted and rejected
// decryption, empty message, partial word) is counted and must occur.
module tb_dpr_system;
  import aead_pkg::*;
  import acorn_ref_pkg::*;
  import aead_stream_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [4:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic        prc_trigger, prc_done;
  logic [2:0]  prc_rm_id;
  logic [63:0] ila_probe;

  dpr_system dut (.*);

  int checks = 0, failures = 0;
  int n_nofit = 0, n_reconf = 0, n_held = 0, n_enc = 0, n_dec_ok = 0, n_dec_bad = 0;
  int n_empty = 0, n_partial = 0;
  logic [2:0] last_rm_req;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "axil_master_tasks.svh"

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("at timeout: write state %s aw %b b %b br %b", dut.u_regs.wstate.name(), s_axil_awvalid, s_axil_bvalid, s_axil_bready);
    $display("at timeout: pre %s core %s post %s nreconf %0d", dut.u_aead.u_pre.state.name(), dut.u_aead.u_core.state.name(), dut.u_aead.u_post.state.name(), n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // partial reconfiguration controller model
  initial begin
    prc_done = 1'b0;
    forever begin
      @(negedge clk);
      if (prc_trigger) begin
        last_rm_req = prc_rm_id;
        repeat (200) @(posedge clk);
        #1 prc_done = 1'b1;
        @(posedge clk); #1;
        prc_done = 1'b0;
        n_reconf++;
      end
    end
  end

  // run a list of PDI/SDI words while draining DO against the expected words
  task automatic run_stream(words_t pdi, words_t sdi, words_t exp_do);
    fork
      begin
        // the stream starts with a key activation; its key words go to SDI
        // right after it
        axil_write(5'h00, pdi.pop_front());
        while (sdi.size() > 0) axil_write(5'h04, sdi.pop_front());
        while (pdi.size() > 0) axil_write(5'h00, pdi.pop_front());
      end
      begin
        while (exp_do.size() > 0) begin
          logic [31:0] st, d;
          axil_read(5'h0c, st);
          if (st[0]) begin
            automatic logic [31:0] e = exp_do.pop_front();
            axil_read(5'h08, d);
            check(d == e, $sformatf("DO %h exp %h", d, e));
          end
        end
      end
    join
  endtask

  task automatic set_budget(int uw, int exp_rm);
    logic [31:0] r;
    axil_write(5'h10, 32'(uw));
    repeat (5) @(posedge clk);
    #1;
    do axil_read(5'h0c, r); while (r[1]);     // wait while reconfiguring
    axil_read(5'h14, r);
    check(r[2:0] == 3'(exp_rm), $sformatf("loaded module %0d exp %0d for %0d uW", r[2:0], exp_rm, uw));
    check(ila_probe[40:38] == 3'(exp_rm) && ila_probe[57:42] == 16'(uw), "ILA probe shows module and budget");
  endtask

  task automatic run_ops(bytes_t k, int nops);
    words_t pdi, sdi, exp_do;
    int lens[] = '{0, 3, 4, 9};
    key_op(k, pdi, sdi);
    for (int i = 0; i < nops; i++) begin
      automatic bytes_t n = rand_bytes(16);
      automatic bytes_t ad = rand_bytes(lens[i % 4]);
      automatic bytes_t pt = rand_bytes(lens[(i + 1) % 4]);
      automatic bit dec = (i % 3 != 0), bad = (i % 3 == 2);
      aead_op(k, n, ad, pt, dec, bad, pdi, exp_do);
      if (!dec) n_enc++; else if (bad) n_dec_bad++; else n_dec_ok++;
      if (pt.size() == 0) n_empty++;
      if (pt.size() % 4 != 0) n_partial++;
    end
    run_stream(pdi, sdi, exp_do);
  endtask

  initial begin
    logic [31:0] r;
    bytes_t k;
    s_axil_awaddr = '0; s_axil_araddr = '0; s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    s_axil_wdata = '0; s_axil_wstrb = '0; s_axil_bready = 1'b0; s_axil_arvalid = 1'b0;
    s_axil_rready = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // 1. no budget
    axil_read(5'h0c, r);
    check(r[2] && r[3], "no module fits at budget 0, AEAD idle");
    if (r[2]) n_nofit++;
    axil_read(5'h14, r);
    check(r[2:0] == 3'(RM_ACORN), "ACORN loaded after reset");

    // 2. ACORN budget and traffic
    set_budget(1900, RM_ACORN);
    check(n_reconf == 0, "no reconfiguration needed for ACORN");
    k = rand_bytes(16);
    run_ops(k, 6);

    // 3. hop through the other modules as the budget rises, ending on MORUS
    set_budget(2300, RM_JAMBU);
    check(n_reconf == 1 && last_rm_req == 3'(RM_JAMBU), "reconfiguration requested for JAMBU");
    set_budget(4000, RM_CLOC);
    check(n_reconf == 2 && last_rm_req == 3'(RM_CLOC), "reconfiguration requested for CLOC");
    set_budget(12000, RM_PI);
    check(n_reconf == 3 && last_rm_req == 3'(RM_PI), "reconfiguration requested for Pi-Cipher");
    set_budget(6000, RM_MORUS);
    check(n_reconf == 4 && last_rm_req == 3'(RM_MORUS), "reconfiguration requested for MORUS");

    // 4. back to ACORN; a PDI write during the reconfiguration is held
    fork
      axil_write(5'h10, 32'd1900);
      begin
        wait (ila_probe[37]);
        @(posedge clk); #1;
      end
    join
    begin
      longint t0 = 0;
      fork
        begin
          @(posedge clk); #1;
          t0 = $time;
          axil_write(5'h00, {OP_ACTKEY, 28'h0});
        end
      join
      check(!ila_probe[37], "held PDI write completes only after reconfiguration");
      if ($time - t0 > 100) n_held++;
      // the ACTKEY just written needs its key on SDI
      k = rand_bytes(16);
      begin
        words_t p, s;
        key_op(k, p, s);
        for (int i = 0; i < 6; i++) axil_write(5'h04, s[i]);
      end
    end
    axil_read(5'h14, r);
    check(r[2:0] == 3'(RM_ACORN) && n_reconf == 5, "ACORN reloaded");
    run_ops(k, 6);

    check(n_nofit > 0, "mechanism: no module fits");
    check(n_reconf == 5, "mechanism: reconfiguration to every module");
    check(n_held > 0, "mechanism: write held during reconfiguration");
    check(n_enc > 0 && n_dec_ok > 0 && n_dec_bad > 0, "mechanism: encrypt, decrypt pass and fail");
    check(n_empty > 0 && n_partial > 0, "mechanism: empty message and partial word");
    $display("reconfigurations %0d, held writes %0d, enc %0d, dec ok %0d, dec rejected %0d",
             n_reconf, n_held, n_enc, n_dec_ok, n_dec_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
