// tb_dpr_ctrl: self-checking test of the power-adaptive DPR controller.
//
// Power budgets around every module's power (1830, 2243, 3660, 5660 and
// 10080 microwatt) and below the cheapest are applied. For each the expected
// module is worked out here from the measured powers; a small model of the
// reconfiguration controller answers each trigger after a random delay. The
// test checks the module requested and then loaded, the single-cycle trigger,
// that the partition is held in reset for the whole reconfiguration, that no
// reconfiguration starts while the AEAD is busy, and the no_fit flag.
module tb_dpr_ctrl;
  import aead_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [15:0] budget_uw;
  logic        aead_idle, prc_trigger, prc_done, rp_rst_n, reconfiguring, no_fit;
  rm_e         prc_rm_id, loaded_rm;

  dpr_ctrl dut (.*);

  int checks = 0, failures = 0, n_reconf = 0, n_busy_wait = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected choice: modules in increasing power, take the last that fits
  function automatic int expect_rm(int b);
    int pw[5] = '{1830, 2243, 3660, 5660, 10080};
    int id[5] = '{0, 2, 4, 3, 1};     // ACORN, JAMBU, CLOC, MORUS, Pi-Cipher
    int r = -1;
    for (int i = 0; i < 5; i++) if (b >= pw[i]) r = id[i];
    return r;
  endfunction

  // reconfiguration controller model
  initial begin
    prc_done = 1'b0;
    forever begin
      @(negedge clk);
      if (prc_trigger) begin
        check(!rp_rst_n && reconfiguring, "partition in reset at trigger");
        @(posedge clk); #1;
        check(!prc_trigger, "trigger lasts one cycle");
        repeat ($urandom_range(20, 5)) begin
          @(negedge clk);
          check(!rp_rst_n, "partition held in reset while loading");
        end
        @(posedge clk); #1;
        prc_done = 1'b1;
        @(posedge clk); #1;
        prc_done = 1'b0;
        n_reconf++;
      end
    end
  end

  initial begin
    int budgets[] = '{0, 1829, 1830, 2242, 2243, 3000, 3660, 5659, 5660, 10079, 10080, 65535, 100, 4000};
    budget_uw = '0; aead_idle = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(loaded_rm == RM_ACORN, "ACORN loaded after reset");
    foreach (budgets[i]) begin
      automatic int e = expect_rm(budgets[i]);
      automatic rm_e prev_rm = loaded_rm;
      budget_uw = 16'(budgets[i]);
      if (i == 5) begin
        // AEAD busy: no reconfiguration may start
        aead_idle = 1'b0;
        repeat (30) begin
          @(negedge clk);
          check(!prc_trigger && !reconfiguring, "no reconfiguration while AEAD busy");
        end
        n_busy_wait++;
        @(posedge clk); #1;
        aead_idle = 1'b1;
      end
      @(negedge clk);
      check(no_fit == (e < 0), $sformatf("no_fit=%0b for budget %0d", no_fit, budgets[i]));
      if (e >= 0 && e != int'(prev_rm)) begin
        while (!prc_trigger) @(negedge clk);
        check(int'(prc_rm_id) == e, $sformatf("requested %0d exp %0d for budget %0d", prc_rm_id, e, budgets[i]));
      end
      repeat (40) @(negedge clk);
      check(!reconfiguring && rp_rst_n, "reconfiguration finished");
      check(int'(loaded_rm) == ((e < 0) ? int'(prev_rm) : e),
            $sformatf("loaded %0d for budget %0d, expected %0d", loaded_rm, budgets[i], e));
      @(posedge clk); #1;
    end
    check(n_reconf >= 5 && n_busy_wait > 0, "reconfigurations exercised");
    $display("reconfigurations: %0d", n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
