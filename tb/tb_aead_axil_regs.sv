// tb_aead_axil_regs: self-checking test of the AXI4-Lite front end.
//
// The AEAD streams are replaced by queues: PDI and SDI sinks that accept
// with random delay, and a DO source. The test writes PDI and SDI words and
// checks each arrives once, in order, and that the write response comes only
// after the word was taken; checks that nothing is offered while hold is
// high; reads DO words in order (and 0 when none is waiting); and checks the
// status, budget (with byte strobes) and module registers.
module tb_aead_axil_regs;
  import aead_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [4:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic [W-1:0] pdi_data, sdi_data, do_data;
  logic        pdi_valid, pdi_ready, sdi_valid, sdi_ready, do_valid, do_ready;
  logic [15:0] budget_uw;
  logic        hold, aead_idle, no_fit;
  rm_e         loaded_rm;

  aead_axil_regs #(.ADDR_W(5)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] pdi_got[$], sdi_got[$], do_q[$];
  bit hold_violation = 1'b0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "axil_master_tasks.svh"

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream models
  always @(negedge clk) begin
    if (pdi_valid && pdi_ready) pdi_got.push_back(pdi_data);
    if (sdi_valid && sdi_ready) sdi_got.push_back(sdi_data);
    if (hold && (pdi_valid || sdi_valid)) hold_violation = 1'b1;
  end
  always @(posedge clk) begin
    #1;
    pdi_ready = $urandom_range(3) == 0;
    sdi_ready = $urandom_range(3) == 0;
  end
  always @(negedge clk) if (do_valid && do_ready) begin
    @(posedge clk); #1;
    void'(do_q.pop_front());
  end
  always_comb begin
    do_valid = do_q.size() > 0;
    do_data  = (do_q.size() > 0) ? do_q[0] : '0;
  end

  initial begin
    logic [31:0] r, sent_p[$], sent_s[$];
    s_axil_awaddr = '0; s_axil_araddr = '0; s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    s_axil_wdata = '0; s_axil_wstrb = '0; s_axil_bready = 1'b0; s_axil_arvalid = 1'b0;
    s_axil_rready = 1'b0; hold = 1'b0; aead_idle = 1'b1; no_fit = 1'b0; loaded_rm = RM_MORUS;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    for (int i = 0; i < 20; i++) begin
      automatic logic [31:0] v = $urandom;
      if (i % 3 == 0) begin
        axil_write(5'h04, v);
        sent_s.push_back(v);
      end else begin
        axil_write(5'h00, v);
        sent_p.push_back(v);
      end
      // the response came back, so the word must already have been taken
      check(pdi_got.size() == sent_p.size() && sdi_got.size() == sent_s.size(),
            "write answered only after the word was taken");
    end
    check(pdi_got == sent_p, "PDI words in order");
    check(sdi_got == sent_s, "SDI words in order");

    // hold: a PDI write must wait
    hold = 1'b1;
    fork
      axil_write(5'h00, 32'hcafe_f00d);
      begin
        repeat (20) @(negedge clk);
        check(pdi_got.size() == sent_p.size(), "no word taken while held");
        @(posedge clk); #1;
        hold = 1'b0;
      end
    join
    sent_p.push_back(32'hcafe_f00d);
    check(pdi_got == sent_p && !hold_violation, "held word delivered after release");

    // DO reads
    do_q = '{32'h1111_0001, 32'h2222_0002, 32'h3333_0003};
    axil_read(5'h0c, r);
    check(r[0] == 1'b1, "status do_valid");
    for (int i = 1; i <= 3; i++) begin
      axil_read(5'h08, r);
      check(r == {16'(i * 32'h1111), 16'(i)}, $sformatf("DO read %h", r));
    end
    axil_read(5'h08, r);
    check(r == 32'h0, "DO read when empty gives 0");
    axil_read(5'h0c, r);
    check(r[0] == 1'b0, "status do_valid clear");

    // budget register with strobes, status and module registers
    axil_write(5'h10, 32'h0000_1234);
    check(budget_uw == 16'h1234, "budget written");
    axil_write(5'h10, 32'h0000_ab99, 4'b0010);
    check(budget_uw == 16'hab34, "budget upper byte only");
    axil_read(5'h10, r);
    check(r == 32'h0000_ab34, "budget read back");
    hold = 1'b1; no_fit = 1'b1; aead_idle = 1'b0;
    axil_read(5'h0c, r);
    check(r[3:1] == 3'b011, $sformatf("status bits %b", r[3:0]));
    hold = 1'b0;
    axil_read(5'h14, r);
    check(r == 32'(RM_MORUS), "module register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
