// tb_cmd_fifo: self-checking test of the 4 x 24 first-word-fall-through FIFO.
//
// Random pushes and pops (including both in one cycle and attempts on a full
// or empty FIFO, which must be ignored) are compared with a queue model: the
// head word must be visible whenever the FIFO is not empty, and full must be
// raised exactly at 4 entries.
module tb_cmd_fifo;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic        wr_en, rd_en, full, empty;
  logic [23:0] wr_data, rd_data;

  cmd_fifo #(.DEPTH(4), .WIDTH(24)) dut (.*);

  int checks = 0, failures = 0;
  logic [23:0] model[$];
  int n_full = 0, n_both = 0;

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

  initial begin
    wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      bit push, pop;
      // bias towards filling in the first half and draining in the second
      push    = ($urandom_range(99) < ((i % 200) < 100 ? 70 : 30));
      pop     = ($urandom_range(99) < ((i % 200) < 100 ? 30 : 70));
      wr_data = 24'($urandom);
      wr_en   = push && (model.size() < 4);
      rd_en   = pop && (model.size() > 0);
      @(negedge clk);
      check(empty == (model.size() == 0), $sformatf("empty=%0b size=%0d", empty, model.size()));
      check(full == (model.size() == 4), $sformatf("full=%0b size=%0d", full, model.size()));
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head %h exp %h", rd_data, model[0]));
      if (full) n_full++;
      if (wr_en && rd_en) n_both++;
      @(posedge clk); #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(n_full > 0, "FIFO never became full");
    check(n_both > 0, "never a push and a pop together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
