// cmd_fifo: first-word-fall-through FIFO between the AEAD preprocessor and
// postprocessor.
//
// The preprocessor pushes each instruction and each segment header that must
// reappear on the output; the postprocessor reads them to know what output to
// build. The size, 4 entries of 24 bits, and the first-word-fall-through
// behaviour follow the original design; the entry format (aead_pkg::cmd_t) is this
// design's own.
//
// Interface: push with wr_en when !full; the head entry is visible on rd_data
// whenever !empty (no read latency) and rd_en removes it. A push and a pop in
// the same cycle are both accepted when the FIFO is neither full nor empty.
// Circular buffer with read/write pointers one bit wider than the index.
module cmd_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign empty   = (wp == rp);
  assign full    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  // no push into a full FIFO, no pop from an empty one
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
