// aead: the authenticated-encryption unit that fills the reconfigurable
// partition.
//
// As in the original design, it is made of four units: a preprocessor that decodes
// instructions and cuts the input into blocks, a command FIFO (4 x 24 bits,
// first word fall through) that carries the instruction and the message
// header to the output side, the cipher core, and a postprocessor that builds
// the output stream. The cipher core here is ACORN-128, the module the
// original design recommends for the lowest power; the other cipher modules it
// names would take its place in the same wrapper.
//
// Interface: three 32-bit valid/ready streams, PDI (public data and
// instructions), SDI (key) and DO (results), plus idle, high when no
// instruction is in progress in any unit. Formats: see aead_pkg.
module aead
  import aead_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  pdi_data,
  input  logic          pdi_valid,
  output logic          pdi_ready,
  input  logic [W-1:0]  sdi_data,
  input  logic          sdi_valid,
  output logic          sdi_ready,
  output logic [W-1:0]  do_data,
  output logic          do_valid,
  input  logic          do_ready,
  output logic          idle
);
  logic [KEY_W-1:0] key;
  logic             decrypt;
  logic [W-1:0]     bdi, bdo;
  logic             bdi_valid, bdi_ready, bdi_eot;
  bdi_type_e        bdi_type;
  logic [2:0]       bdi_size;
  logic             bdo_valid, bdo_ready;
  logic [TAG_W-1:0] tag;
  logic             tag_valid, tag_ready;
  logic             auth_valid, auth_ok, auth_ready;
  cmd_t             cmd_in, cmd_out;
  logic             cmd_valid, cmd_full, cmd_empty, cmd_rd;
  logic             pre_idle, core_idle, post_idle;

  aead_preprocessor u_pre (
    .clk, .rst_n,
    .pdi_data, .pdi_valid, .pdi_ready,
    .sdi_data, .sdi_valid, .sdi_ready,
    .key, .decrypt,
    .bdi, .bdi_valid, .bdi_ready, .bdi_type, .bdi_size, .bdi_eot,
    .cmd_data(cmd_in), .cmd_valid, .cmd_ready(!cmd_full),
    .idle(pre_idle)
  );

  cmd_fifo #(.DEPTH(4), .WIDTH(CMD_W)) u_cmd (
    .clk, .rst_n,
    .wr_en(cmd_valid), .wr_data(cmd_in), .full(cmd_full),
    .rd_en(cmd_rd), .rd_data(cmd_out), .empty(cmd_empty)
  );

  acorn_core u_core (
    .clk, .rst_n,
    .key, .decrypt,
    .bdi, .bdi_valid, .bdi_ready, .bdi_type, .bdi_size, .bdi_eot,
    .bdo, .bdo_valid, .bdo_ready,
    .tag, .tag_valid, .tag_ready,
    .auth_valid, .auth_ok, .auth_ready,
    .idle(core_idle)
  );

  aead_postprocessor u_post (
    .clk, .rst_n,
    .cmd_data(cmd_out), .cmd_empty, .cmd_rd,
    .bdo, .bdo_valid, .bdo_ready,
    .tag, .tag_valid, .tag_ready,
    .auth_valid, .auth_ok, .auth_ready,
    .do_data, .do_valid, .do_ready,
    .idle(post_idle)
  );

  assign idle = pre_idle && core_idle && post_idle && cmd_empty;

endmodule
