// aead_pkg: shared word formats and types of the energy-adaptive AEAD.
//
// The AEAD talks to the outside over two 32-bit input streams (PDI for public
// data, SDI for the secret key) and one 32-bit output stream (DO). Every
// stream carries instruction words, segment headers and data words. The
// encodings below are this design's own choice, modelled on the usual
// hardware API for authenticated ciphers:
//   instruction : [31:28] opcode, rest zero
//   header      : [31:28] segment type, [27:24] flags (unused, zero),
//                 [23:16] zero, [15:0] segment length in bytes
//   status      : [31:28] STAT_SUCCESS or STAT_FAILURE, rest zero
// The command FIFO holds 24 bits of such a word, bits 23:16 dropped:
// {opcode/type[3:0], flags[3:0], length[15:0]}.
package aead_pkg;

  localparam int unsigned W      = 32;   // stream width
  localparam int unsigned KEY_W  = 128;
  localparam int unsigned NPUB_W = 128;
  localparam int unsigned TAG_W  = 128;
  localparam int unsigned CMD_W  = 24;

  // opcodes
  localparam logic [3:0] OP_ENC    = 4'h2;
  localparam logic [3:0] OP_DEC    = 4'h3;
  localparam logic [3:0] OP_LDKEY  = 4'h4;
  localparam logic [3:0] OP_ACTKEY = 4'h7;

  // segment types
  localparam logic [3:0] HDR_AD   = 4'h1;
  localparam logic [3:0] HDR_PT   = 4'h4;
  localparam logic [3:0] HDR_CT   = 4'h5;
  localparam logic [3:0] HDR_TAG  = 4'h8;
  localparam logic [3:0] HDR_KEY  = 4'hC;
  localparam logic [3:0] HDR_NPUB = 4'hD;

  localparam logic [3:0] STAT_SUCCESS = 4'hE;
  localparam logic [3:0] STAT_FAILURE = 4'hF;

  // kind of block handed from preprocessor to cipher core
  typedef enum logic [1:0] {
    BDI_NPUB = 2'd0,
    BDI_AD   = 2'd1,
    BDI_MSG  = 2'd2,
    BDI_TAG  = 2'd3
  } bdi_type_e;

  // command FIFO entry
  typedef struct packed {
    logic [3:0]  code;   // opcode or segment type
    logic [3:0]  flags;
    logic [15:0] len;    // bytes
  } cmd_t;

  // reconfigurable modules of the AEAD partition, in the order of the tables
  typedef enum logic [2:0] {
    RM_ACORN = 3'd0,
    RM_PI    = 3'd1,
    RM_JAMBU = 3'd2,
    RM_MORUS = 3'd3,
    RM_CLOC  = 3'd4
  } rm_e;
  localparam int unsigned NUM_RM = 5;

  function automatic logic [W-1:0] hdr_word(logic [3:0] t, logic [15:0] len);
    return {t, 4'h0, 8'h00, len};
  endfunction

endpackage
