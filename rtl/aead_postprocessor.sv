// aead_postprocessor: back end of the AEAD.
//
// It builds the data output (DO) stream from what the cipher core produces,
// steered by the instruction and message header it reads from the CMD FIFO.
// The three duties the original design gives it are here: clearing the part of an
// output block that does not belong to the message, parallel-in-serial-out
// conversion of the 128-bit tag into 32-bit words, and generating the status
// word. The word formats are this design's own (see aead_pkg).
//
// Output of one instruction:
//   ENC: CT header (length of the plaintext), ciphertext words, TAG header
//        (16 bytes), 4 tag words, success status.
//   DEC: PT header, plaintext words, success or failure status from the
//        core's tag comparison. The plaintext is released before the status.
//
// DO is a valid/ready stream; message words pass through combinationally
// (do_valid follows bdo_valid, bdo_ready follows do_ready).
module aead_postprocessor
  import aead_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // command FIFO (first word fall through)
  input  cmd_t              cmd_data,
  input  logic              cmd_empty,
  output logic              cmd_rd,
  // from the cipher core
  input  logic [W-1:0]      bdo,
  input  logic              bdo_valid,
  output logic              bdo_ready,
  input  logic [TAG_W-1:0]  tag,
  input  logic              tag_valid,
  output logic              tag_ready,
  input  logic              auth_valid,
  input  logic              auth_ok,
  output logic              auth_ready,
  // data output
  output logic [W-1:0]      do_data,
  output logic              do_valid,
  input  logic              do_ready,
  output logic              idle
);
  typedef enum logic [2:0] {
    Q_IDLE, Q_HDR, Q_DATA, Q_TAG_HDR, Q_TAG_LOAD, Q_TAG, Q_AUTH, Q_STATUS
  } qstate_e;

  qstate_e          state;
  logic             enc, ok;
  logic [15:0]      rem;
  logic [1:0]       tcnt;
  logic [TAG_W-1:0] tsr;      // tag shift register

  logic [2:0] nbytes;
  assign nbytes = (rem >= 16'd4) ? 3'd4 : rem[2:0];

  always_comb begin
    do_valid   = 1'b0;
    do_data    = '0;
    cmd_rd     = 1'b0;
    bdo_ready  = 1'b0;
    tag_ready  = 1'b0;
    auth_ready = 1'b0;
    unique case (state)
      Q_IDLE: cmd_rd = !cmd_empty;
      Q_HDR: begin
        do_valid = !cmd_empty;
        do_data  = hdr_word(enc ? HDR_CT : HDR_PT, cmd_data.len);
        cmd_rd   = !cmd_empty && do_ready;
      end
      Q_DATA: begin
        do_valid  = bdo_valid;
        bdo_ready = do_ready;
        for (int b = 0; b < 4; b++)
          if (b < int'(nbytes)) do_data[W-1-8*b -: 8] = bdo[W-1-8*b -: 8];
      end
      Q_TAG_HDR: begin
        do_valid = 1'b1;
        do_data  = hdr_word(HDR_TAG, 16'(TAG_W / 8));
      end
      Q_TAG_LOAD: tag_ready = 1'b1;
      Q_TAG: begin
        do_valid = 1'b1;
        do_data  = tsr[TAG_W-1 -: W];
      end
      Q_AUTH: auth_ready = 1'b1;
      Q_STATUS: begin
        do_valid = 1'b1;
        do_data  = {ok ? STAT_SUCCESS : STAT_FAILURE, 28'h0};
      end
      default: ;
    endcase
  end

  assign idle = (state == Q_IDLE);

  logic do_take;
  assign do_take = do_valid && do_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= Q_IDLE;
      enc   <= 1'b0;
      ok    <= 1'b0;
      rem   <= '0;
      tcnt  <= '0;
      tsr   <= '0;
    end else begin
      unique case (state)
        Q_IDLE:
          if (!cmd_empty) begin
            enc   <= (cmd_data.code == OP_ENC);
            state <= Q_HDR;
          end
        Q_HDR:
          if (do_take) begin
            rem <= cmd_data.len;
            if (cmd_data.len != '0) state <= Q_DATA;
            else                    state <= enc ? Q_TAG_HDR : Q_AUTH;
          end
        Q_DATA:
          if (do_take) begin
            rem <= rem - 16'(nbytes);
            if (rem <= 16'd4) state <= enc ? Q_TAG_HDR : Q_AUTH;
          end
        Q_TAG_HDR:
          if (do_take) state <= Q_TAG_LOAD;
        Q_TAG_LOAD:
          if (tag_valid) begin
            tsr   <= tag;
            tcnt  <= '0;
            state <= Q_TAG;
          end
        Q_TAG:
          if (do_take) begin
            tsr  <= {tsr[TAG_W-W-1:0], W'(0)};
            tcnt <= tcnt + 1'b1;
            if (tcnt == 2'd3) begin
              ok    <= 1'b1;
              state <= Q_STATUS;
            end
          end
        Q_AUTH:
          if (auth_valid) begin
            ok    <= auth_ok;
            state <= Q_STATUS;
          end
        Q_STATUS:
          if (do_take) state <= Q_IDLE;
        default: state <= Q_IDLE;
      endcase
    end
  end

endmodule
