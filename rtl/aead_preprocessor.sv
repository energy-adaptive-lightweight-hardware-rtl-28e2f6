// aead_preprocessor: front end of the AEAD.
//
// It reads instruction words and segments from the public data input (PDI)
// and the secret data input (SDI) and feeds the cipher core. As the original design
// describes, it executes the instructions (key activation, encryption,
// decryption), does the serial-in-parallel-out conversion of the key and pads
// input blocks; the stream formats are this design's own (see aead_pkg).
//
//   ACTKEY on PDI : read from SDI an LDKEY instruction, a KEY header and four
//                   key words, assembled into the 128-bit key register.
//   ENC / DEC     : push the instruction into the CMD FIFO, then read the
//                   headers and data of the NPUB, AD and message segments,
//                   and for DEC the TAG segment. The message header is also
//                   pushed into the CMD FIFO for the postprocessor.
//
// Each data word goes to the core unchanged in timing (bdi_valid follows
// pdi_valid, pdi_ready follows bdi_ready) with bdi_size valid bytes, the
// bytes past the end of the segment cleared, and bdi_eot on the last word.
// An empty segment becomes a single block of size 0 with bdi_eot set. One
// segment of each type per instruction.
module aead_preprocessor
  import aead_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // public data input
  input  logic [W-1:0]      pdi_data,
  input  logic              pdi_valid,
  output logic              pdi_ready,
  // secret data input
  input  logic [W-1:0]      sdi_data,
  input  logic              sdi_valid,
  output logic              sdi_ready,
  // to the cipher core
  output logic [KEY_W-1:0]  key,
  output logic              decrypt,
  output logic [W-1:0]      bdi,
  output logic              bdi_valid,
  input  logic              bdi_ready,
  output bdi_type_e         bdi_type,
  output logic [2:0]        bdi_size,
  output logic              bdi_eot,
  // to the command FIFO
  output cmd_t              cmd_data,
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output logic              idle
);
  typedef enum logic [2:0] {
    P_IDLE, P_SDI_INST, P_SDI_HDR, P_KEY, P_HDR, P_DATA, P_EMPTY
  } pstate_e;

  pstate_e     state;
  logic [3:0]  seg;        // type of the segment being passed on
  logic [15:0] rem;        // bytes left in it
  logic [1:0]  kcnt;

  logic [3:0]  pdi_code;
  logic        pdi_is_cmd, hdr_is_msg;
  assign pdi_code   = pdi_data[W-1 -: 4];
  assign pdi_is_cmd = (pdi_code == OP_ENC) || (pdi_code == OP_DEC);
  assign hdr_is_msg = (pdi_code == HDR_PT) || (pdi_code == HDR_CT);

  always_comb begin
    unique case (seg)
      HDR_NPUB:       bdi_type = BDI_NPUB;
      HDR_PT, HDR_CT: bdi_type = BDI_MSG;
      HDR_TAG:        bdi_type = BDI_TAG;
      default:        bdi_type = BDI_AD;
    endcase
  end

  // size, end of segment and padding of the current block
  always_comb begin
    bdi_size = (rem >= 16'd4) ? 3'd4 : rem[2:0];
    bdi_eot  = (rem <= 16'd4);
    bdi      = '0;
    if (state == P_DATA)
      for (int b = 0; b < 4; b++)
        if (b < int'(bdi_size)) bdi[W-1-8*b -: 8] = pdi_data[W-1-8*b -: 8];
  end

  assign bdi_valid = (state == P_DATA) ? pdi_valid : (state == P_EMPTY);

  always_comb begin
    pdi_ready = 1'b0;
    sdi_ready = 1'b0;
    cmd_valid = 1'b0;
    cmd_data  = '{code: pdi_code, flags: 4'h0, len: pdi_data[15:0]};
    unique case (state)
      P_IDLE: begin
        pdi_ready = pdi_is_cmd ? cmd_ready : 1'b1;
        cmd_valid = pdi_valid && pdi_is_cmd;
        cmd_data.len = '0;
      end
      P_HDR: begin
        pdi_ready = hdr_is_msg ? cmd_ready : 1'b1;
        cmd_valid = pdi_valid && hdr_is_msg;
      end
      P_DATA:                           pdi_ready = bdi_ready;
      P_SDI_INST, P_SDI_HDR, P_KEY:     sdi_ready = 1'b1;
      default: ;
    endcase
  end

  assign idle = (state == P_IDLE);

  logic pdi_take, sdi_take, seg_done;
  assign pdi_take = pdi_valid && pdi_ready;
  assign sdi_take = sdi_valid && sdi_ready;
  assign seg_done = (state == P_DATA  && pdi_take && bdi_eot) ||
                    (state == P_EMPTY && bdi_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= P_IDLE;
      seg     <= '0;
      rem     <= '0;
      kcnt    <= '0;
      key     <= '0;
      decrypt <= 1'b0;
    end else begin
      unique case (state)
        P_IDLE:
          if (pdi_take) begin
            if (pdi_code == OP_ACTKEY) state <= P_SDI_INST;
            else if (pdi_is_cmd) begin
              decrypt <= (pdi_code == OP_DEC);
              state   <= P_HDR;
            end
          end
        P_SDI_INST:
          if (sdi_take && sdi_data[W-1 -: 4] == OP_LDKEY) state <= P_SDI_HDR;
        P_SDI_HDR:
          if (sdi_take) begin
            kcnt  <= '0;
            state <= P_KEY;
          end
        P_KEY:
          if (sdi_take) begin
            key  <= {key[KEY_W-W-1:0], sdi_data};
            kcnt <= kcnt + 1'b1;
            if (kcnt == 2'd3) state <= P_IDLE;
          end
        P_HDR:
          if (pdi_take) begin
            seg   <= pdi_code;
            rem   <= pdi_data[15:0];
            state <= (pdi_data[15:0] == '0) ? P_EMPTY : P_DATA;
          end
        P_DATA:
          if (pdi_take) rem <= rem - 16'(bdi_size);
        default: ;
      endcase
      if (seg_done) begin
        if (seg == HDR_TAG || ((seg == HDR_PT || seg == HDR_CT) && !decrypt))
          state <= P_IDLE;
        else
          state <= P_HDR;
      end
    end
  end

endmodule
