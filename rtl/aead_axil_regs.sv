// aead_axil_regs: AXI4-Lite slave in front of the AEAD and the DPR controller.
//
// The original design connects the AEAD to the processing system through an AXI
// interconnect with an AXI4-Lite link; the register map below is this
// design's own. Word addresses (byte offsets):
//   0x00 W  PDI   word for the public data input
//   0x04 W  SDI   word for the secret data input
//   0x08 R  DO    next output word (0 if none); reading it consumes the word
//   0x0C R  STAT  {aead_idle, no_fit, reconfiguring, do_valid} in bits 3:0
//   0x10 RW BUDGET available power in microwatt, bits 15:0 (reset 0)
//   0x14 R  RM    reconfigurable module loaded, bits 2:0
// A write to PDI or SDI is answered (BVALID) only after the AEAD has taken
// the word; while the partition is being reconfigured (hold high) no word is
// offered. One write and one read are handled at a time; AW and W are taken
// together. Responses are always OKAY.
module aead_axil_regs
  import aead_pkg::*;
#(
  parameter int unsigned ADDR_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // AEAD streams
  output logic [W-1:0]      pdi_data,
  output logic              pdi_valid,
  input  logic              pdi_ready,
  output logic [W-1:0]      sdi_data,
  output logic              sdi_valid,
  input  logic              sdi_ready,
  input  logic [W-1:0]      do_data,
  input  logic              do_valid,
  output logic              do_ready,
  // DPR controller
  output logic [15:0]       budget_uw,
  input  logic              hold,
  input  logic              aead_idle,
  input  logic              no_fit,
  input  rm_e               loaded_rm
);
  localparam logic [2:0] A_PDI = 3'd0, A_SDI = 3'd1, A_DO = 3'd2,
                         A_STAT = 3'd3, A_BUDGET = 3'd4, A_RM = 3'd5;

  typedef enum logic [1:0] { W_IDLE, W_PUSH, W_RESP } wstate_e;
  wstate_e     wstate;
  logic [2:0]  waddr;
  logic [31:0] wdata;
  logic        rvalid_q;
  logic [31:0] rdata_q;

  // ----------------------------------------------------------- write side
  logic aw_take;
  assign aw_take        = (wstate == W_IDLE) && s_axil_awvalid && s_axil_wvalid;
  assign s_axil_awready = aw_take;
  assign s_axil_wready  = aw_take;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_bvalid  = (wstate == W_RESP);

  assign pdi_data  = wdata;
  assign sdi_data  = wdata;
  assign pdi_valid = (wstate == W_PUSH) && (waddr == A_PDI) && !hold;
  assign sdi_valid = (wstate == W_PUSH) && (waddr == A_SDI) && !hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate    <= W_IDLE;
      waddr     <= '0;
      wdata     <= '0;
      budget_uw <= '0;
    end else begin
      unique case (wstate)
        W_IDLE:
          if (aw_take) begin
            waddr <= s_axil_awaddr[4:2];
            wdata <= s_axil_wdata;
            if (s_axil_awaddr[4:2] == A_PDI || s_axil_awaddr[4:2] == A_SDI) begin
              wstate <= W_PUSH;
            end else begin
              if (s_axil_awaddr[4:2] == A_BUDGET) begin
                if (s_axil_wstrb[0]) budget_uw[7:0]  <= s_axil_wdata[7:0];
                if (s_axil_wstrb[1]) budget_uw[15:8] <= s_axil_wdata[15:8];
              end
              wstate <= W_RESP;
            end
          end
        W_PUSH:
          if ((pdi_valid && pdi_ready) || (sdi_valid && sdi_ready)) wstate <= W_RESP;
        W_RESP:
          if (s_axil_bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ read side
  logic ar_take;
  assign ar_take        = !rvalid_q && s_axil_arvalid;
  assign s_axil_arready = ar_take;
  assign s_axil_rvalid  = rvalid_q;
  assign s_axil_rdata   = rdata_q;
  assign s_axil_rresp   = 2'b00;
  assign do_ready       = ar_take && (s_axil_araddr[4:2] == A_DO);

  logic [31:0] rmux;
  always_comb begin
    unique case (s_axil_araddr[4:2])
      A_DO:     rmux = do_valid ? do_data : '0;
      A_STAT:   rmux = {28'h0, aead_idle, no_fit, hold, do_valid};
      A_BUDGET: rmux = {16'h0, budget_uw};
      A_RM:     rmux = {29'h0, loaded_rm};
      default:  rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else if (ar_take) begin
      rvalid_q <= 1'b1;
      rdata_q  <= rmux;
    end else if (s_axil_rready) begin
      rvalid_q <= 1'b0;
    end
  end

  // AXI rule: a response stays valid until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
