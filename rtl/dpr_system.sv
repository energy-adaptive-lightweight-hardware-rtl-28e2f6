// dpr_system: energy-adaptive hardware security module, programmable-logic
// side.
//
// An IoT node powered from an energy harvester does not always have the same
// power to spend on security. The design keeps one reconfigurable partition
// for the authenticated-encryption unit (AEAD) and loads into it, at run
// time, the cipher module whose power fits the budget. This top holds the
// static part and the partition:
//   aead_axil_regs  AXI4-Lite slave reached from the processing system
//                   through the AXI interconnect; data streams and the power
//                   budget register
//   dpr_ctrl        picks the module for the budget, holds the partition in
//                   reset and asks the Partial Reconfiguration Controller
//                   (PRC) to load it
//   aead            the partition: preprocessor, CMD FIFO, cipher core,
//                   postprocessor
// The processing system, the AXI interconnects, the PRC (which writes the
// partial bitstream to the configuration port) and the integrated logic
// analyser are vendor parts outside this RTL: the AXI4-Lite slave port, the
// prc_* handshake and ila_probe are where they connect. Partial
// reconfiguration itself cannot be described in RTL; the partition here holds
// the ACORN module, which is the only cipher written, and a reconfiguration
// is seen as the reset-and-handshake sequence of dpr_ctrl.
//
// ila_probe: [31:0] DO word, [32] do_valid, [33] do_ready, [34] pdi_valid,
// [35] pdi_ready, [36] aead_idle, [37] reconfiguring, [40:38] loaded module,
// [41] no_fit, [57:42] power budget, [63:58] zero.
module dpr_system
  import aead_pkg::*;
#(
  parameter int unsigned ADDR_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
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
  // Partial Reconfiguration Controller
  output logic              prc_trigger,
  output logic [2:0]        prc_rm_id,
  input  logic              prc_done,
  // integrated logic analyser
  output logic [63:0]       ila_probe
);
  logic [W-1:0] pdi_data, sdi_data, do_data;
  logic         pdi_valid, pdi_ready, sdi_valid, sdi_ready, do_valid, do_ready;
  logic [15:0]  budget_uw;
  logic         aead_idle, reconfiguring, no_fit, rp_rst_n;
  rm_e          loaded_rm, rm_id;

  aead_axil_regs #(.ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .pdi_data, .pdi_valid, .pdi_ready,
    .sdi_data, .sdi_valid, .sdi_ready,
    .do_data, .do_valid, .do_ready,
    .budget_uw, .hold(reconfiguring), .aead_idle, .no_fit, .loaded_rm
  );

  dpr_ctrl u_dpr (
    .clk, .rst_n,
    .budget_uw, .aead_idle,
    .prc_trigger, .prc_rm_id(rm_id), .prc_done,
    .rp_rst_n, .reconfiguring, .loaded_rm, .no_fit
  );
  assign prc_rm_id = rm_id;

  // reconfigurable partition
  aead u_aead (
    .clk, .rst_n(rp_rst_n),
    .pdi_data, .pdi_valid, .pdi_ready,
    .sdi_data, .sdi_valid, .sdi_ready,
    .do_data, .do_valid, .do_ready,
    .idle(aead_idle)
  );

  assign ila_probe = {6'h0, budget_uw, no_fit, loaded_rm, reconfiguring, aead_idle,
                      pdi_ready, pdi_valid, do_ready, do_valid, do_data};

endmodule
