// dpr_ctrl: power-adaptive controller of the reconfigurable AEAD partition.
//
// The original design's idea is that the energy available to the node decides which
// encryption module occupies the reconfigurable partition: for a given power
// budget the controller loads a module whose power meets it. The module
// powers are the dynamic powers measured for the original design with reconfiguration
// (in microwatt, one parameter per module). Which of the modules that fit is
// taken is this design's choice: the one with the highest power, since the
// original design ties higher power to higher security. With no module fitting
// (budget below the cheapest), the loaded module stays and no_fit is raised.
//
// Sequence: when the chosen module differs from the loaded one and the AEAD
// is idle, the controller holds the partition in reset (rp_rst_n low,
// reconfiguring high), pulses prc_trigger for one cycle with prc_rm_id, and
// waits for prc_done from the Partial Reconfiguration Controller. Then it
// records the new module as loaded and releases the partition. After reset
// the ACORN module is taken as loaded.
module dpr_ctrl
  import aead_pkg::*;
#(
  parameter int unsigned P_ACORN_UW = 1830,
  parameter int unsigned P_PI_UW    = 10080,
  parameter int unsigned P_JAMBU_UW = 2243,
  parameter int unsigned P_MORUS_UW = 5660,
  parameter int unsigned P_CLOC_UW  = 3660
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] budget_uw,
  input  logic        aead_idle,
  output logic        prc_trigger,
  output rm_e         prc_rm_id,
  input  logic        prc_done,
  output logic        rp_rst_n,
  output logic        reconfiguring,
  output rm_e         loaded_rm,
  output logic        no_fit
);
  localparam int unsigned PWR [NUM_RM] = '{P_ACORN_UW, P_PI_UW, P_JAMBU_UW, P_MORUS_UW, P_CLOC_UW};

  // choice: highest-power module within the budget
  rm_e best;
  logic found;
  always_comb begin
    int unsigned best_p;
    best   = RM_ACORN;
    best_p = 0;
    found  = 1'b0;
    for (int i = 0; i < NUM_RM; i++) begin
      if (PWR[i] <= int'(budget_uw) && (!found || PWR[i] > best_p)) begin
        best   = rm_e'(i);
        best_p = PWR[i];
        found  = 1'b1;
      end
    end
  end
  assign no_fit = !found;

  typedef enum logic [1:0] { R_RUN, R_TRIG, R_WAIT } rstate_e;
  rstate_e state;
  rm_e     target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_RUN;
      target    <= RM_ACORN;
      loaded_rm <= RM_ACORN;
    end else begin
      unique case (state)
        R_RUN:
          if (found && best != loaded_rm && aead_idle) begin
            target <= best;
            state  <= R_TRIG;
          end
        R_TRIG: state <= R_WAIT;
        R_WAIT:
          if (prc_done) begin
            loaded_rm <= target;
            state     <= R_RUN;
          end
        default: state <= R_RUN;
      endcase
    end
  end

  assign prc_trigger   = (state == R_TRIG);
  assign prc_rm_id     = target;
  assign reconfiguring = (state != R_RUN);
  assign rp_rst_n      = rst_n && !reconfiguring;

endmodule
