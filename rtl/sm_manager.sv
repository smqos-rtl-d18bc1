// sm_manager: the SM Manager, with its PDM and DSMA sub-modules.
//
// Task slots: the manager keeps one LS slot and one batch slot. When a slot
// is empty and its task pool holds a kernel, the manager pops it, starts it
// in the slot (ls_start / b_start pulse), clears that task's profiling
// history and asks the SM allocation table to return to the even split
// (init). kernel_done_ls / kernel_done_b empty a slot. co_run is high while
// both slots hold a kernel; only then does the Data Collector count epochs
// and the DSMA decide.
// Epoch flow: Data Collector IPCs (ipc_valid) -> PDM record (rec_valid) ->
// DSMA decision (dec_valid, one cycle later) -> SM allocation table.
//
// From the document: the PDM/DSMA split, the per-epoch flow and that the
// manager manages the task pools. Own choices: two slots, first-come start,
// re-splitting the SMs evenly whenever a new kernel enters a slot.
module sm_manager
  import smqos_pkg::*;
#(
  parameter int unsigned NUM_KERNELS = 32,
  parameter int unsigned TH          = 13
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // task pools
  input  logic                           ls_valid,
  input  logic [$clog2(NUM_KERNELS)-1:0] ls_kid,
  output logic                           ls_pop,
  input  logic                           b_valid,
  input  logic [$clog2(NUM_KERNELS)-1:0] b_kid,
  output logic                           b_pop,
  // task slots
  input  logic                           kernel_done_ls,
  input  logic                           kernel_done_b,
  output logic                           slot_ls_active,
  output logic [$clog2(NUM_KERNELS)-1:0] slot_ls_kid,
  output logic                           slot_b_active,
  output logic [$clog2(NUM_KERNELS)-1:0] slot_b_kid,
  output logic                           ls_start,
  output logic                           b_start,
  output logic                           co_run,
  output logic                           init,
  // QoS target of the LS kernel (looked up by slot_ls_kid)
  input  ipc_t                           ipc_target,
  // Data Collector
  input  logic                           ipc_valid,
  input  ipc_t                           ipc_ls,
  input  ipc_t                           ipc_batch,
  // SM allocation table
  input  smcnt_t                         sm_ls,
  input  smcnt_t                         sm_batch,
  input  smcnt_t                         sm_gated,
  output logic                           dec_valid,
  output decision_t                      dec,
  // state, for observation
  output ipc_t                           ipc_ave_ls,
  output logic [NEP_W-1:0]               nep_ls,
  output ipc_t                           ipc_ave_b,
  output logic [NEP_W-1:0]               nep_b,
  output logic [3:0]                     swap_flags,  // {ls_in, ls_out, b_in, b_out}
  output ipc_t                           ipc_last,
  output smcnt_t                         opt_k,
  output logic                           upper_k,
  output logic                           lower_k,
  output logic                           bound_eval
);
  // Slot management.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_ls_active <= 1'b0;
      slot_b_active  <= 1'b0;
      slot_ls_kid    <= '0;
      slot_b_kid     <= '0;
      ls_start       <= 1'b0;
      b_start        <= 1'b0;
    end else begin
      ls_start <= ls_pop;
      b_start  <= b_pop;
      if (ls_pop) begin
        slot_ls_active <= 1'b1;
        slot_ls_kid    <= ls_kid;
      end else if (kernel_done_ls) begin
        slot_ls_active <= 1'b0;
      end
      if (b_pop) begin
        slot_b_active <= 1'b1;
        slot_b_kid    <= b_kid;
      end else if (kernel_done_b) begin
        slot_b_active <= 1'b0;
      end
    end
  end

  assign ls_pop = ls_valid && !slot_ls_active;
  assign b_pop  = b_valid  && !slot_b_active;
  assign co_run = slot_ls_active && slot_b_active;
  assign init   = ls_start || b_start;

  // PDM.
  logic             rec_valid;
  ipc_t             rec_ipc_ls, rec_ave_ls, rec_ipc_b, rec_ave_b;
  logic [NEP_W-1:0] rec_nep_ls, rec_nep_b;
  smcnt_t           rec_sm_ls, rec_sm_b, rec_sm_g;

  pdm u_pdm (
    .clk, .rst_n, .clr_ls(ls_start), .clr_batch(b_start),
    .ipc_valid, .ipc_ls, .ipc_batch, .sm_ls, .sm_batch, .sm_gated,
    .rec_valid, .rec_ipc_ls, .rec_ave_ls, .rec_nep_ls,
    .rec_ipc_batch(rec_ipc_b), .rec_ave_batch(rec_ave_b), .rec_nep_batch(rec_nep_b),
    .rec_sm_ls, .rec_sm_batch(rec_sm_b), .rec_sm_gated(rec_sm_g)
  );

  // DSMA.
  logic ls_in_f, ls_out_f, b_in_f, b_out_f;

  dsma #(.TH(TH)) u_dsma (
    .clk, .rst_n, .enable(co_run && !init), .clr_batch(b_start), .ipc_target,
    .rec_valid, .rec_ipc_ls, .rec_ave_ls, .rec_nep_ls, .rec_ipc_batch(rec_ipc_b),
    .rec_sm_ls, .rec_sm_batch(rec_sm_b), .rec_sm_gated(rec_sm_g),
    .dec_valid, .dec,
    .ls_to_swapin(ls_in_f), .ls_to_swapout(ls_out_f),
    .b_to_swapin(b_in_f), .b_to_swapout(b_out_f),
    .opt_k, .upper_k, .lower_k, .ipc_last, .bound_eval
  );

  assign ipc_ave_ls = rec_ave_ls;
  assign nep_ls     = rec_nep_ls;
  assign ipc_ave_b  = rec_ave_b;
  assign nep_b      = rec_nep_b;
  assign swap_flags = {ls_in_f, ls_out_f, b_in_f, b_out_f};
endmodule
