// smqos_top: SMQoS, QoS-aware SM allocation between an LS and a batch task.
//
// Two GPU kernels co-run on disjoint sets of SMs: a latency-sensitive (LS)
// kernel with an IPC target, and a batch kernel. Every epoch the Data
// Collector measures each kernel's IPC; the SM Manager (PDM + DSMA) moves
// at most one SM: towards the LS kernel when it misses its target, away
// from it when it is comfortably above, and decides whether an SM the LS
// kernel gives up goes to the batch kernel or is power gated, searching
// the batch kernel's best SM count on the way. The SM allocation table
// carries the moves out through a handshake with the GPU's TB scheduler
// and drives the per-SM power-gate enables.
//
// Interfaces:
//  - cudaSetQoS writes: qos_wr_en/kid/target (target 0 = batch kernel)
//  - kernel offload: launch_valid/kid, launch_ready; the kernel is queued
//    in the LS or batch pool; slot_* say which kernels run, *_start pulse
//    when a kernel is given its slot, kernel_done_* end it
//  - per-SM activity: sm_inst[i] = instructions SM i completed this cycle
//  - SM moves: swap_valid/sm/to held until swap_ready
//  - sm_owner[i], sm_gate[i] (1 = SM i power gated), counts and state
// Timing: one decision per EPOCH_CYCLES cycles while both slots are full,
// about 2*(31+33)+8 cycles after the epoch ends at the default sizes.
//
// Structure and algorithms follow the document; sizes of the SM array,
// kernel identifiers, pools, fixed-point formats and the threshold are this
// design's choices where the document gives none (see the blocks).
module smqos_top
  import smqos_pkg::*;
#(
  parameter int unsigned NUM_SM       = 16,
  parameter int unsigned NUM_KERNELS  = 32,
  parameter int unsigned EPOCH_CYCLES = 10000,
  parameter int unsigned INST_W       = 7,
  parameter int unsigned POOL_DEPTH   = 8,
  parameter int unsigned TH           = 13
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // cudaSetQoS
  input  logic                           qos_wr_en,
  input  logic [$clog2(NUM_KERNELS)-1:0] qos_wr_kid,
  input  ipc_t                           qos_wr_target,
  // kernel offload and completion
  input  logic                           launch_valid,
  input  logic [$clog2(NUM_KERNELS)-1:0] launch_kid,
  output logic                           launch_ready,
  input  logic                           kernel_done_ls,
  input  logic                           kernel_done_b,
  output logic                           slot_ls_active,
  output logic [$clog2(NUM_KERNELS)-1:0] slot_ls_kid,
  output logic                           slot_b_active,
  output logic [$clog2(NUM_KERNELS)-1:0] slot_b_kid,
  output logic                           ls_start,
  output logic                           b_start,
  // SM activity
  input  logic [INST_W-1:0]              sm_inst [NUM_SM],
  // SM moves to the TB scheduler
  output logic                           swap_valid,
  output logic [$clog2(NUM_SM)-1:0]      swap_sm,
  output owner_e                         swap_to,
  input  logic                           swap_ready,
  output owner_e                         sm_owner [NUM_SM],
  output logic [NUM_SM-1:0]              sm_gate,
  // observation
  output smcnt_t                         sm_ls,
  output smcnt_t                         sm_batch,
  output smcnt_t                         sm_gated,
  output logic                           epoch_end,
  output logic                           ipc_valid,
  output ipc_t                           ipc_ls,
  output ipc_t                           ipc_batch,
  output ipc_t                           ipc_ave_ls,
  output ipc_t                           ipc_ave_b,
  output logic [NEP_W-1:0]               nep_ls,
  output logic [NEP_W-1:0]               nep_b,
  output ipc_t                           ipc_last,
  output logic                           alloc_busy,
  output logic                           dec_valid,
  output decision_t                      dec,
  output logic [3:0]                     swap_flags,
  output smcnt_t                         opt_k,
  output logic                           upper_k,
  output logic                           lower_k,
  output logic                           bound_eval,
  output logic                           dec_dropped,
  output logic [NUM_KERNELS-1:0]         ls_vec
);
  localparam int unsigned KW = $clog2(NUM_KERNELS);

  logic          launch_is_ls, ls_valid, b_valid, ls_pop, b_pop, co_run, init;
  logic [KW-1:0] ls_kid, b_kid;
  ipc_t          ipc_target;

  qos_regs #(.NUM_KERNELS(NUM_KERNELS)) u_qos (
    .clk, .rst_n, .wr_en(qos_wr_en), .wr_kid(qos_wr_kid), .wr_target(qos_wr_target),
    .cls_kid(launch_kid), .cls_is_ls(launch_is_ls),
    .tgt_kid(slot_ls_kid), .tgt_target(ipc_target), .ls_vec
  );

  task_pools #(.NUM_KERNELS(NUM_KERNELS), .DEPTH(POOL_DEPTH)) u_pools (
    .clk, .rst_n, .launch_valid, .launch_kid, .launch_is_ls, .launch_ready,
    .ls_valid, .ls_kid, .ls_pop, .b_valid, .b_kid, .b_pop
  );

  data_collector #(.NUM_SM(NUM_SM), .EPOCH_CYCLES(EPOCH_CYCLES), .INST_W(INST_W)) u_dc (
    .clk, .rst_n, .run(co_run && !init), .sm_inst, .sm_owner,
    .epoch_end, .ipc_valid, .ipc_ls, .ipc_batch
  );

  sm_manager #(.NUM_KERNELS(NUM_KERNELS), .TH(TH)) u_mgr (
    .clk, .rst_n,
    .ls_valid, .ls_kid, .ls_pop, .b_valid, .b_kid, .b_pop,
    .kernel_done_ls, .kernel_done_b,
    .slot_ls_active, .slot_ls_kid, .slot_b_active, .slot_b_kid,
    .ls_start, .b_start, .co_run, .init,
    .ipc_target, .ipc_valid, .ipc_ls, .ipc_batch,
    .sm_ls, .sm_batch, .sm_gated, .dec_valid, .dec,
    .ipc_ave_ls, .nep_ls, .ipc_ave_b, .nep_b, .swap_flags, .ipc_last,
    .opt_k, .upper_k, .lower_k, .bound_eval
  );

  sm_alloc_table #(.NUM_SM(NUM_SM)) u_alloc (
    .clk, .rst_n, .init, .dec_valid, .dec,
    .swap_valid, .swap_sm, .swap_to, .swap_ready,
    .sm_owner, .sm_gate, .sm_ls, .sm_batch, .sm_gated,
    .busy(alloc_busy), .dec_dropped
  );
endmodule
