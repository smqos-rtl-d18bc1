// dsma: Dynamic SM Adjustment module of the SM Manager.
//
// On each epoch record from the PDM (rec_valid) the DSMA, in one cycle:
//  1. Bound search for the batch task. If the batch task swapped an SM at
//     the previous epoch end and opt_k is not yet frozen, compare this
//     epoch's batch IPC with IPC_last (the IPC before that swap):
//       after a swap-in : IPC <= IPC_last*(1+th) -> upper_k ; else lower_k, opt_k = SM_k
//       after a swap-out: IPC <  IPC_last*(1-th) -> upper_k ; else lower_k, opt_k = SM_k
//     Once upper_k and lower_k are both set, opt_k is frozen.
//  2. Algorithm 1 for the LS task: swap in an SM if IPC_ave or IPC_epoch is
//     below IPC_target; swap out one if IPC_ave*N/(N+1) > IPC_target and
//     IPC_epoch > IPC_target (evaluated without division, as
//     IPC_ave*N > IPC_target*(N+1)).
//  3. Algorithm 2 for the batch task, only when the LS task swaps out:
//     take the freed SM if SM_k < opt_k or upper_k is clear; otherwise give
//     up one of its own SMs if lower_k is clear; otherwise leave the freed SM
//     to be power gated. A batch swap records IPC_last and arms step 1.
// One cycle after rec_valid, dec_valid pulses with the decision; the
// to_swapin/to_swapout flags and opt_k, upper_k, lower_k, ipc_last stay in
// registers (the document's 1-, 8- and 16-bit registers).
//
// Algorithms 1 and 2 and the bound rules follow the document. Own choices:
// th = TH/256 (the document gives no value), opt_k starting at 0, every task
// keeping at least one SM, no decision while `enable` is low.
module dsma
  import smqos_pkg::*;
#(
  parameter int unsigned TH = 13     // threshold in 1/256 units (about 5%)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             clr_batch,
  input  ipc_t             ipc_target,
  input  logic             rec_valid,
  input  ipc_t             rec_ipc_ls,
  input  ipc_t             rec_ave_ls,
  input  logic [NEP_W-1:0] rec_nep_ls,
  input  ipc_t             rec_ipc_batch,
  input  smcnt_t           rec_sm_ls,
  input  smcnt_t           rec_sm_batch,
  input  smcnt_t           rec_sm_gated,
  output logic             dec_valid,
  output decision_t        dec,
  output logic             ls_to_swapin,
  output logic             ls_to_swapout,
  output logic             b_to_swapin,
  output logic             b_to_swapout,
  output smcnt_t           opt_k,
  output logic             upper_k,
  output logic             lower_k,
  output ipc_t             ipc_last,
  output logic             bound_eval       // pulses when step 1 ran
);
  localparam int unsigned PW = IPC_W + NEP_W + 2;
  localparam int unsigned TW = IPC_W + TH_W + 1;

  logic pend_r, pend_in_r;   // a batch swap awaits evaluation; it was a swap-in

  // Next-state values, worked out from the current record.
  logic      n_upper, n_lower, n_eval;
  smcnt_t    n_opt;
  logic      ls_in, ls_out, b_in, b_out;
  decision_t n_dec;

  logic [TW-1:0] ep_scaled, last_hi, last_lo;
  logic [PW-1:0] ave_n, tgt_n1;

  always_comb begin
    // Step 1: bound search.
    ep_scaled = TW'(rec_ipc_batch) << TH_W;
    last_hi   = TW'(ipc_last) * TW'((1 << TH_W) + TH);
    last_lo   = TW'(ipc_last) * TW'((1 << TH_W) - TH);
    n_upper = upper_k;
    n_lower = lower_k;
    n_opt   = opt_k;
    n_eval  = pend_r && !(upper_k && lower_k);
    if (n_eval) begin
      if (pend_in_r ? (ep_scaled <= last_hi) : (ep_scaled < last_lo)) begin
        n_upper = 1'b1;
      end else begin
        n_lower = 1'b1;
        n_opt   = rec_sm_batch;
      end
    end

    // Step 2: Algorithm 1.
    ave_n  = PW'(rec_ave_ls) * PW'(rec_nep_ls);
    tgt_n1 = PW'(ipc_target) * (PW'(rec_nep_ls) + PW'(1));
    ls_in  = 1'b0;
    ls_out = 1'b0;
    if (rec_ave_ls < ipc_target || rec_ipc_ls < ipc_target) begin
      ls_in = (rec_sm_gated != 0) || (rec_sm_batch > smcnt_t'(1));
    end else if (ave_n > tgt_n1 && rec_ipc_ls > ipc_target) begin
      ls_out = rec_sm_ls > smcnt_t'(1);
    end

    // Step 3: Algorithm 2, only when the LS task frees an SM.
    b_in  = 1'b0;
    b_out = 1'b0;
    if (ls_out) begin
      if (rec_sm_batch < n_opt)  b_in  = 1'b1;
      else if (!n_upper)         b_in  = 1'b1;
      else if (!n_lower)         b_out = rec_sm_batch > smcnt_t'(1);
    end

    n_dec.ls    = ls_in ? LS_SWAP_IN : (ls_out ? LS_SWAP_OUT : LS_KEEP);
    n_dec.batch = b_in  ? B_SWAP_IN  : (b_out  ? B_SWAP_OUT  : B_GATE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid     <= 1'b0;
      dec           <= '{ls: LS_KEEP, batch: B_GATE};
      ls_to_swapin  <= 1'b0;
      ls_to_swapout <= 1'b0;
      b_to_swapin   <= 1'b0;
      b_to_swapout  <= 1'b0;
      opt_k         <= '0;
      upper_k       <= 1'b0;
      lower_k       <= 1'b0;
      ipc_last      <= '0;
      pend_r        <= 1'b0;
      pend_in_r     <= 1'b0;
      bound_eval    <= 1'b0;
    end else begin
      dec_valid  <= 1'b0;
      bound_eval <= 1'b0;
      if (clr_batch) begin
        opt_k   <= '0;
        upper_k <= 1'b0;
        lower_k <= 1'b0;
        pend_r  <= 1'b0;
      end else if (rec_valid && enable) begin
        dec_valid     <= 1'b1;
        dec           <= n_dec;
        ls_to_swapin  <= ls_in;
        ls_to_swapout <= ls_out;
        b_to_swapin   <= b_in;
        b_to_swapout  <= b_out;
        upper_k       <= n_upper;
        lower_k       <= n_lower;
        opt_k         <= n_opt;
        bound_eval    <= n_eval;
        pend_r        <= b_in || b_out;
        pend_in_r     <= b_in;
        if (b_in || b_out) ipc_last <= rec_ipc_batch;
      end
    end
  end
endmodule
