// pdm: Profiling Data Management module of the SM Manager.
//
// When the Data Collector reports the IPC of both tasks for the epoch just
// ended (ipc_valid), the PDM records, per task, the epoch IPC, the number of
// epochs the task has run (N_epoch) and its average IPC over those epochs,
// together with the current SM counts. The average is kept in the 16-bit
// register the document names and is updated by the running-mean rule
//     IPC_ave <- (IPC_ave * N + IPC_epoch) / (N + 1),   N <- N + 1
// with one serial divider used for the LS task and then the batch task
// (truncating division). About 2*(IPC_W+NEP_W+1)+3 cycles after ipc_valid,
// rec_valid pulses and the rec_* outputs hold the new record. clr_ls and
// clr_batch reset one task's history when a new kernel takes its slot.
//
// From the document: what the PDM records and that it feeds the DSMA. Own
// choices: the running-mean form, the widths of N_epoch, the divider.
module pdm
  import smqos_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_ls,
  input  logic             clr_batch,
  input  logic             ipc_valid,
  input  ipc_t             ipc_ls,
  input  ipc_t             ipc_batch,
  input  smcnt_t           sm_ls,
  input  smcnt_t           sm_batch,
  input  smcnt_t           sm_gated,
  output logic             rec_valid,
  output ipc_t             rec_ipc_ls,
  output ipc_t             rec_ave_ls,
  output logic [NEP_W-1:0] rec_nep_ls,
  output ipc_t             rec_ipc_batch,
  output ipc_t             rec_ave_batch,
  output logic [NEP_W-1:0] rec_nep_batch,
  output smcnt_t           rec_sm_ls,
  output smcnt_t           rec_sm_batch,
  output smcnt_t           rec_sm_gated
);
  localparam int unsigned NUM_W = IPC_W + NEP_W + 1;
  localparam int unsigned DEN_W = NEP_W + 1;
  localparam logic [NEP_W-1:0] NEP_MAX = {NEP_W{1'b1}};

  typedef enum logic [2:0] {P_IDLE, P_DIV_LS, P_START_B, P_DIV_B, P_DONE} pstate_e;
  pstate_e pst;

  logic             div_start, div_busy, div_done;
  logic [NUM_W-1:0] div_num, div_quo;
  logic [DEN_W-1:0] div_den;

  // Operands of the running mean for the task being updated.
  function automatic logic [NUM_W-1:0] mean_num(input ipc_t ave, input logic [NEP_W-1:0] n,
                                                input ipc_t ep);
    return NUM_W'(ave) * NUM_W'(n) + NUM_W'(ep);
  endfunction

  always_comb begin
    div_start = 1'b0;
    div_num   = mean_num(rec_ave_ls, rec_nep_ls, ipc_ls);
    div_den   = DEN_W'(rec_nep_ls) + 1'b1;
    if (pst == P_IDLE && ipc_valid) begin
      div_start = 1'b1;
    end else if (pst == P_START_B) begin
      div_start = 1'b1;
      div_num   = mean_num(rec_ave_batch, rec_nep_batch, rec_ipc_batch);
      div_den   = DEN_W'(rec_nep_batch) + 1'b1;
    end
  end

  udiv_serial #(.NUM_W(NUM_W), .DEN_W(DEN_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst           <= P_IDLE;
      rec_valid     <= 1'b0;
      rec_ipc_ls    <= '0;
      rec_ave_ls    <= '0;
      rec_nep_ls    <= '0;
      rec_ipc_batch <= '0;
      rec_ave_batch <= '0;
      rec_nep_batch <= '0;
      rec_sm_ls     <= '0;
      rec_sm_batch  <= '0;
      rec_sm_gated  <= '0;
    end else begin
      rec_valid <= 1'b0;
      unique case (pst)
        P_IDLE: if (ipc_valid) begin
          rec_ipc_ls    <= ipc_ls;
          rec_ipc_batch <= ipc_batch;
          rec_sm_ls     <= sm_ls;
          rec_sm_batch  <= sm_batch;
          rec_sm_gated  <= sm_gated;
          pst           <= P_DIV_LS;
        end
        P_DIV_LS: if (div_done) begin
          rec_ave_ls <= IPC_W'(div_quo);
          if (rec_nep_ls != NEP_MAX) rec_nep_ls <= rec_nep_ls + 1'b1;
          pst <= P_START_B;
        end
        P_START_B: pst <= P_DIV_B;
        P_DIV_B: if (div_done) begin
          rec_ave_batch <= IPC_W'(div_quo);
          if (rec_nep_batch != NEP_MAX) rec_nep_batch <= rec_nep_batch + 1'b1;
          pst <= P_DONE;
        end
        P_DONE: begin
          rec_valid <= 1'b1;
          pst       <= P_IDLE;
        end
        default: pst <= P_IDLE;
      endcase
      if (clr_ls) begin
        rec_ave_ls <= '0;
        rec_nep_ls <= '0;
      end
      if (clr_batch) begin
        rec_ave_batch <= '0;
        rec_nep_batch <= '0;
      end
    end
  end
  // The sequencer never starts a division while the divider is busy.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
endmodule
