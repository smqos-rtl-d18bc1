// data_collector: the Data Collector (DC) added to the TB scheduler.
//
// Every cycle each SM reports how many instructions it completed
// (sm_inst) and the SM allocation table says which task owns the SM
// (sm_owner). The DC adds the counts of the LS task's SMs and of the batch
// task's SMs into two accumulators. After EPOCH_CYCLES cycles it pulses
// epoch_end, latches both totals, clears the accumulators (counting of the
// next epoch starts at once) and divides each total by the cycle count with
// a serial divider. ipc_valid then pulses with ipc_ls and ipc_batch, the
// average IPC of each task over the epoch, in the smqos_pkg fixed-point
// format, saturated to the register width. Results follow epoch_end by
// about 2*(ACC_W+IPC_FRAC)+3 cycles, far inside the next epoch.
//
// From the document: accumulate instructions per task, divide by cycles,
// send IPC per task at each epoch end, epoch of 10k cycles. Own choices:
// per-SM count inputs, the divider, the fixed-point format, and `run`, which
// holds the epoch counter in reset while fewer than two tasks co-run.
module data_collector
  import smqos_pkg::*;
#(
  parameter int unsigned NUM_SM       = 16,
  parameter int unsigned EPOCH_CYCLES = 10000,
  parameter int unsigned INST_W       = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic [INST_W-1:0]    sm_inst  [NUM_SM],
  input  owner_e               sm_owner [NUM_SM],
  output logic                 epoch_end,
  output logic                 ipc_valid,
  output ipc_t                 ipc_ls,
  output ipc_t                 ipc_batch
);
  localparam longint unsigned MAX_SUM = longint'(NUM_SM) * ((longint'(1) << INST_W) - 1);
  localparam int unsigned ACC_W  = $clog2(MAX_SUM * EPOCH_CYCLES + 1);
  localparam int unsigned SUM_W  = $clog2(MAX_SUM + 1);
  localparam int unsigned CYC_W  = $clog2(EPOCH_CYCLES + 1);
  localparam int unsigned NUM_W  = ACC_W + IPC_FRAC;

  // Per-cycle sums of the two tasks' SMs.
  logic [SUM_W-1:0] sum_ls, sum_b;
  always_comb begin
    sum_ls = '0;
    sum_b  = '0;
    for (int i = 0; i < NUM_SM; i++) begin
      if (sm_owner[i] == OWN_LS)    sum_ls = sum_ls + SUM_W'(sm_inst[i]);
      if (sm_owner[i] == OWN_BATCH) sum_b  = sum_b  + SUM_W'(sm_inst[i]);
    end
  end

  logic [CYC_W-1:0] cyc_r;
  logic [ACC_W-1:0] acc_ls, acc_b, lat_ls, lat_b;
  logic             last_cycle;
  assign last_cycle = run && (cyc_r == CYC_W'(EPOCH_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_r  <= '0;
      acc_ls <= '0;
      acc_b  <= '0;
      lat_ls <= '0;
      lat_b  <= '0;
    end else if (!run) begin
      cyc_r  <= '0;
      acc_ls <= '0;
      acc_b  <= '0;
    end else if (last_cycle) begin
      cyc_r  <= '0;
      lat_ls <= acc_ls + ACC_W'(sum_ls);
      lat_b  <= acc_b  + ACC_W'(sum_b);
      acc_ls <= '0;
      acc_b  <= '0;
    end else begin
      cyc_r  <= cyc_r + 1'b1;
      acc_ls <= acc_ls + ACC_W'(sum_ls);
      acc_b  <= acc_b  + ACC_W'(sum_b);
    end
  end

  // Division sequencer: LS task first, then the batch task.
  typedef enum logic [1:0] {D_IDLE, D_START_B, D_WAIT_LS, D_WAIT_B} dstate_e;
  dstate_e          dst;
  logic             div_start, div_busy, div_done;
  logic [NUM_W-1:0] div_num, div_quo;
  logic             ep_end_r;

  always_comb begin
    div_start = 1'b0;
    div_num   = {lat_ls, IPC_FRAC'(0)};
    if (ep_end_r) begin
      div_start = 1'b1;
    end else if (dst == D_START_B) begin
      div_start = 1'b1;
      div_num   = {lat_b, IPC_FRAC'(0)};
    end
  end

  udiv_serial #(.NUM_W(NUM_W), .DEN_W(CYC_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(CYC_W'(EPOCH_CYCLES)),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem()
  );

  function automatic ipc_t sat(input logic [NUM_W-1:0] q);
    return (q > NUM_W'({IPC_W{1'b1}})) ? {IPC_W{1'b1}} : IPC_W'(q);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst       <= D_IDLE;
      ep_end_r  <= 1'b0;
      ipc_valid <= 1'b0;
      ipc_ls    <= '0;
      ipc_batch <= '0;
    end else begin
      ep_end_r  <= last_cycle;
      ipc_valid <= 1'b0;
      unique case (dst)
        D_IDLE:    if (ep_end_r) dst <= D_WAIT_LS;
        D_WAIT_LS: if (div_done) begin
                     ipc_ls <= sat(div_quo);
                     dst    <= D_START_B;
                   end
        D_START_B: dst <= D_WAIT_B;
        D_WAIT_B:  if (div_done) begin
                     ipc_batch <= sat(div_quo);
                     ipc_valid <= 1'b1;
                     dst       <= D_IDLE;
                   end
        default:   dst <= D_IDLE;
      endcase
    end
  end

  assign epoch_end = last_cycle;
  // The sequencer never starts a division while the divider is busy.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
endmodule
