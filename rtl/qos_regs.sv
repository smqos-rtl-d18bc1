// qos_regs: QoS registers written by the cudaSetQoS call.
//
// cudaSetQoS(kernel, IPC_target) marks a kernel as latency-sensitive and
// gives its QoS target. This block keeps the LS bit vector (one bit per
// kernel identifier) and an IPC_target entry per kernel. A write
// (wr_en, wr_kid, wr_target) sets the bit and stores the target; a write
// with a zero target clears the bit, turning the kernel back into a batch
// task. Two combinational read ports serve the task pools (is this launched
// kernel LS?) and the DSMA (target of the running LS kernel). Writes take
// effect on the next clock; all entries reset to batch with target 0.
//
// From the document: the LS bit vector and the per-kernel IPC_target set by
// cudaSetQoS. Own choices: the number of kernel identifiers (32, one per
// hardware work queue), the register-file form, clearing by a zero target.
module qos_regs
  import smqos_pkg::*;
#(
  parameter int unsigned NUM_KERNELS = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           wr_en,
  input  logic [$clog2(NUM_KERNELS)-1:0] wr_kid,
  input  ipc_t                           wr_target,
  input  logic [$clog2(NUM_KERNELS)-1:0] cls_kid,
  output logic                           cls_is_ls,
  input  logic [$clog2(NUM_KERNELS)-1:0] tgt_kid,
  output ipc_t                           tgt_target,
  output logic [NUM_KERNELS-1:0]         ls_vec
);
  ipc_t target_r [NUM_KERNELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ls_vec <= '0;
      for (int i = 0; i < NUM_KERNELS; i++) target_r[i] <= '0;
    end else if (wr_en) begin
      ls_vec[wr_kid]   <= (wr_target != '0);
      target_r[wr_kid] <= wr_target;
    end
  end

  assign cls_is_ls  = ls_vec[cls_kid];
  assign tgt_target = target_r[tgt_kid];
endmodule
