// task_pools: the LS task pool and the batch task pool.
//
// A kernel offloaded to the GPU (launch_valid, launch_kid) is pushed into
// the LS pool if its bit in the LS bit vector is set (launch_is_ls, looked
// up in qos_regs) and into the batch pool otherwise. launch_ready is low
// while the chosen pool is full. The SM Manager reads the oldest kernel of
// each pool (ls_valid/ls_kid, b_valid/b_kid) and removes it with ls_pop or
// b_pop when it gives the kernel a task slot. Both pools are FIFOs, so
// kernels of one type start in launch order; a push appears at the head on
// the next clock.
//
// From the document: two pools, filled by task type, managed by the SM
// Manager. Own choices: FIFO order and the pool depth.
module task_pools #(
  parameter int unsigned NUM_KERNELS = 32,
  parameter int unsigned DEPTH       = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           launch_valid,
  input  logic [$clog2(NUM_KERNELS)-1:0] launch_kid,
  input  logic                           launch_is_ls,
  output logic                           launch_ready,
  output logic                           ls_valid,
  output logic [$clog2(NUM_KERNELS)-1:0] ls_kid,
  input  logic                           ls_pop,
  output logic                           b_valid,
  output logic [$clog2(NUM_KERNELS)-1:0] b_kid,
  input  logic                           b_pop
);
  localparam int unsigned KW = $clog2(NUM_KERNELS);

  logic ls_full, ls_empty, b_full, b_empty;

  task_fifo #(.W(KW), .DEPTH(DEPTH)) u_ls (
    .clk, .rst_n, .push(launch_valid && launch_is_ls && !ls_full), .din(launch_kid),
    .pop(ls_pop), .head(ls_kid), .full(ls_full), .empty(ls_empty)
  );
  task_fifo #(.W(KW), .DEPTH(DEPTH)) u_b (
    .clk, .rst_n, .push(launch_valid && !launch_is_ls && !b_full), .din(launch_kid),
    .pop(b_pop), .head(b_kid), .full(b_full), .empty(b_empty)
  );

  assign launch_ready = launch_is_ls ? !ls_full : !b_full;
  assign ls_valid     = !ls_empty;
  assign b_valid      = !b_empty;
endmodule
