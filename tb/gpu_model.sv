// gpu_model: behavioural stand-in for the GPU's SMs and TB scheduler, used
// only by the SMQoS testbenches.
//
// Each SM emits instructions every cycle at the rate of the task that owns
// it, so that a task on n SMs completes rate16/16 * min(n, sat) instructions
// per cycle in total (ls_rate16/ls_sat for the LS task, b_rate16/b_sat for
// the batch task): beyond `sat` SMs a task gains nothing, as a memory-bound
// kernel would; sat >= NUM_SM models a compute-bound kernel. Fractions are spread over the
// cycles with a per-SM accumulator, so the counts are deterministic. A
// gated SM, and an SM whose thread blocks are being swapped, emits nothing.
// A move request is accepted swap_lat cycles after it is raised.
module gpu_model
  import smqos_pkg::*;
#(
  parameter int unsigned NUM_SM = 16,
  parameter int unsigned INST_W = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  int unsigned               ls_rate16,
  input  int unsigned               ls_sat,
  input  int unsigned               b_rate16,
  input  int unsigned               b_sat,
  input  int unsigned               swap_lat,
  input  owner_e                    sm_owner [NUM_SM],
  input  logic                      swap_valid,
  input  logic [$clog2(NUM_SM)-1:0] swap_sm,
  output logic                      swap_ready,
  output logic [INST_W-1:0]         sm_inst [NUM_SM]
);
  int unsigned acc [NUM_SM];
  int unsigned wait_c;
  int unsigned nb, nl, b_per16, l_per16;

  always_comb begin
    nb = 0;
    nl = 0;
    for (int i = 0; i < NUM_SM; i++) begin
      if (sm_owner[i] == OWN_BATCH) nb++;
      if (sm_owner[i] == OWN_LS) nl++;
    end
    b_per16 = (nb == 0) ? 0 : (b_rate16 * ((nb < b_sat) ? nb : b_sat)) / nb;
    l_per16 = (nl == 0) ? 0 : (ls_rate16 * ((nl < ls_sat) ? nl : ls_sat)) / nl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SM; i++) begin
        acc[i]     <= 0;
        sm_inst[i] <= '0;
      end
      wait_c     <= 0;
      swap_ready <= 1'b0;
    end else begin
      for (int i = 0; i < NUM_SM; i++) begin
        int unsigned r, a;
        r = 0;
        if (sm_owner[i] == OWN_LS) r = l_per16;
        else if (sm_owner[i] == OWN_BATCH) r = b_per16;
        if (swap_valid && swap_sm == $clog2(NUM_SM)'(i)) r = 0;
        a = acc[i] + r;
        sm_inst[i] <= INST_W'(a >> 4);
        acc[i]     <= a & 15;
      end
      swap_ready <= 1'b0;
      if (swap_valid && !swap_ready) begin
        if (wait_c + 1 >= swap_lat) begin
          swap_ready <= 1'b1;
          wait_c     <= 0;
        end else begin
          wait_c <= wait_c + 1;
        end
      end
    end
  end
endmodule
