// sm_alloc_table: SM ownership table of the extended TB scheduler.
//
// Holds, for every SM, whether it belongs to the LS task, to the batch task
// or is free; free SMs are power gated (sm_gate). At reset and on `init`
// the SMs are split evenly: the lower half to the LS task, the upper half
// to the batch task. A decision from the DSMA (dec_valid) is turned into
// one or two SM moves, carried out one at a time:
//   LS swap-in  : lowest-numbered gated SM -> LS (idle SMs first);
//                 if none is gated, highest-numbered batch SM -> LS
//   LS swap-out : highest-numbered LS SM -> batch (batch swap-in) or
//                 -> gated (otherwise)
//   batch swap-out (after an LS swap-out): highest-numbered batch SM -> gated
// Each move is a request to the GPU's TB scheduler, which swaps the thread
// blocks out of / into the SM: swap_valid, swap_sm and swap_to hold until
// swap_ready, and the table entry changes on that handshake. An SM that is
// being woken has its gate released as soon as the request is raised. A
// decision that arrives while a move is still pending is dropped
// (dec_dropped pulses). sm_ls, sm_batch and sm_gated count the entries.
//
// From the document: idle SMs are taken first, only one SM moves per task
// per epoch, the even initial split, power gating of SMs no task keeps.
// Own choices: which SM of a set is picked, the request/ready handshake,
// gating every free SM, dropping a decision while busy.
module sm_alloc_table
  import smqos_pkg::*;
#(
  parameter int unsigned NUM_SM = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  logic                      dec_valid,
  input  decision_t                 dec,
  output logic                      swap_valid,
  output logic [$clog2(NUM_SM)-1:0] swap_sm,
  output owner_e                    swap_to,
  input  logic                      swap_ready,
  output owner_e                    sm_owner [NUM_SM],
  output logic [NUM_SM-1:0]         sm_gate,
  output smcnt_t                    sm_ls,
  output smcnt_t                    sm_batch,
  output smcnt_t                    sm_gated,
  output logic                      busy,
  output logic                      dec_dropped
);
  localparam int unsigned IW = $clog2(NUM_SM);

  owner_e       own_r [NUM_SM];
  logic         b_out_pend;     // batch swap-out still to be issued

  // Candidate SMs.
  logic          has_gated, has_batch, has_ls;
  logic [IW-1:0] first_gated, last_batch, last_ls;
  always_comb begin
    has_gated = 1'b0; has_batch = 1'b0; has_ls = 1'b0;
    first_gated = '0; last_batch = '0; last_ls = '0;
    sm_ls = '0; sm_batch = '0; sm_gated = '0;
    for (int i = NUM_SM - 1; i >= 0; i--) begin
      if (own_r[i] == OWN_GATED) begin
        has_gated   = 1'b1;
        first_gated = IW'(i);
      end
    end
    for (int i = 0; i < NUM_SM; i++) begin
      unique case (own_r[i])
        OWN_LS:    begin has_ls = 1'b1;    last_ls = IW'(i);    sm_ls    = sm_ls + 1'b1;    end
        OWN_BATCH: begin has_batch = 1'b1; last_batch = IW'(i); sm_batch = sm_batch + 1'b1; end
        default:   sm_gated = sm_gated + 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SM; i++) own_r[i] <= (i < NUM_SM / 2) ? OWN_LS : OWN_BATCH;
      swap_valid  <= 1'b0;
      swap_sm     <= '0;
      swap_to     <= OWN_GATED;
      b_out_pend  <= 1'b0;
      dec_dropped <= 1'b0;
    end else if (init) begin
      for (int i = 0; i < NUM_SM; i++) own_r[i] <= (i < NUM_SM / 2) ? OWN_LS : OWN_BATCH;
      swap_valid  <= 1'b0;
      b_out_pend  <= 1'b0;
      dec_dropped <= 1'b0;
    end else begin
      dec_dropped <= 1'b0;
      if (swap_valid) begin
        if (swap_ready) begin
          own_r[swap_sm] <= swap_to;
          swap_valid     <= 1'b0;
        end
      end else if (b_out_pend) begin
        b_out_pend <= 1'b0;
        if (has_batch) begin
          swap_valid <= 1'b1;
          swap_sm    <= last_batch;
          swap_to    <= OWN_GATED;
        end
      end else if (dec_valid) begin
        unique case (dec.ls)
          LS_SWAP_IN: begin
            if (has_gated) begin
              swap_valid <= 1'b1;
              swap_sm    <= first_gated;
              swap_to    <= OWN_LS;
            end else if (has_batch) begin
              swap_valid <= 1'b1;
              swap_sm    <= last_batch;
              swap_to    <= OWN_LS;
            end
          end
          LS_SWAP_OUT: begin
            if (has_ls) begin
              swap_valid <= 1'b1;
              swap_sm    <= last_ls;
              swap_to    <= (dec.batch == B_SWAP_IN) ? OWN_BATCH : OWN_GATED;
              b_out_pend <= (dec.batch == B_SWAP_OUT);
            end
          end
          default: ;
        endcase
      end
      if (dec_valid && (swap_valid || b_out_pend)) dec_dropped <= 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_SM; i++) begin
      sm_owner[i] = own_r[i];
      sm_gate[i]  = (own_r[i] == OWN_GATED) &&
                    !(swap_valid && swap_sm == IW'(i) && swap_to != OWN_GATED);
    end
  end

  assign busy = swap_valid || b_out_pend;

  // A raised request holds its SM and destination until it is accepted.
  a_swap_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
    swap_valid && !swap_ready |=> swap_valid && $stable(swap_sm) && $stable(swap_to));
endmodule
