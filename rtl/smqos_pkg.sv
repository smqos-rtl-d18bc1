// smqos_pkg: types and constants shared by the SMQoS control blocks.
//
// IPC values are unsigned fixed point, IPC_W bits wide with IPC_FRAC fraction
// bits (Q10.6 by default: 0 .. 1023.98 instructions per cycle). The 16-bit
// width follows the document's 16-bit IPC registers; the split between integer
// and fraction bits is this design's choice. The SM counters are 8 bits wide,
// also as in the document. Two task slots co-run: one latency-sensitive (LS)
// and one batch task, the configuration the document evaluates.
package smqos_pkg;

  localparam int unsigned IPC_W    = 16;  // IPC register width (document: 16-bit)
  localparam int unsigned IPC_FRAC = 6;   // fraction bits of an IPC value (own choice)
  localparam int unsigned SMC_W    = 8;   // SM count register width (document: 8-bit)
  localparam int unsigned NEP_W    = 16;  // epoch counter width (own choice)
  localparam int unsigned TH_W     = 8;   // threshold is TH / 2**TH_W (own choice)

  typedef logic [IPC_W-1:0] ipc_t;
  typedef logic [SMC_W-1:0] smcnt_t;

  // Owner of one SM. Free SMs are always power gated.
  typedef enum logic [1:0] {
    OWN_GATED = 2'd0,
    OWN_LS    = 2'd1,
    OWN_BATCH = 2'd2
  } owner_e;

  // What the LS task does this epoch (Algorithm 1).
  typedef enum logic [1:0] {
    LS_KEEP     = 2'd0,
    LS_SWAP_IN  = 2'd1,
    LS_SWAP_OUT = 2'd2
  } ls_act_e;

  // What the batch task does with the SM the LS task freed (Algorithm 2).
  typedef enum logic [1:0] {
    B_GATE     = 2'd0,  // neither: the freed SM is power gated
    B_SWAP_IN  = 2'd1,  // the freed SM goes to the batch task
    B_SWAP_OUT = 2'd2   // the freed SM and one batch SM are power gated
  } b_act_e;

  typedef struct packed {
    ls_act_e ls;
    b_act_e  batch;
  } decision_t;

endpackage
