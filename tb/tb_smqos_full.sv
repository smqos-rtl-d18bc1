// tb_smqos_full: end-to-end test of smqos_top with every parameter at its
// default (16 SMs, 10000-cycle epochs), about 2M cycles in all, the length
// of one co-run in the evaluation this design targets. See
// smqos_tb_body.svh for what is driven and checked.
module tb_smqos_full;
  localparam int NSM = 16, EPC = 10000, IW = 7, NEPOCH = 40;
`include "smqos_tb_body.svh"
`include "smqos_tb_scenario.svh"

  smqos_top dut (.*);
endmodule
