// tb_smqos_top: end-to-end test of smqos_top at reduced size (8 SMs,
// 200-cycle epochs, 20 epochs per phase). See smqos_tb_body.svh for what
// is driven and checked.
module tb_smqos_top;
  localparam int NSM = 8, EPC = 200, IW = 7, NEPOCH = 20;
`include "smqos_tb_body.svh"
`include "smqos_tb_scenario.svh"

  smqos_top #(.NUM_SM(NSM), .EPOCH_CYCLES(EPC), .INST_W(IW)) dut (.*);
endmodule
