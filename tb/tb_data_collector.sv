// tb_data_collector: self-checking test of the Data Collector.
//
// Four SMs with random per-cycle instruction counts and owners that change
// at random; the testbench keeps its own per-task totals over each
// 100-cycle epoch and checks, for every epoch, that epoch_end pulses on the
// epoch's last cycle, that ipc_valid follows within the divider latency,
// and that ipc_ls / ipc_batch equal floor(total*64/100), saturated to 16
// bits (one phase drives large counts to reach saturation). Also checks
// that `run` low holds the counters in reset.
module tb_data_collector;
  import smqos_pkg::*;

  localparam int NSM = 4, EP = 100, IW = 9;
  localparam int ACC_W = $clog2(NSM * ((1 << IW) - 1) * EP + 1);
  localparam int LAT = 2 * (ACC_W + IPC_FRAC) + 6;

  logic clk = 1'b0, rst_n = 1'b0, run;
  always #5 clk = ~clk;
  logic [IW-1:0] sm_inst [NSM];
  owner_e sm_owner [NSM];
  logic epoch_end, ipc_valid;
  ipc_t ipc_ls, ipc_batch;

  data_collector #(.NUM_SM(NSM), .EPOCH_CYCLES(EP), .INST_W(IW)) dut (.*);

  int checks = 0, failures = 0;
  longint tot_ls, tot_b, exp_ls[$], exp_b[$];
  int cyc_in_epoch, since_end, n_sat = 0, n_epochs = 0;
  bit big;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint sat(input longint t);
    longint q = (t * 64) / EP;
    return (q > 65535) ? 65535 : q;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus and reference, sampled on each rising edge.
  always @(posedge clk) begin
    if (rst_n && run) begin
      for (int i = 0; i < NSM; i++) begin
        if (sm_owner[i] == OWN_LS) tot_ls += sm_inst[i];
        if (sm_owner[i] == OWN_BATCH) tot_b += sm_inst[i];
      end
      chk(epoch_end == (cyc_in_epoch == EP - 1), "epoch_end on the last cycle");
      if (cyc_in_epoch == EP - 1) begin
        exp_ls.push_back(sat(tot_ls));
        exp_b.push_back(sat(tot_b));
        if (sat(tot_ls) == 65535 || sat(tot_b) == 65535) n_sat++;
        tot_ls = 0; tot_b = 0; cyc_in_epoch = 0;
        since_end = 0;
      end else cyc_in_epoch++;
    end
    if (ipc_valid) begin
      n_epochs++;
      chk(exp_ls.size() > 0, "ipc_valid matches an epoch");
      if (exp_ls.size() > 0) begin
        longint el, eb;
        el = exp_ls.pop_front();
        eb = exp_b.pop_front();
        chk(longint'(ipc_ls) == el, $sformatf("ipc_ls %0d exp %0d", ipc_ls, el));
        chk(longint'(ipc_batch) == eb, $sformatf("ipc_batch %0d exp %0d", ipc_batch, eb));
        chk(since_end <= LAT, $sformatf("latency %0d <= %0d", since_end, LAT));
      end
    end
    since_end++;
    // new random inputs after the edge
    #1;
    for (int i = 0; i < NSM; i++) begin
      sm_inst[i] = big ? IW'((1 << IW) - 1 - $urandom_range(0, 3)) : IW'($urandom_range(0, 64));
      if ($urandom_range(0, 49) == 0) sm_owner[i] = owner_e'($urandom_range(0, 2));
    end
  end

  initial begin
    run = 1'b0; big = 1'b0; tot_ls = 0; tot_b = 0; cyc_in_epoch = 0; since_end = 0;
    for (int i = 0; i < NSM; i++) begin
      sm_inst[i] = '0;
      sm_owner[i] = (i < 2) ? OWN_LS : OWN_BATCH;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) @(posedge clk);
    #2 run = 1'b1;
    repeat (EP * 12) @(posedge clk);
    #2 big = 1'b1;
    repeat (EP * 3) @(posedge clk);
    #2 big = 1'b0;
    repeat (EP * 2 + LAT) @(posedge clk);
    // stop mid-epoch: counters restart from zero
    #2 run = 1'b0;
    tot_ls = 0; tot_b = 0; cyc_in_epoch = 0;
    repeat (LAT + 5) @(posedge clk);
    #2 run = 1'b1;
    repeat (EP * 2 + LAT) @(posedge clk);
    chk(exp_ls.size() == 0, "every epoch reported");
    chk(n_sat > 0, "saturation reached");
    chk(n_epochs >= 18, $sformatf("epochs reported %0d", n_epochs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
