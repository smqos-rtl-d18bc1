// tb_sm_manager: self-checking test of the SM Manager (slots + PDM + DSMA).
//
// Checks the task-slot logic (a kernel is popped only into an empty slot,
// start pulses, init, co_run, kernel_done) and the epoch chain: an IPC
// report produces a decision after the PDM divisions, with the running
// average and Algorithm 1 outcome worked out here. An LS kernel at half
// its target must ask for an SM; one far above its target must give one
// up, and with no batch history that SM goes to the batch task. No
// decision may come while only one slot is filled.
module tb_sm_manager;
  import smqos_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ls_valid, ls_pop, b_valid, b_pop, kernel_done_ls, kernel_done_b;
  logic [4:0] ls_kid, b_kid, slot_ls_kid, slot_b_kid;
  logic slot_ls_active, slot_b_active, ls_start, b_start, co_run, init;
  ipc_t ipc_target, ipc_ls, ipc_batch, ipc_ave_ls, ipc_ave_b, ipc_last;
  logic ipc_valid, dec_valid, upper_k, lower_k, bound_eval;
  smcnt_t sm_ls, sm_batch, sm_gated, opt_k;
  decision_t dec;
  logic [NEP_W-1:0] nep_ls, nep_b;
  logic [3:0] swap_flags;

  sm_manager #(.NUM_KERNELS(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Report one epoch and wait for the decision (or for none).
  task automatic report(input int l, input int b, output bit got);
    int w;
    ipc_ls = ipc_t'(l); ipc_batch = ipc_t'(b); ipc_valid = 1;
    @(posedge clk); #1; ipc_valid = 0;
    w = 0; got = 0;
    while (w < 120 && !got) begin
      if (dec_valid) got = 1;
      else begin @(posedge clk); #1; w++; end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit got;
    ls_valid = 0; b_valid = 0; ls_kid = '0; b_kid = '0; kernel_done_ls = 0; kernel_done_b = 0;
    ipc_target = ipc_t'(640); ipc_ls = '0; ipc_batch = '0; ipc_valid = 0;
    sm_ls = 8'd8; sm_batch = 8'd8; sm_gated = 8'd0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(!slot_ls_active && !slot_b_active && !co_run, "slots empty after reset");
    // LS kernel 3 arrives
    ls_valid = 1; ls_kid = 5'd3; #1;
    chk(ls_pop, "pop LS into an empty slot");
    @(posedge clk); #1; ls_valid = 0;
    chk(slot_ls_active && slot_ls_kid == 3 && ls_start && init && !co_run, "LS slot filled");
    // a report now (one slot only) gives no decision
    report(320, 100, got);
    chk(!got, "no decision with one slot");
    // batch kernel 7 arrives; LS pool holds kernel 4, which must wait
    b_valid = 1; b_kid = 5'd7; ls_valid = 1; ls_kid = 5'd4; #1;
    chk(b_pop && !ls_pop, "pop batch only");
    @(posedge clk); #1; b_valid = 0;
    chk(slot_b_active && slot_b_kid == 7 && b_start && init, "batch slot filled");
    @(posedge clk); #1;
    chk(co_run && !init, "co-running");
    // LS at half its target: swap-in (history restarted by ls_start? no: LS ran alone)
    report(320, 100, got);
    chk(got && dec.ls == LS_SWAP_IN, "LS below target asks for an SM");
    chk(nep_ls == 2 && ipc_ave_ls == 320, $sformatf("LS average %0d over %0d", ipc_ave_ls, nep_ls));
    chk(nep_b == 1, "batch history restarted at its start");
    // LS far above its target: swap-out; no batch history, so batch swap-in.
    report(2000, 100, got);
    chk(got && dec.ls == LS_SWAP_OUT && dec.batch == B_SWAP_IN, "LS gives up an SM to the batch task");
    chk(swap_flags == 4'b0110, "swap flags");
    chk(ipc_last == 100, "IPC_last recorded");
    // batch IPC unchanged after its swap-in: upper bound; LS gives up another SM,
    // batch (upper set, lower clear) gives one of its own up too.
    report(2000, 100, got);
    chk(got && upper_k && !lower_k, "upper bound after a useless swap-in");
    chk(dec.ls == LS_SWAP_OUT && dec.batch == B_SWAP_OUT, "batch swaps out");
    // batch IPC kept after its swap-out: lower bound, opt_k = its SM count, frozen.
    sm_batch = 8'd5;
    report(2000, 99, got);
    chk(got && upper_k && lower_k && opt_k == 5, "lower bound after a harmless swap-out");
    chk(dec.ls == LS_SWAP_OUT && dec.batch == B_GATE, "both bounds: freed SM gated");
    // LS kernel finishes; kernel 4 takes its slot at once.
    kernel_done_ls = 1; @(posedge clk); #1; kernel_done_ls = 0;
    chk(!slot_ls_active && !co_run, "LS slot freed");
    #1; chk(ls_pop, "next LS kernel popped");
    @(posedge clk); #1; ls_valid = 0;
    chk(slot_ls_active && slot_ls_kid == 4 && ls_start, "kernel 4 started");
    @(posedge clk); #1;
    chk(nep_ls == 0 && ipc_ave_ls == 0, "LS history cleared");
    chk(upper_k && lower_k && opt_k == 5 && nep_b != 0, "batch history kept when only the LS kernel changes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
