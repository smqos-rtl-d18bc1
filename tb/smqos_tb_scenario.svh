// smqos_tb_scenario.svh: stimulus of the end-to-end SMQoS testbenches,
// included after smqos_tb_body.svh; NEPOCH is the number of epochs per
// phase. Six phases: LS kernel slow, fast, slow again; a memory-bound batch
// kernel; SM moves slower than an epoch; a new LS kernel. Every mechanism
// counted by the body must occur at least once.

  initial begin
    #(64'd10 * EPC * (8 * NEPOCH + 40));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_ls_a, t_ls_b;
    qos_wr_en = 0; qos_wr_kid = '0; qos_wr_target = '0; launch_valid = 0; launch_kid = '0;
    kernel_done_ls = 0; kernel_done_b = 0;
    tot_l = 0; tot_b = 0; cyc = 0; since_end = 0; m_ave = 0; m_n = 0;
    m_opt = 0; m_up = 0; m_lo = 0; m_pend = 0; m_pin = 0; m_last = 0;
    move_check = 0; rec_seen = 0; e_ipc_l = 0; e_ipc_b = 0;
    c_in_gated = 0; c_in_batch = 0; c_out = 0; c_bin = 0; c_bout = 0; c_gate = 0;
    c_up = 0; c_lo = 0; c_frozen = 0; c_split = 0; c_drop = 0; c_lspool = 0; c_bpool = 0;
    c_epochs = 0;
    // LS kernel 3 needs NSM/2+1 SMs at 2 instructions per SM per cycle.
    t_ls_a = (NSM / 2 + 1) * 2 * 64;
    tgt = t_ls_a;
    ls_rate16 = 32; ls_sat = NSM; b_rate16 = 32; b_sat = NSM / 2 - 1; swap_lat = 40;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    set_qos(3, t_ls_a);
    set_qos(5, t_ls_a);
    launch(3);           // LS
    launch(7);           // batch, saturates at NSM/2-1 SMs
    launch(5);           // LS, waits in the pool
    launch(9);           // batch, waits in the pool
    // Phase A: LS below target -> takes SMs from the batch task.
    epochs(NEPOCH);
    // Phase B: LS fast -> gives SMs back; batch searches its optimum, then gating.
    ls_rate16 = 64;
    epochs(NEPOCH);
    // Phase C: LS slow again -> takes gated SMs first.
    ls_rate16 = 32;
    epochs(NEPOCH);
    // Phase D: new batch kernel that gains nothing beyond one SM.
    kernel_done_b = 1; @(posedge clk); #1; kernel_done_b = 0;
    b_sat = 1;
    ls_rate16 = 64;
    epochs(NEPOCH);
    // Phase E: slow SM moves; decisions arriving while a move is pending are dropped.
    ls_rate16 = 24;
    swap_lat = EPC + EPC / 2;
    epochs(NEPOCH / 2);
    swap_lat = 40;
    epochs(2);
    // Phase F: a new LS kernel with a lower target.
    t_ls_b = (NSM / 2) * 64;
    set_qos(5, t_ls_b);
    kernel_done_ls = 1; @(posedge clk); #1; kernel_done_ls = 0;
    tgt = t_ls_b;
    ls_rate16 = 32;
    epochs(NEPOCH / 2);
    chk(slot_ls_kid == 5 && slot_b_kid == 9, "kernels from the pools");

    $display("epochs=%0d ls_in_gated=%0d ls_in_batch=%0d ls_out=%0d b_in=%0d b_out=%0d gate=%0d",
             c_epochs, c_in_gated, c_in_batch, c_out, c_bin, c_bout, c_gate);
    $display("upper=%0d lower=%0d frozen=%0d resplit=%0d dropped=%0d ls_pool=%0d b_pool=%0d",
             c_up, c_lo, c_frozen, c_split, c_drop, c_lspool, c_bpool);
    chk(c_in_gated > 0, "LS swap-in from a gated SM");
    chk(c_in_batch > 0, "LS swap-in from the batch task");
    chk(c_out > 0, "LS swap-out");
    chk(c_bin > 0, "batch swap-in");
    chk(c_bout > 0, "batch swap-out");
    chk(c_gate > 0, "freed SM gated");
    chk(c_up > 0 && c_lo > 0 && c_frozen > 0, "bound search reached both bounds");
    chk(c_split > 0, "re-split on a new kernel");
    chk(c_drop > 0, "decision dropped while moving");
    chk(c_lspool > 0 && c_bpool > 0, "both pools used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
