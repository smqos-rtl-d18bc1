// tb_smqos_mixes: the evaluated task mixes, run on smqos_top at its
// default sizes (16 SMs, 10000-cycle epochs).
//
// Task models (in gpu_model): a compute-intensive (CI) kernel completes 2
// instructions per cycle per SM and keeps scaling with SMs; a
// memory-intensive (MI) kernel completes 1 per cycle per SM but stops
// gaining beyond 4 SMs. Each of the four mix categories (LS-batch: CI-CI,
// CI-MI, MI-CI, MI-MI) is run for 2M cycles (200 epochs) under each QoS
// policy of 80, 85, 90 and 95% of the LS kernel's isolated IPC (its IPC
// alone on all 16 SMs), 16 co-runs in all, each with fresh kernels taken
// through the task pools. The reference checker of smqos_tb_body.svh checks
// every epoch IPC, average and decision. At the end of each co-run the
// testbench reports whether the LS kernel's average IPC met its target and
// how the SMs are split, and checks:
//  - the target is met wherever it can be met (it needs at most 15 SMs,
//    since the batch kernel keeps one);
//  - with an MI batch kernel and an LS kernel that leaves it at least 5
//    SMs, both bounds are found and some SMs end power gated (the search
//    explores around the starting split, so a batch kernel that starts
//    above its useful SM count may keep part of the excess);
//  - a CI batch kernel ends with no gated SM while the LS kernel is met.
module tb_smqos_mixes;
  localparam int NSM = 16, EPC = 10000, IW = 7;
  localparam int RUN_EPOCHS = 200;
`include "smqos_tb_body.svh"

  smqos_top dut (.*);

  initial begin
    #(64'd10 * EPC * (16 * (RUN_EPOCHS + 2) + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, lsk, bk, iso, t, pol, need, reached;
    bit ls_ci, b_ci;
    string nm;
    qos_wr_en = 0; qos_wr_kid = '0; qos_wr_target = '0; launch_valid = 0; launch_kid = '0;
    kernel_done_ls = 0; kernel_done_b = 0;
    tot_l = 0; tot_b = 0; cyc = 0; since_end = 0; m_ave = 0; m_n = 0;
    m_opt = 0; m_up = 0; m_lo = 0; m_pend = 0; m_pin = 0; m_last = 0;
    move_check = 0; rec_seen = 0; e_ipc_l = 0; e_ipc_b = 0;
    c_in_gated = 0; c_in_batch = 0; c_out = 0; c_bin = 0; c_bout = 0; c_gate = 0;
    c_up = 0; c_lo = 0; c_frozen = 0; c_split = 0; c_drop = 0; c_lspool = 0; c_bpool = 0;
    c_epochs = 0; tgt = 0; reached = 0;
    ls_rate16 = 32; ls_sat = NSM; b_rate16 = 32; b_sat = NSM; swap_lat = 40;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    r = 0;
    for (int mix = 0; mix < 4; mix++) begin
      ls_ci = (mix < 2);
      b_ci  = (mix % 2 == 0);
      nm = {ls_ci ? "CI" : "MI", "-", b_ci ? "CI" : "MI"};
      for (pol = 80; pol <= 95; pol += 5) begin
        lsk = 2 * r; bk = 2 * r + 1;
        // end the previous co-run
        if (r > 0) begin
          kernel_done_ls = 1; kernel_done_b = 1;
          @(posedge clk); #1;
          kernel_done_ls = 0; kernel_done_b = 0;
        end
        ls_rate16 = ls_ci ? 32 : 16;  ls_sat = ls_ci ? NSM : 4;
        b_rate16  = b_ci  ? 32 : 16;  b_sat  = b_ci  ? NSM : 4;
        iso = ls_rate16 * ((ls_sat < NSM) ? ls_sat : NSM) * 4;       // isolated IPC, Q10.6
        t = (iso * pol) / 100;
        need = (t + ls_rate16 * 4 - 1) / (ls_rate16 * 4);           // SMs the target needs
        set_qos(lsk, t);
        tgt = t;
        launch(lsk);
        launch(bk);
        repeat (3) @(posedge clk);
        #1;
        chk(slot_ls_kid == lsk && slot_b_kid == bk, "co-run kernels in their slots");
        epochs(RUN_EPOCHS);
        $display("%s policy %0d%%: target %0d, LS average %0d (%s), SMs LS/batch/gated %0d/%0d/%0d, opt_k %0d",
                 nm, pol, t, ipc_ave_ls, (ipc_ave_ls >= t) ? "met" : "missed",
                 sm_ls, sm_batch, sm_gated, opt_k);
        if (ipc_ave_ls >= t) reached++;
        if (need <= NSM - 1) chk(int'(ipc_ave_ls) >= t, {nm, " QoS met where reachable"});
        if (!b_ci && need <= NSM - 5) chk(sm_gated > 0, {nm, " MI batch: spare SMs gated"});
        if (!b_ci && need <= NSM - 5) chk(opt_k != 0 && upper_k && lower_k, {nm, " MI batch: opt_k found"});
        if (b_ci && need <= NSM - 1) chk(sm_gated == 0, {nm, " CI batch: no SM left idle"});
        r++;
      end
    end
    $display("QoS reached in %0d of 16 co-runs; epochs=%0d ls_in=%0d ls_out=%0d b_in=%0d b_out=%0d gate=%0d",
             reached, c_epochs, c_in_gated + c_in_batch, c_out, c_bin, c_bout, c_gate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
