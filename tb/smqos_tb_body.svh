// smqos_tb_body.svh: shared body of the end-to-end SMQoS testbenches.
//
// The including module declares NSM, EPC (epoch cycles) and IW (instruction
// count width), instantiates smqos_top as `dut` on the signals declared
// here and supplies the stimulus (smqos_tb_scenario.svh or its own). This
// part closes the loop with gpu_model and checks the whole chain against
// its own reference:
//  - per-epoch instruction totals of each task -> expected IPC (Q10.6)
//  - running average, Algorithm 1, Algorithm 2 and the bound search ->
//    expected decision for every epoch
//  - SM counts after the moves of each decision, the gate vector, the
//    decision latency after epoch_end
// and counts every mechanism (LS swap-in from a gated SM and from the
// batch task, LS swap-out, batch swap-in / swap-out, gating, upper and
// lower bound, freeze of opt_k, re-split on a new kernel, dropped
// decision, both pools used).

  import smqos_pkg::*;

  localparam int TH_T = 13;
  localparam int DC_NW  = $clog2(NSM * ((1 << IW) - 1) * EPC + 1) + IPC_FRAC;
  localparam int PDM_NW = IPC_W + NEP_W + 1;
  localparam int DEC_LAT = 2 * (DC_NW + 2) + 2 * (PDM_NW + 2) + 8;
  localparam int KW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic qos_wr_en, launch_valid, launch_ready, kernel_done_ls, kernel_done_b;
  logic [KW-1:0] qos_wr_kid, launch_kid, slot_ls_kid, slot_b_kid;
  ipc_t qos_wr_target;
  logic slot_ls_active, slot_b_active, ls_start, b_start;
  logic [IW-1:0] sm_inst [NSM];
  logic swap_valid, swap_ready;
  logic [$clog2(NSM)-1:0] swap_sm;
  owner_e swap_to;
  owner_e sm_owner [NSM];
  logic [NSM-1:0] sm_gate;
  smcnt_t sm_ls, sm_batch, sm_gated, opt_k;
  logic epoch_end, ipc_valid, dec_valid, upper_k, lower_k, bound_eval, dec_dropped, alloc_busy;
  ipc_t ipc_ls, ipc_batch, ipc_ave_ls, ipc_ave_b, ipc_last;
  logic [NEP_W-1:0] nep_ls, nep_b;
  decision_t dec;
  logic [3:0] swap_flags;
  logic [31:0] ls_vec;

  int unsigned ls_rate16, ls_sat, b_rate16, b_sat, swap_lat;

  gpu_model #(.NUM_SM(NSM), .INST_W(IW)) u_gpu (
    .clk, .rst_n, .ls_rate16, .ls_sat, .b_rate16, .b_sat, .swap_lat,
    .sm_owner, .swap_valid, .swap_sm, .swap_ready, .sm_inst
  );

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------- reference model ----------------
  longint tot_l, tot_b, e_ipc_l, e_ipc_b;
  int cyc, since_end;
  longint m_ave, m_n;
  int m_opt, m_last;
  bit m_up, m_lo, m_pend, m_pin;
  int tgt;                     // IPC target of the running LS kernel
  int snap_l, snap_b, snap_g;  // counts the PDM snapshots
  int exp_l, exp_b, exp_g;     // counts expected after the moves
  bit move_check;
  bit rec_seen;

  // mechanism counters
  int c_in_gated, c_in_batch, c_out, c_bin, c_bout, c_gate, c_up, c_lo, c_frozen;
  int c_split, c_drop, c_lspool, c_bpool, c_epochs;

  wire running = slot_ls_active && slot_b_active && !(ls_start || b_start);

  function automatic longint ipc_of(input longint t);
    longint q;
    q = (t * 64) / EPC;
    return (q > 65535) ? 65535 : q;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // instruction totals, as the DUT sees them this cycle
      if (running) begin
        for (int i = 0; i < NSM; i++) begin
          if (sm_owner[i] == OWN_LS) tot_l += sm_inst[i];
          else if (sm_owner[i] == OWN_BATCH) tot_b += sm_inst[i];
        end
        chk(epoch_end == (cyc == EPC - 1), "epoch_end period");
        if (cyc == EPC - 1) begin
          e_ipc_l = ipc_of(tot_l);
          e_ipc_b = ipc_of(tot_b);
          tot_l = 0; tot_b = 0; cyc = 0; since_end = 0;
          c_epochs++;
        end else cyc++;
      end else begin
        tot_l = 0; tot_b = 0; cyc = 0;
      end
      since_end++;

      if (ls_start) begin m_ave = 0; m_n = 0; end
      if (b_start) begin m_opt = 0; m_up = 0; m_lo = 0; m_pend = 0; end
      if (ls_start || b_start) begin
        c_split++;
        move_check = 0;
      end

      // structural invariants
      chk(int'(sm_ls) + int'(sm_batch) + int'(sm_gated) == NSM, "counts add up");

      if (ipc_valid) begin
        chk(longint'(ipc_ls) == e_ipc_l, $sformatf("ipc_ls %0d exp %0d", ipc_ls, e_ipc_l));
        chk(longint'(ipc_batch) == e_ipc_b, $sformatf("ipc_b %0d exp %0d", ipc_batch, e_ipc_b));
        snap_l = sm_ls; snap_b = sm_batch; snap_g = sm_gated;
        m_ave = (m_ave * m_n + e_ipc_l) / (m_n + 1);
        m_n++;
        rec_seen = 1;
      end

      if (dec_valid) begin
        int el, eb;
        bit ev;
        chk(rec_seen, "decision follows a record");
        rec_seen = 0;
        chk(since_end <= DEC_LAT, $sformatf("decision latency %0d > %0d", since_end, DEC_LAT));
        chk(longint'(ipc_ave_ls) == m_ave, $sformatf("ave %0d exp %0d", ipc_ave_ls, m_ave));
        ev = m_pend && !(m_up && m_lo);
        if (ev) begin
          if (m_pin ? (e_ipc_b * 256 <= m_last * (256 + TH_T)) : (e_ipc_b * 256 < m_last * (256 - TH_T))) begin
            m_up = 1; c_up++;
          end else begin
            m_lo = 1; m_opt = snap_b; c_lo++;
          end
          if (m_up && m_lo) c_frozen++;
        end
        el = 0;
        if (m_ave < tgt || e_ipc_l < tgt) begin
          if (snap_g > 0 || snap_b > 1) el = 1;
        end else if (m_ave * m_n > longint'(tgt) * (m_n + 1) && e_ipc_l > tgt) begin
          if (snap_l > 1) el = 2;
        end
        eb = 0;
        if (el == 2) begin
          if (snap_b < m_opt) eb = 1;
          else if (!m_up) eb = 1;
          else if (!m_lo && snap_b > 1) eb = 2;
        end
        m_pend = (eb != 0); m_pin = (eb == 1);
        if (eb != 0) m_last = int'(e_ipc_b);
        chk(int'(dec.ls) == el, $sformatf("LS action %0d exp %0d", dec.ls, el));
        chk(int'(dec.batch) == eb, $sformatf("batch action %0d exp %0d", dec.batch, eb));
        chk(int'(opt_k) == m_opt && upper_k == m_up && lower_k == m_lo, "bound registers");
        if (el == 1) begin if (snap_g > 0) c_in_gated++; else c_in_batch++; end
        if (el == 2) c_out++;
        if (eb == 1) c_bin++;
        if (eb == 2) c_bout++;
        if (el == 2 && eb == 0) c_gate++;
        // expected counts once the moves are done
        exp_l = snap_l; exp_b = snap_b; exp_g = snap_g;
        if (el == 1) begin exp_l++; if (snap_g > 0) exp_g--; else exp_b--; end
        if (el == 2) begin
          exp_l--;
          if (eb == 1) exp_b++; else exp_g++;
          if (eb == 2) begin exp_b--; exp_g++; end
        end
        move_check = 1;
      end
      if (dec_dropped) begin
        c_drop++;
        move_check = 0;
      end
      if (move_check && !alloc_busy && !dec_valid) begin
        #0;
        chk(int'(sm_ls) == exp_l && int'(sm_batch) == exp_b && int'(sm_gated) == exp_g,
            $sformatf("counts after moves %0d/%0d/%0d exp %0d/%0d/%0d",
                      sm_ls, sm_batch, sm_gated, exp_l, exp_b, exp_g));
        move_check = 0;
      end
      for (int i = 0; i < NSM; i++)
        if (!(swap_valid && int'(swap_sm) == i))
          chk(sm_gate[i] == (sm_owner[i] == OWN_GATED), "gate follows owner");
    end
  end

  task automatic set_qos(input int kid, input int target);
    qos_wr_en = 1; qos_wr_kid = KW'(kid); qos_wr_target = ipc_t'(target);
    @(posedge clk); #1; qos_wr_en = 0;
  endtask

  task automatic launch(input int kid);
    launch_valid = 1; launch_kid = KW'(kid);
    #1;
    chk(launch_ready, "pool has room");
    if (ls_vec[kid]) c_lspool++; else c_bpool++;
    @(posedge clk); #1; launch_valid = 0;
  endtask

  task automatic epochs(input int n);
    repeat (n * EPC) @(posedge clk);
    #1;
  endtask

