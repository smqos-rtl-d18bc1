// tb_dsma: self-checking test of the DSMA decision logic.
//
// Drives epoch records into dsma and compares every decision and the bound
// registers with a reference model written here in plain integer
// arithmetic: Algorithm 1 for the LS task, Algorithm 2 for the batch task
// and the upper/lower bound search with threshold TH/256. A directed part
// walks the batch task through a swap-in that helps (lower bound found),
// one that does not (upper bound) and the freeze of opt_k; a random part
// runs 4000 records. The decision must appear exactly one cycle after
// rec_valid.
module tb_dsma;
  import smqos_pkg::*;

  localparam int TH = 13;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic enable, clr_batch, rec_valid;
  ipc_t ipc_target, rec_ipc_ls, rec_ave_ls, rec_ipc_batch;
  logic [NEP_W-1:0] rec_nep_ls;
  smcnt_t rec_sm_ls, rec_sm_batch, rec_sm_gated;
  logic dec_valid, ls_to_swapin, ls_to_swapout, b_to_swapin, b_to_swapout;
  decision_t dec;
  smcnt_t opt_k;
  logic upper_k, lower_k, bound_eval;
  ipc_t ipc_last;

  dsma #(.TH(TH)) dut (.*);

  int checks = 0, failures = 0;
  int n_lsin = 0, n_lsout = 0, n_bin = 0, n_bout = 0, n_gate = 0, n_eval = 0;

  // Reference state.
  int m_opt, m_last;
  bit m_up, m_lo, m_pend, m_pin;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic step(input int tgt, input int ep, input int ave, input int n,
                      input int bep, input int sl, input int sb, input int sg);
    int e_ls, e_b;   // 0 keep/gate, 1 in, 2 out
    bit ev;
    longint lhs, rhs;
    // model
    ev = m_pend && !(m_up && m_lo);
    if (ev) begin
      if (m_pin) begin
        if (bep * 256 <= m_last * (256 + TH)) m_up = 1; else begin m_lo = 1; m_opt = sb; end
      end else begin
        if (bep * 256 < m_last * (256 - TH)) m_up = 1; else begin m_lo = 1; m_opt = sb; end
      end
    end
    e_ls = 0;
    lhs = longint'(ave) * n;
    rhs = longint'(tgt) * (n + 1);
    if (ave < tgt || ep < tgt) begin
      if (sg > 0 || sb > 1) e_ls = 1;
    end else if (lhs > rhs && ep > tgt) begin
      if (sl > 1) e_ls = 2;
    end
    e_b = 0;
    if (e_ls == 2) begin
      if (sb < m_opt) e_b = 1;
      else if (!m_up) e_b = 1;
      else if (!m_lo && sb > 1) e_b = 2;
    end
    if (e_b != 0) begin
      m_pend = 1; m_pin = (e_b == 1); m_last = bep;
    end else m_pend = 0;
    // drive
    ipc_target = ipc_t'(tgt); rec_ipc_ls = ipc_t'(ep); rec_ave_ls = ipc_t'(ave);
    rec_nep_ls = NEP_W'(n); rec_ipc_batch = ipc_t'(bep);
    rec_sm_ls = smcnt_t'(sl); rec_sm_batch = smcnt_t'(sb); rec_sm_gated = smcnt_t'(sg);
    rec_valid = 1'b1;
    @(posedge clk); #1;
    rec_valid = 1'b0;
    chk(dec_valid == 1'b1, "dec_valid one cycle after rec_valid");
    chk(int'(dec.ls) == e_ls, $sformatf("ls action got %0d exp %0d", dec.ls, e_ls));
    chk(int'(dec.batch) == e_b, $sformatf("batch action got %0d exp %0d", dec.batch, e_b));
    chk(ls_to_swapin == (e_ls == 1) && ls_to_swapout == (e_ls == 2), "ls flags");
    chk(b_to_swapin == (e_b == 1) && b_to_swapout == (e_b == 2), "batch flags");
    chk(int'(opt_k) == m_opt && upper_k == m_up && lower_k == m_lo,
        $sformatf("bounds got opt=%0d up=%0d lo=%0d exp %0d %0d %0d", opt_k, upper_k, lower_k, m_opt, m_up, m_lo));
    chk(bound_eval == ev, "bound_eval");
    if (e_ls == 1) n_lsin++;
    if (e_ls == 2) n_lsout++;
    if (e_b == 1) n_bin++;
    if (e_b == 2) n_bout++;
    if (e_ls == 2 && e_b == 0) n_gate++;
    if (ev) n_eval++;
    @(posedge clk); #1;
    chk(dec_valid == 1'b0, "dec_valid is a single pulse");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1'b1; clr_batch = 1'b0; rec_valid = 1'b0;
    ipc_target = '0; rec_ipc_ls = '0; rec_ave_ls = '0; rec_nep_ls = '0; rec_ipc_batch = '0;
    rec_sm_ls = '0; rec_sm_batch = '0; rec_sm_gated = '0;
    m_opt = 0; m_up = 0; m_lo = 0; m_pend = 0; m_pin = 0; m_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Directed: LS misses target -> swap in.
    step(1000, 900, 1100, 4, 500, 8, 8, 0);
    chk(dec.ls == LS_SWAP_IN, "LS below target swaps in");
    // LS well above -> swap out; batch has opt 0, upper clear -> batch swaps in.
    step(1000, 1300, 1300, 4, 500, 9, 7, 0);
    chk(dec.ls == LS_SWAP_OUT && dec.batch == B_SWAP_IN, "batch takes the freed SM");
    // Batch IPC rose by > th -> lower bound, opt = 8. LS stays (avg*N not above).
    step(1000, 1001, 1001, 5, 600, 8, 8, 0);
    chk(lower_k && !upper_k && opt_k == 8, "lower bound found after a useful swap-in");
    // LS swaps out again; upper still clear -> batch swaps in again.
    step(1000, 1300, 1300, 6, 600, 8, 8, 0);
    chk(dec.batch == B_SWAP_IN, "upper bound not yet reached");
    // Batch IPC flat -> upper bound; both set -> frozen.
    step(1000, 1001, 1001, 7, 610, 7, 9, 0);
    chk(upper_k && lower_k && opt_k == 8, "upper bound found, opt frozen");
    // LS swaps out, batch at 9 >= opt, both bounds -> SM gated.
    step(1000, 1300, 1300, 8, 610, 7, 9, 0);
    chk(dec.ls == LS_SWAP_OUT && dec.batch == B_GATE, "freed SM power gated");
    // Frozen: no further evaluation.
    step(1000, 1001, 1001, 9, 100, 6, 9, 1);
    chk(!bound_eval && opt_k == 8, "opt_k stays frozen");

    // Clear batch history, then random records.
    clr_batch = 1'b1; @(posedge clk); #1; clr_batch = 1'b0;
    m_opt = 0; m_up = 0; m_lo = 0; m_pend = 0;
    for (int i = 0; i < 4000; i++) begin
      int tgt, ep, ave, n, bep, sl, sb, sg;
      if (i % 300 == 0) begin
        clr_batch = 1'b1; @(posedge clk); #1; clr_batch = 1'b0;
        m_opt = 0; m_up = 0; m_lo = 0; m_pend = 0;
      end
      tgt = 500 + $urandom_range(0, 200);
      ep  = tgt - 100 + $urandom_range(0, 220);
      ave = tgt - 40 + $urandom_range(0, 100);
      n   = $urandom_range(0, 200);
      bep = 300 + $urandom_range(0, 200);
      sl  = $urandom_range(1, 14);
      sb  = $urandom_range(1, 15 - sl);
      sg  = 16 - sl - sb;
      step(tgt, ep, ave, n, bep, sl, sb, sg);
    end

    // enable low: no decision.
    enable = 1'b0;
    rec_valid = 1'b1; @(posedge clk); #1; rec_valid = 1'b0;
    chk(dec_valid == 1'b0, "no decision while disabled");

    $display("events: ls_in=%0d ls_out=%0d b_in=%0d b_out=%0d gate=%0d eval=%0d",
             n_lsin, n_lsout, n_bin, n_bout, n_gate, n_eval);
    chk(n_lsin > 0 && n_lsout > 0 && n_bin > 0 && n_bout > 0 && n_gate > 0 && n_eval > 0,
        "every action occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
