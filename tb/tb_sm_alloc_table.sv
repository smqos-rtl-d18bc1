// tb_sm_alloc_table: self-checking test of the SM ownership table.
//
// Eight SMs. Random DSMA decisions are sent whenever the table is idle
// (and sometimes while it is busy, which must drop them); the GPU side
// accepts each move after a random delay. A reference copy of the table,
// updated by the same selection rules (gated SMs first for an LS swap-in,
// highest-numbered LS / batch SM given up), checks every request's SM and
// destination, the table, the counts and the power-gate vector, and that
// a woken SM's gate opens while its request is pending.
module tb_sm_alloc_table;
  import smqos_pkg::*;

  localparam int NSM = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic init, dec_valid, swap_valid, swap_ready, busy, dec_dropped;
  decision_t dec;
  logic [$clog2(NSM)-1:0] swap_sm;
  owner_e swap_to;
  owner_e sm_owner [NSM];
  logic [NSM-1:0] sm_gate;
  smcnt_t sm_ls, sm_batch, sm_gated;

  sm_alloc_table #(.NUM_SM(NSM)) dut (.*);

  int checks = 0, failures = 0;
  int n_from_gated = 0, n_from_batch = 0, n_to_b = 0, n_gate = 0, n_bout = 0, n_drop = 0;
  owner_e m [NSM];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int first_of(input owner_e o);
    for (int i = 0; i < NSM; i++) if (m[i] == o) return i;
    return -1;
  endfunction
  function automatic int last_of(input owner_e o);
    for (int i = NSM - 1; i >= 0; i--) if (m[i] == o) return i;
    return -1;
  endfunction

  task automatic compare_table();
    int cl = 0, cb = 0, cg = 0;
    for (int i = 0; i < NSM; i++) begin
      chk(sm_owner[i] == m[i], $sformatf("owner of SM %0d", i));
      chk(sm_gate[i] == (m[i] == OWN_GATED), $sformatf("gate of SM %0d", i));
      if (m[i] == OWN_LS) cl++; else if (m[i] == OWN_BATCH) cb++; else cg++;
    end
    chk(int'(sm_ls) == cl && int'(sm_batch) == cb && int'(sm_gated) == cg, "counts");
  endtask

  // Wait for one request, check it, accept it after a random delay.
  task automatic expect_move(input int sm, input owner_e to);
    int w = 0;
    while (!swap_valid && w < 10) begin @(posedge clk); #1; w++; end
    chk(swap_valid, "request raised");
    chk(int'(swap_sm) == sm && swap_to == to,
        $sformatf("move SM %0d->%0d, expected SM %0d->%0d", swap_sm, swap_to, sm, to));
    if (to != OWN_GATED) chk(!sm_gate[swap_sm], "woken SM ungated during its request");
    repeat ($urandom_range(0, 6)) begin
      // a decision arriving now must be dropped
      if ($urandom_range(0, 3) == 0) begin
        dec_valid = 1; dec = '{ls: LS_SWAP_IN, batch: B_GATE};
        @(posedge clk); #1; dec_valid = 0;
        chk(dec_dropped, "decision while busy dropped");
        n_drop++;
      end else begin
        @(posedge clk); #1;
      end
      chk(swap_valid && int'(swap_sm) == sm, "request held");
    end
    swap_ready = 1;
    @(posedge clk); #1;
    swap_ready = 0;
    m[sm] = to;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, s;
    b_act_e ba;
    init = 0; dec_valid = 0; swap_ready = 0; dec = '{ls: LS_KEEP, batch: B_GATE};
    for (int i = 0; i < NSM; i++) m[i] = (i < NSM / 2) ? OWN_LS : OWN_BATCH;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    compare_table();
    for (int t = 0; t < 600; t++) begin
      k = $urandom_range(0, 9);
      if (t % 150 == 149) begin
        init = 1; @(posedge clk); #1; init = 0;
        for (int i = 0; i < NSM; i++) m[i] = (i < NSM / 2) ? OWN_LS : OWN_BATCH;
        compare_table();
        continue;
      end
      if (k < 4) begin
        dec = '{ls: LS_SWAP_IN, batch: B_GATE};
        dec_valid = 1; @(posedge clk); #1; dec_valid = 0;
        s = first_of(OWN_GATED);
        if (s >= 0) begin expect_move(s, OWN_LS); n_from_gated++; end
        else begin
          s = last_of(OWN_BATCH);
          if (s >= 0) begin expect_move(s, OWN_LS); n_from_batch++; end
        end
      end else if (k < 9) begin
        ba = b_act_e'($urandom_range(0, 2));
        dec = '{ls: LS_SWAP_OUT, batch: ba};
        dec_valid = 1; @(posedge clk); #1; dec_valid = 0;
        s = last_of(OWN_LS);
        if (s >= 0) begin
          expect_move(s, ba == B_SWAP_IN ? OWN_BATCH : OWN_GATED);
          if (ba == B_SWAP_IN) n_to_b++; else n_gate++;
          if (ba == B_SWAP_OUT) begin
            s = last_of(OWN_BATCH);
            if (s >= 0) begin expect_move(s, OWN_GATED); n_bout++; end
          end
        end
      end else begin
        dec = '{ls: LS_KEEP, batch: B_GATE};
        dec_valid = 1; @(posedge clk); #1; dec_valid = 0;
        chk(!swap_valid, "keep raises no request");
      end
      repeat (2) @(posedge clk);
      #1;
      chk(!busy, "idle after the moves");
      compare_table();
    end
    $display("moves: from_gated=%0d from_batch=%0d to_batch=%0d gated=%0d batch_out=%0d dropped=%0d",
             n_from_gated, n_from_batch, n_to_b, n_gate, n_bout, n_drop);
    chk(n_from_gated > 0 && n_from_batch > 0 && n_to_b > 0 && n_gate > 0 && n_bout > 0 && n_drop > 0,
        "every kind of move occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
