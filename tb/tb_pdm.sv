// tb_pdm: self-checking test of the Profiling Data Management module.
//
// Feeds 300 epoch reports with random IPCs and SM counts and checks each
// record against a model of the running mean
//   ave <- floor((ave*N + ipc)/(N+1)), N <- N+1
// per task, the recorded epoch IPCs and SM counts, and that rec_valid comes
// within the two-division latency. clr_ls / clr_batch are pulsed now and
// then and must restart that task's history.
module tb_pdm;
  import smqos_pkg::*;

  localparam int LAT = 2 * (IPC_W + NEP_W + 1) + 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clr_ls, clr_batch, ipc_valid, rec_valid;
  ipc_t ipc_ls, ipc_batch, rec_ipc_ls, rec_ave_ls, rec_ipc_batch, rec_ave_batch;
  smcnt_t sm_ls, sm_batch, sm_gated, rec_sm_ls, rec_sm_batch, rec_sm_gated;
  logic [NEP_W-1:0] rec_nep_ls, rec_nep_batch;

  pdm dut (.*);

  int checks = 0, failures = 0, n_clr = 0;
  longint m_ave_l, m_n_l, m_ave_b, m_n_b;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_c;
    longint il, ib;
    clr_ls = 0; clr_batch = 0; ipc_valid = 0; ipc_ls = '0; ipc_batch = '0;
    sm_ls = '0; sm_batch = '0; sm_gated = '0;
    m_ave_l = 0; m_n_l = 0; m_ave_b = 0; m_n_b = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int e = 0; e < 300; e++) begin
      if ($urandom_range(0, 29) == 0) begin
        clr_ls = 1; m_ave_l = 0; m_n_l = 0; n_clr++;
      end
      if ($urandom_range(0, 29) == 0) begin
        clr_batch = 1; m_ave_b = 0; m_n_b = 0; n_clr++;
      end
      if (clr_ls || clr_batch) begin
        @(posedge clk); #1; clr_ls = 0; clr_batch = 0;
      end
      il = (e % 50 == 7) ? 65535 : $urandom_range(0, 4000);
      ib = $urandom_range(0, 4000);
      ipc_ls = ipc_t'(il); ipc_batch = ipc_t'(ib);
      sm_ls = smcnt_t'($urandom_range(1, 14)); sm_batch = smcnt_t'($urandom_range(1, 14));
      sm_gated = smcnt_t'($urandom_range(0, 14));
      ipc_valid = 1;
      @(posedge clk); #1;
      ipc_valid = 0;
      m_ave_l = (m_ave_l * m_n_l + il) / (m_n_l + 1); m_n_l++;
      m_ave_b = (m_ave_b * m_n_b + ib) / (m_n_b + 1); m_n_b++;
      wait_c = 0;
      while (!rec_valid && wait_c < 200) begin
        @(posedge clk); #1; wait_c++;
      end
      chk(rec_valid, "rec_valid arrives");
      chk(wait_c + 1 <= LAT, $sformatf("latency %0d", wait_c + 1));
      chk(longint'(rec_ave_ls) == m_ave_l, $sformatf("ave_ls %0d exp %0d", rec_ave_ls, m_ave_l));
      chk(longint'(rec_nep_ls) == m_n_l, "nep_ls");
      chk(longint'(rec_ave_batch) == m_ave_b, $sformatf("ave_b %0d exp %0d", rec_ave_batch, m_ave_b));
      chk(longint'(rec_nep_batch) == m_n_b, "nep_b");
      chk(longint'(rec_ipc_ls) == il && longint'(rec_ipc_batch) == ib, "epoch ipcs recorded");
      chk(rec_sm_ls == sm_ls && rec_sm_batch == sm_batch && rec_sm_gated == sm_gated, "sm counts");
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1;
    end
    chk(n_clr > 0, "a history clear happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
