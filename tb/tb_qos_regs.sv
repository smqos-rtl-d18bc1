// tb_qos_regs: self-checking test of the cudaSetQoS registers.
//
// Random writes (some with a zero target, which makes the kernel a batch
// kernel again) against a reference array; after every write both read
// ports and the LS bit vector are compared for random and for all kernel
// identifiers. Writes must take effect on the next clock, not before.
module tb_qos_regs;
  import smqos_pkg::*;

  localparam int NK = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en, cls_is_ls;
  logic [4:0] wr_kid, cls_kid, tgt_kid;
  ipc_t wr_target, tgt_target;
  logic [NK-1:0] ls_vec;

  qos_regs #(.NUM_KERNELS(NK)) dut (.*);

  int checks = 0, failures = 0, n_ls = 0, n_clear = 0;
  int m_t [NK];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, t;
    wr_en = 0; wr_kid = '0; wr_target = '0; cls_kid = '0; tgt_kid = '0;
    for (int i = 0; i < NK; i++) m_t[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(ls_vec == '0, "reset: no LS kernel");
    for (int n = 0; n < 400; n++) begin
      k = $urandom_range(0, NK - 1);
      t = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 65535);
      wr_en = 1; wr_kid = 5'(k); wr_target = ipc_t'(t);
      tgt_kid = 5'(k); cls_kid = 5'(k);
      #1;
      chk(int'(tgt_target) == m_t[k] && cls_is_ls == (m_t[k] != 0), "write not visible early");
      @(posedge clk); #1;
      wr_en = 0;
      m_t[k] = t;
      if (t != 0) n_ls++; else n_clear++;
      for (int i = 0; i < NK; i++) begin
        chk(ls_vec[i] == (m_t[i] != 0), $sformatf("ls_vec[%0d]", i));
      end
      cls_kid = 5'($urandom_range(0, NK - 1));
      tgt_kid = 5'($urandom_range(0, NK - 1));
      #1;
      chk(cls_is_ls == (m_t[cls_kid] != 0), "classify port");
      chk(int'(tgt_target) == m_t[tgt_kid], "target port");
    end
    chk(n_ls > 0 && n_clear > 0, "both kinds of write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
