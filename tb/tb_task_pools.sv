// tb_task_pools: self-checking test of the LS and batch task pools.
//
// Random launches (random LS flag) and pops against two reference queues:
// every pushed kernel must come out of the right pool, in launch order;
// launch_ready must be low exactly when the chosen pool is full (depth 4
// here), and a launch refused then must not be stored.
module tb_task_pools;
  localparam int NK = 32, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic launch_valid, launch_is_ls, launch_ready, ls_valid, ls_pop, b_valid, b_pop;
  logic [4:0] launch_kid, ls_kid, b_kid;

  task_pools #(.NUM_KERNELS(NK), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_pop_ls = 0, n_pop_b = 0;
  int q_ls[$], q_b[$];

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
    bit push_ok;
    launch_valid = 0; launch_is_ls = 0; launch_kid = '0; ls_pop = 0; b_pop = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      launch_valid = ($urandom_range(0, 1) == 1);
      launch_is_ls = ($urandom_range(0, 1) == 1);
      launch_kid   = 5'($urandom_range(0, NK - 1));
      ls_pop = ($urandom_range(0, 2) == 0);
      b_pop  = ($urandom_range(0, 2) == 0);
      #1;
      chk(ls_valid == (q_ls.size() > 0) && b_valid == (q_b.size() > 0), "valid flags");
      if (q_ls.size() > 0) chk(int'(ls_kid) == q_ls[0], "LS pool head");
      if (q_b.size() > 0)  chk(int'(b_kid) == q_b[0], "batch pool head");
      chk(launch_ready == (launch_is_ls ? (q_ls.size() < D) : (q_b.size() < D)), "launch_ready");
      if (!launch_ready && launch_valid) n_full++;
      push_ok = launch_valid && launch_ready;
      @(posedge clk); #1;
      if (ls_pop && q_ls.size() > 0) begin void'(q_ls.pop_front()); n_pop_ls++; end
      if (b_pop && q_b.size() > 0) begin void'(q_b.pop_front()); n_pop_b++; end
      if (push_ok) begin
        if (launch_is_ls) q_ls.push_back(int'(launch_kid)); else q_b.push_back(int'(launch_kid));
      end
      launch_valid = 0; ls_pop = 0; b_pop = 0;
    end
    chk(n_full > 0 && n_pop_ls > 0 && n_pop_b > 0, "full pool and pops seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
