// tb_ctbus_arbiter: checks the CTBUS binary priority-tree arbiter with 29 masters.
// Every grant must be one-hot and go to a requester; a lone requester is granted at
// once; two masters that keep requesting share the bus strictly alternately; and
// under random load where every master holds its request until served, no master
// waits more than 32 cycles (one slot per leaf of the 32-leaf tree).
`timescale 1ns/1ps
module tb_ctbus_arbiter;
  localparam int N = 29;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, gnt;
  logic gv;
  logic [4:0] gid;

  ctbus_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt, .gnt_valid(gv), .gnt_id(gid));

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wait_cnt [N];
  int maxwait = 0;
  int last = -1, alt_ok = 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // lone requesters
    for (int i = 0; i < N; i++) begin
      req = '0; req[i] = 1'b1; #1;
      check($sformatf("lone %0d", i), gnt == (N'(1) << i) && gv && gid == 5'(i));
      @(posedge clk); #1;
    end
    req = '0; #1;
    check("idle", gnt == '0 && !gv);
    // two contenders in different subtrees, then in the same leaf pair
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    for (int p = 0; p < 2; p++) begin
      automatic int a = (p == 0) ? 3 : 20, b = (p == 0) ? 25 : 21;
      req = '0; req[a] = 1; req[b] = 1; last = -1; alt_ok = 1;
      for (int k = 0; k < 20; k++) begin
        #1;
        if (gid == 5'(last)) alt_ok = 0;
        if (!(gnt[a] ^ gnt[b])) alt_ok = 0;
        last = gid;
        @(posedge clk);
      end
      check($sformatf("alternate %0d/%0d", a, b), alt_ok == 1);
    end
    // random load, requests held until granted
    req = '0;
    for (int k = 0; k < 3000; k++) begin
      logic [N-1:0] g;
      #1;
      g = gnt;
      for (int i = 0; i < N; i++) begin
        if (g[i] && !req[i]) begin failures++; $display("FAIL: grant without request"); end
      end
      if (gv && !$onehot(g)) begin failures++; $display("FAIL: not one-hot"); end
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        if (g[i]) begin req[i] = 0; wait_cnt[i] = 0; end
        else if (req[i]) begin
          wait_cnt[i]++;
          if (wait_cnt[i] > maxwait) maxwait = wait_cnt[i];
        end
        else if ($urandom % 3 != 0) req[i] = 1;
      end
    end
    checks++;
    $display("longest wait under random load: %0d cycles", maxwait);
    check("bounded wait", maxwait <= 32 && maxwait > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
