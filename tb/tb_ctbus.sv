// tb_ctbus: the cut-through bus with its arbiter and reservation status unit.
// Checks the pipeline timing (grant in cycle t, transaction broadcast in t+1,
// response to the issuer in t+2), that of two masters racing for the same NITX
// exactly one reservation succeeds, that a data word reaches the bus with its
// master's id, and HOLD / CHECK / FREE behaviour seen through the bus.
`timescale 1ns/1ps
module tb_ctbus;
  import prc_pkg::*;
  localparam int N = NUM_MST;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0, gnt;
  ct_txn_t      txn [N];
  logic         bus_valid, resp_valid, resp_ok;
  ct_txn_t      bus_txn;
  mid_t         bus_mid, resp_mid;
  slv_mask_t    resp_mask;
  nitx_mask_t   reserved, held;

  ctbus dut (.clk, .rst_n, .req, .txn, .gnt, .bus_valid, .bus_txn, .bus_mid,
             .resp_valid, .resp_mid, .resp_ok, .resp_mask, .reserved, .held);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per-master bookkeeping, filled by the monitor
  int  t_gnt [N], t_bus [N], t_resp [N];
  logic r_ok [N];
  slv_mask_t r_mask [N];

  // drive at negedge; grants are sampled just before the rising edge
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) if (gnt[i]) t_gnt[i] = cyc;
  end
  always @(posedge clk) begin
    #1;
    if (bus_valid) t_bus[bus_mid] = cyc;
    if (resp_valid) begin
      t_resp[resp_mid] = cyc;
      r_ok[resp_mid]   = resp_ok;
      r_mask[resp_mid] = resp_mask;
    end
  end

  // issue one transaction from master m and wait for its response
  task automatic issue(int m, ctcmd_e cmd, slv_mask_t addr, logic all = 1'b1,
                       word_t data = '0);
    @(negedge clk);
    txn[m] = '{cmd: cmd, addr: addr, all: all, crc: 1'b0, data: data};
    req[m] = 1'b1;
    #1;
    while (!gnt[m]) begin @(negedge clk); #1; end
    // granted in this cycle: drop the request after the edge
    @(posedge clk); #1 req[m] = 1'b0;
    repeat (3) @(posedge clk);
    #2;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      txn[i] = '0; t_gnt[i] = -1; t_bus[i] = -1; t_resp[i] = -1;
      r_ok[i] = 0; r_mask[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // --- timing of one RESV
    issue(5, CT_RESV, slv_mask_t'(1) << 3);
    check("bus one cycle after grant", t_bus[5] == t_gnt[5] + 1);
    check("response one cycle after bus", t_resp[5] == t_bus[5] + 1);
    check("RESV ok", r_ok[5] && reserved[3]);

    // --- data word broadcast with master id
    begin
      logic seen = 0;
      @(negedge clk);
      txn[9] = '{cmd: CT_DTX, addr: slv_mask_t'(1) << 3, all: 1'b0, crc: 1'b1,
                 data: 32'hCAFE_0009};
      req[9] = 1'b1;
      #1;
      while (!gnt[9]) begin @(negedge clk); #1; end
      for (int k = 0; k < 6; k++) begin
        @(posedge clk); #1;
        req[9] = 1'b0;
        if (bus_valid && bus_mid == 9 && bus_txn.data == 32'hCAFE_0009 &&
            bus_txn.cmd == CT_DTX) seen = 1;
      end
      req[9] = 1'b0;
      check("data word on bus", seen);
    end

    // --- race: masters 2 and 20 both RESV NITX 7 in the same cycle
    @(negedge clk);
    txn[2]  = '{cmd: CT_RESV, addr: slv_mask_t'(1) << 7, all: 1'b1, crc: 1'b0, data: '0};
    txn[20] = txn[2];
    req[2] = 1'b1; req[20] = 1'b1;
    for (int k = 0; k < 8; k++) begin
      logic g2, g20;
      #1 g2 = gnt[2]; g20 = gnt[20];
      @(posedge clk); #1;
      if (g2) req[2] = 1'b0;
      if (g20) req[20] = 1'b0;
      @(negedge clk);
    end
    req[2] = 0; req[20] = 0;
    repeat (3) @(posedge clk); #2;
    check("race: both answered", t_resp[2] > 0 && t_resp[20] > 0);
    check("race: exactly one wins", r_ok[2] ^ r_ok[20]);
    check("race: NITX 7 reserved", reserved[7]);

    // --- HOLD by master 16 on NITX 3 (reserved by 5): RESV elsewhere fails after FREE
    issue(16, CT_HOLD, slv_mask_t'(1) << 3);
    check("HOLD sets held", held[3] && r_ok[16]);
    issue(5, CT_FREE, slv_mask_t'(1) << 3);
    check("FREE by other keeps hold", held[3] && !reserved[3]);
    issue(6, CT_RESV, slv_mask_t'(1) << 3);
    check("RESV on held NITX fails", !r_ok[6] && !reserved[3]);
    issue(16, CT_CHECK, slv_mask_t'(1) << 3);
    check("CHECK by holder reserves", r_ok[16] && reserved[3]);
    issue(16, CT_FREE, slv_mask_t'(1) << 3);
    check("FREE by holder clears both", !held[3] && !reserved[3]);

    // --- as-many-of reservation: NITX 7 taken, 8 and 9 free
    issue(11, CT_RESV, (slv_mask_t'(1) << 7) | (slv_mask_t'(1) << 8) | (slv_mask_t'(1) << 9)
          | (slv_mask_t'(1) << HOST_BIT), 1'b0);
    check("as-many-of ok", r_ok[11]);
    check("as-many-of mask", r_mask[11] == ((slv_mask_t'(1) << 8) | (slv_mask_t'(1) << 9)
                                             | (slv_mask_t'(1) << HOST_BIT)));
    issue(12, CT_RESV, (slv_mask_t'(1) << 7) | (slv_mask_t'(1) << 10), 1'b1);
    check("all-or-nothing fails on one busy", !r_ok[12] && !reserved[10]);

    // --- many masters at once: every one is served
    begin
      int served = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        txn[i] = '{cmd: CT_DTX, addr: slv_mask_t'(1) << HOST_BIT, all: 1'b0, crc: 1'b0,
                   data: word_t'(i)};
        req[i] = 1'b1;
      end
      for (int k = 0; k < 2*N && req != '0; k++) begin
        logic [N-1:0] g;
        #1 g = gnt;
        check("one grant per cycle", $onehot(g));
        @(posedge clk); #1;
        for (int i = 0; i < N; i++) if (g[i]) begin req[i] = 1'b0; served++; end
        @(negedge clk);
      end
      check("all 28 served one per cycle", served == N && req == '0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
