// tb_nirx: one network interface receiver with models of its input buffer, of the
// routing engine (takes one header word, then answers with a prepared routing
// primitive), of the CTBUS (random grant delays, reservation answers two cycles
// later, reservation state kept here) and of the slaves' space flags.
// Four packets exercise the four primitive modes:
//   1 reserved  : forwarded at once to NITX 2 with the engine's new header word;
//   2 wait-one  : NITX 4 and 5 busy, so the receiver must wait; NITX 5 frees, the
//                 first RESV is refused and retried, then data goes to NITX 5 only;
//   3 wait-all  : multicast to NITX 0, 1 and memory; waits until both NITXs are free
//                 and reserves them in one RESV;
//   4 discard   : every word is dropped, nothing reaches the bus.
// Checked: the exact word/command/mask sequence on the bus, FREE propagation, that
// waiting is raised while blocked, that no data word is requested without space in
// every addressed slave, and that every input word is consumed.
`timescale 1ns/1ps
module tb_nirx;
  import prc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_pop;
  flit_t      in_flit = '0;
  logic       hdr_valid, hdr_pop = 0, rtp_valid = 0;
  word_t      hdr_word;
  rtp_t       rtp = '0;
  logic       ct_req, ct_gnt = 0, ct_resp_valid = 0, ct_resp_ok = 0;
  ct_txn_t    ct_txn;
  nitx_mask_t reserved = '0, held = '0;
  slv_mask_t  slv_space = '1;
  logic       waiting;

  nirx dut (.clk, .rst_n, .in_valid, .in_flit, .in_pop, .hdr_valid, .hdr_word, .hdr_pop,
            .rtp_valid, .rtp, .ct_req, .ct_txn, .ct_gnt, .ct_resp_valid, .ct_resp_ok,
            .reserved, .held, .slv_space, .waiting);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic slv_mask_t bit_of(int i);
    return slv_mask_t'(1) << i;
  endfunction

  flit_t     inq [$];
  rtp_t      plan [$];
  logic      resv_ans [$];       // answers for successive RESVs
  ct_txn_t   seen [$];
  ct_txn_t   resvs [$];
  int        wait_cycles = 0, space_viol = 0, resv_while_busy = 0, cyc = 0;
  int        re_st = 0;
  logic      pend_pop = 0;
  logic      space_on = 1;
  logic [1:0] rp = '0;
  logic      rp_ok [2];
  slv_mask_t rp_mask [2];

  always @(posedge clk) begin
    #1;
    cyc++;
    if (pend_pop) void'(inq.pop_front());
    // reservation answers, two cycles after the grant
    ct_resp_valid = rp[1];
    ct_resp_ok    = rp_ok[1];
    if (rp[1] && rp_ok[1]) reserved |= rp_mask[1][NUM_NITX-1:0];
    rp[1] = rp[0]; rp_ok[1] = rp_ok[0]; rp_mask[1] = rp_mask[0]; rp[0] = 0;
    // input buffer
    in_valid = inq.size() > 0;
    in_flit  = in_valid ? inq[0] : '0;
    // space: full except for random gaps when enabled
    slv_space = (space_on && $urandom_range(0, 2) == 0) ? '0 : '1;
    // engine model
    hdr_pop = 0; rtp_valid = 0;
    if (re_st == 1) begin
      rtp_valid = 1; rtp = plan.pop_front(); re_st = 0;
    end else if (hdr_valid && plan.size() > 0) begin
      hdr_pop = 1; re_st = 1;
    end
    #1;
    ct_gnt = ct_req && ($urandom_range(0, 3) != 0);
    #1;
    if (waiting) wait_cycles++;
    if (ct_req && is_data_cmd(ct_txn.cmd) && (ct_txn.addr & ~slv_space) != '0) space_viol++;
    if (ct_gnt) begin
      if (ct_txn.cmd == CT_RESV) begin
        logic ok;
        resvs.push_back(ct_txn);
        if ((ct_txn.addr[NUM_NITX-1:0] & (reserved | held)) != '0) resv_while_busy++;
        ok = resv_ans.size() > 0 ? resv_ans.pop_front() : 1'b1;
        rp[0] = 1; rp_ok[0] = ok; rp_mask[0] = ct_txn.addr;
      end else begin
        seen.push_back(ct_txn);
        if (ct_txn.cmd == CT_FREE) reserved &= ~ct_txn.addr[NUM_NITX-1:0];
      end
    end
    pend_pop = in_pop;
  end

  task automatic packet(word_t hdr, int n, int tag);
    inq.push_back('{cmd: CT_DTX, data: hdr});
    for (int i = 0; i < n; i++)
      inq.push_back('{cmd: (i == n-1) ? CT_EOP : (i % 4 == 3 ? CT_MARK : CT_DTX),
                      data: word_t'(tag << 16 | i)});
    inq.push_back('{cmd: CT_FREE, data: '0});
  endtask

  task automatic expect_pkt(int first, word_t ctd, int n, int tag, slv_mask_t m, string nm);
    check({nm, ": ctd"}, seen[first].data == ctd && seen[first].cmd == CT_DTX);
    for (int i = 0; i < n; i++)
      check($sformatf("%s: word %0d", nm, i),
            seen[first+1+i].data == word_t'(tag << 16 | i) &&
            seen[first+1+i].cmd == ((i == n-1) ? CT_EOP : (i % 4 == 3 ? CT_MARK : CT_DTX)));
    check({nm, ": FREE"}, seen[first+1+n].cmd == CT_FREE);
    for (int i = first; i <= first + 1 + n; i++)
      check($sformatf("%s: mask %0d", nm, i), seen[i].addr == m);
  endtask

  task automatic run_until_idle(int max);
    int t = 0;
    while ((inq.size() > 0 || dut.st != dut.S_ROUTE) && t < max) begin
      @(posedge clk); t++;
    end
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int w0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1: already reserved
    reserved = 12'b0000_0000_0100;
    plan.push_back('{ctd: 32'h1111_0001, addr: bit_of(2), mode: RTP_RESVD, crc: 1'b0});
    packet(32'hAAAA_0001, 6, 1);
    run_until_idle(400);
    check("p1 count", seen.size() == 8);
    if (seen.size() == 8) expect_pkt(0, 32'h1111_0001, 6, 1, bit_of(2), "p1");
    check("p1 no RESV", resvs.size() == 0);
    check("p1 FREE released NITX 2", reserved[2] == 1'b0);

    // 2: wait for one of NITX 4,5
    seen.delete();
    reserved = 12'b0000_0011_0000;
    plan.push_back('{ctd: 32'h2222_0002, addr: bit_of(4) | bit_of(5), mode: RTP_WAIT_ONE,
                     crc: 1'b0});
    resv_ans.push_back(1'b0);
    resv_ans.push_back(1'b1);
    packet(32'hAAAA_0002, 5, 2);
    w0 = wait_cycles;
    repeat (40) @(posedge clk);
    check("p2 waits while both busy", wait_cycles - w0 >= 30 && resvs.size() == 0);
    reserved[5] = 1'b0;
    run_until_idle(400);
    check("p2 two RESVs", resvs.size() == 2);
    if (resvs.size() == 2)
      check("p2 RESV picks the free one", resvs[0].addr == bit_of(5) && resvs[1].addr == bit_of(5));
    check("p2 count", seen.size() == 7);
    if (seen.size() == 7) expect_pkt(0, 32'h2222_0002, 5, 2, bit_of(5), "p2");
    reserved = '0;

    // 3: multicast, wait for all
    seen.delete(); resvs.delete();
    reserved = 12'b0000_0000_0010;
    plan.push_back('{ctd: 32'h3333_0003, addr: bit_of(0) | bit_of(1) | bit_of(HOST_BIT),
                     mode: RTP_WAIT_ALL, crc: 1'b1});
    packet(32'hAAAA_0003, 9, 3);
    w0 = wait_cycles;
    repeat (30) @(posedge clk);
    check("p3 waits for all", wait_cycles - w0 >= 20 && resvs.size() == 0);
    reserved = '0;
    run_until_idle(600);
    check("p3 one RESV of all", resvs.size() == 1);
    if (resvs.size() == 1)
      check("p3 RESV mask", resvs[0].addr == (bit_of(0) | bit_of(1) | bit_of(HOST_BIT)) &&
                            resvs[0].all);
    check("p3 count", seen.size() == 11);
    if (seen.size() == 11) begin
      expect_pkt(0, 32'h3333_0003, 9, 3, bit_of(0) | bit_of(1) | bit_of(HOST_BIT), "p3");
      check("p3 ctd crc flag", seen[0].crc);
    end

    // 4: discard
    seen.delete(); resvs.delete();
    plan.push_back('{ctd: '0, addr: '0, mode: RTP_DISCARD, crc: 1'b0});
    packet(32'hAAAA_0004, 7, 4);
    run_until_idle(400);
    check("p4 nothing on bus", seen.size() == 0 && resvs.size() == 0);
    check("p4 input drained", inq.size() == 0);

    check("no data without space", space_viol == 0);
    check("no RESV of a busy NITX", resv_while_busy == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
