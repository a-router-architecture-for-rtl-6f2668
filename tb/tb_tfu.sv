// tb_tfu: one transmitter fetch unit against a buffer-memory model (one access
// every second cycle, read data one cycle later) and a CTBUS model (grant when
// requested, reservation answer two cycles after the grant).
// A two-page packet is queued: a 4-word header page kept out of the CRC and an
// 8-word data page. The test holds the NITX busy for a while, makes the first RESV
// fail, and drops the NITX's space flag at times. It checks that nothing is sent
// before a successful reservation, that no data request is made without space, and
// that the bus sees exactly: header words (last one MARK), data words (last one
// MARK), the CRC of the data words as EOP, then FREE, all to this NITX only. The two
// page events must carry channel, last-page flag and length.
// Then a one-page packet whose tag keeps the connection must end with EOP and no
// FREE, and the next packet must go through that connection without a new RESV
// and end with EOP and FREE. Last, with the NITX held (by the host), the unit must
// claim it with CHECK instead of RESV.
`timescale 1ns/1ps
module tb_tfu;
  import prc_pkg::*;
  localparam int unsigned ID = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tag_wr = 0, tag_full;
  word_t       tag_data = '0;
  logic        mem_req, mem_gnt, mem_rvalid = 0;
  logic [19:0] mem_addr;
  word_t       mem_rdata = '0;
  logic        crc_en, crc_clr;
  word_t       crc_st [2];
  logic        ct_req, ct_gnt, ct_resp_valid = 0, ct_resp_ok = 0;
  ct_txn_t     ct_txn;
  nitx_mask_t  busy = '0;      // reserved flags seen by the unit
  nitx_mask_t  held_in = '0;
  logic        nitx_space = 1;
  logic        ev_valid, ev_ack;
  word_t       ev_data;

  tfu #(.NITX_ID(ID)) dut (
    .clk, .rst_n, .tag_wr, .tag_data, .tag_full,
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .crc_en, .crc_clr, .crc_state(crc_st[0]),
    .ct_req, .ct_txn, .ct_gnt, .ct_resp_valid, .ct_resp_ok, .reserved(busy), .held(held_in), .nitx_space,
    .ev_valid, .ev_data, .ev_ack
  );
  crc_unit #(.NCH(2)) u_crc (
    .clk, .rst_n, .clr({1'b0, crc_clr}), .upd_en(crc_en), .upd_ch(1'b0),
    .upd_word(mem_rdata), .state(crc_st)
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t mem_val(logic [19:0] a);
    return {12'hA5C, a} ^ (word_t'(a) << 21);
  endfunction
  function automatic word_t crc_step(word_t c, word_t w);
    for (int i = 31; i >= 0; i--) begin
      logic fb = c[31] ^ w[i];
      c = {c[30:0], 1'b0};
      if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  // memory model
  logic slot = 0;
  always @(posedge clk) slot <= !slot;
  assign mem_gnt = mem_req && slot;
  always @(posedge clk) begin
    mem_rvalid <= mem_gnt;
    if (mem_gnt) mem_rdata <= mem_val(mem_addr);
  end

  // CTBUS model
  int  resv_count = 0, check_count = 0;
  ctcmd_e last_alloc = CT_DTX;
  logic reserved = 0;
  assign ct_gnt = ct_req;
  logic [1:0] rp = '0;
  always @(posedge clk) begin
    rp <= {rp[0], ct_req && ct_txn.cmd inside {CT_RESV, CT_HOLD, CT_CHECK, CT_FREE}};
    ct_resp_valid <= rp[0];
    ct_resp_ok    <= resv_count > 1;
  end

  // record bus words
  ct_txn_t seen [$];
  int      early = 0, no_space = 0;
  always @(posedge clk) if (rst_n && ct_req) begin
    if (ct_txn.cmd == CT_RESV) begin resv_count++; last_alloc = CT_RESV; end
    else if (ct_txn.cmd == CT_CHECK) begin check_count++; last_alloc = CT_CHECK; end
    else begin
      if (!reserved) early++;
      if (!nitx_space) no_space++;
      seen.push_back(ct_txn);
    end
    if (ct_txn.cmd == CT_RESV && resv_count > 1) reserved = 1;
    if (ct_txn.cmd == CT_RESV && busy[ID]) early++;
  end

  // events
  word_t evs [$];
  assign ev_ack = ev_valid && ($urandom_range(0, 1) == 1);
  always @(posedge clk) if (ev_valid && ev_ack) evs.push_back(ev_data);

  // space toggling
  always @(posedge clk) nitx_space <= ($urandom_range(0, 3) != 0);

  task automatic put_tag(logic last, logic nocrc, int len, logic [19:0] a, logic keep = 1'b0);
    @(negedge clk);
    tag_wr = 1; tag_data = {last, nocrc, keep, 9'(len - 1), a};
    @(negedge clk);
    tag_wr = 0;
  endtask

  initial begin
    word_t exp_crc = 32'hFFFF_FFFF;
    int ts;
    busy[ID] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    put_tag(0, 1, 4, 20'h00100);
    put_tag(1, 0, 8, 20'h00200);
    repeat (30) @(posedge clk);
    check("no RESV while NITX busy", resv_count == 0);
    @(negedge clk) busy[ID] = 1'b0;
    ts = 0;
    while (!(seen.size() > 0 && seen[$].cmd == CT_FREE) && ts < 2000) begin
      @(posedge clk); ts++;
    end
    repeat (5) @(posedge clk);
    check("RESV retried after failure", resv_count == 2);
    check("nothing sent before reservation", early == 0);
    check("no data without space", no_space == 0);
    check("word count", seen.size() == 4 + 8 + 2);
    if (seen.size() == 14) begin
      for (int i = 0; i < 4; i++) begin
        check($sformatf("hdr %0d data", i), seen[i].data == mem_val(20'h100 + 20'(i)));
        check($sformatf("hdr %0d cmd", i), seen[i].cmd == (i == 3 ? CT_MARK : CT_DTX));
        check($sformatf("hdr %0d no crc", i), !seen[i].crc);
      end
      for (int i = 0; i < 8; i++) begin
        check($sformatf("data %0d", i), seen[4+i].data == mem_val(20'h200 + 20'(i)));
        check($sformatf("data %0d cmd", i), seen[4+i].cmd == (i == 7 ? CT_MARK : CT_DTX));
        check($sformatf("data %0d crc", i), seen[4+i].crc);
        exp_crc = crc_step(exp_crc, mem_val(20'h200 + 20'(i)));
      end
      check("EOP carries CRC", seen[12].cmd == CT_EOP && seen[12].data == exp_crc);
      check("FREE last", seen[13].cmd == CT_FREE);
      foreach (seen[i]) check("addressed to own NITX", seen[i].addr == slv_mask_t'(1) << ID);
    end
    check("two events", evs.size() == 2);
    if (evs.size() == 2) begin
      check("event 0", evs[0][31:16] == {1'b0, 4'(ID), 1'b0, 1'b0, 9'd3});
      check("event 1", evs[1][31:16] == {1'b0, 4'(ID), 1'b1, 1'b0, 9'd7});
    end
    // connection kept over a packet: no FREE after packet 2, no new RESV for packet 3
    put_tag(1, 0, 3, 20'h00300, 1'b1);
    repeat (200) @(posedge clk);
    check("kept packet: 3 words + EOP, no FREE", seen.size() == 14 + 4);
    if (seen.size() == 18) begin
      exp_crc = 32'hFFFF_FFFF;
      for (int i = 0; i < 3; i++) begin
        check($sformatf("kept %0d", i), seen[14+i].data == mem_val(20'h300 + 20'(i)) &&
              seen[14+i].cmd == (i == 2 ? CT_MARK : CT_DTX));
        exp_crc = crc_step(exp_crc, mem_val(20'h300 + 20'(i)));
      end
      check("kept packet EOP", seen[17].cmd == CT_EOP && seen[17].data == exp_crc);
    end
    put_tag(1, 0, 2, 20'h00380);
    ts = 0;
    while (!(seen.size() > 18 && seen[$].cmd == CT_FREE) && ts < 1000) begin
      @(posedge clk); ts++;
    end
    repeat (5) @(posedge clk);
    check("one RESV for the kept packet, none for the next", resv_count == 3);
    check("closing packet: 2 words, EOP, FREE", seen.size() == 18 + 4);
    if (seen.size() == 22) begin
      check("closing data", seen[18].data == mem_val(20'h380) && seen[19].cmd == CT_MARK);
      check("closing EOP then FREE", seen[20].cmd == CT_EOP && seen[21].cmd == CT_FREE);
    end
    check("four events", evs.size() == 4);
    // the host holds the NITX: the unit must claim it with CHECK, not RESV
    held_in[ID] = 1'b1;
    put_tag(1, 0, 2, 20'h003C0);
    ts = 0;
    while (!(seen.size() > 22 && seen[$].cmd == CT_FREE) && ts < 1000) begin
      @(posedge clk); ts++;
    end
    check("held NITX claimed with one CHECK", check_count == 1 && resv_count == 3 &&
          last_alloc == CT_CHECK);
    check("packet after CHECK", seen.size() == 26 && seen[22].data == mem_val(20'h3C0));
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
