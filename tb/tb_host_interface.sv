// tb_host_interface: the memory and control interface with its TFUs, CRC units,
// time-stamp unit, page queues and event queue, against a buffer-memory model and
// a CTBUS model that grants the TFUs and answers their reservations.
// Checked through the control interface and the pins:
//   - control-store writes reach the right engine with index and word;
//   - config (run, page size) and the time stamp (load, count) read back;
//   - notification FIFO writes, reads and status;
//   - a TFU sends a queued page from memory (DTX..MARK, the CRC as EOP, FREE) and
//     memory is accessed at most every second cycle; its event is logged;
//   - received words are written to the channel's free page in order; a page closes
//     on end of packet, on MARK and when it is full (64 words); the EOP word is
//     checked against the CRC of the words marked for it (good and bad cases);
//   - with no free page the receive path stalls (rx_stall) until one is supplied;
//   - irq and the event count follow the queue; events carry channel, flags, size;
//   - the host command register puts one command on the bus and reports the answer.
`timescale 1ns/1ps
module tb_host_interface;
  import prc_pkg::*;
  import re_isa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0] h_addr = '0;
  word_t       h_wdata = '0, h_rdata;
  logic        h_we = 0, h_re = 0, irq, run;
  logic [NUM_LINKS-1:0] cs_we, nf_in_wr, nf_out_rd;
  logic [NUM_LINKS-1:0] nf_in_full = 4'b0010, nf_out_empty = 4'b1011;
  logic [7:0]  cs_waddr, nf_in_data;
  instr_t      cs_wdata;
  logic [7:0]  nf_out_data [NUM_LINKS];
  logic [19:0] mem_addr;
  word_t       mem_wdata, mem_rdata = '0;
  logic        mem_we, mem_re;
  logic [NUM_NITX-1:0] ct_req, ct_gnt, ct_resp_valid = '0;
  ct_txn_t     ct_txn [NUM_NITX];
  logic        ct_resp_ok = 0;
  nitx_mask_t  busy = '0, held = '0;
  slv_mask_t   ct_resp_mask = '0;
  logic        hc_req, hc_gnt, hc_resp_valid = 0;
  ct_txn_t     hc_txn;
  slv_mask_t   slv_space = '1;
  logic        bus_valid = 0, host_space, rx_stall;
  ct_txn_t     bus_txn = '0;
  mid_t        bus_mid = '0;

  host_interface dut (
    .clk, .rst_n, .h_addr, .h_wdata, .h_we, .h_re, .h_rdata, .irq,
    .run, .cs_we, .cs_waddr, .cs_wdata, .nf_in_wr, .nf_in_data, .nf_out_rd, .nf_out_data,
    .nf_in_full, .nf_out_empty,
    .mem_addr, .mem_wdata, .mem_we, .mem_re, .mem_rdata,
    .ct_req, .ct_txn, .ct_gnt, .ct_resp_valid, .ct_resp_ok, .ct_resp_mask,
    .reserved(busy), .held, .slv_space, .hc_req, .hc_txn, .hc_gnt, .hc_resp_valid,
    .bus_valid, .bus_txn, .bus_mid, .host_space, .rx_stall
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t crc_step(word_t c, word_t w);
    for (int i = 31; i >= 0; i--) begin
      logic fb = c[31] ^ w[i];
      c = {c[30:0], 1'b0};
      if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  // ---------------------------------------------------------------- memory model
  word_t mem [logic [19:0]];
  int    last_acc = -10, acc_close = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (mem_we || mem_re) begin
      if (cyc - last_acc < 2) acc_close++;
      last_acc = cyc;
    end
    if (mem_we) mem[mem_addr] = mem_wdata;
    if (mem_re) mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : '0;
  end

  // ---------------------------------------------------------------- CTBUS model
  ct_txn_t tfu_seen [$];
  logic [NUM_NITX-1:0] rp0 = '0, rp1 = '0;
  always_comb begin
    ct_gnt = '0;
    for (int k = NUM_NITX-1; k >= 0; k--) if (ct_req[k]) ct_gnt = NUM_NITX'(1) << k;
  end
  // host command port: granted when no TFU asks; answered two cycles later with
  // the upper half of its mask
  ct_txn_t hc_seen [$];
  logic [1:0] hp = '0;
  slv_mask_t  hmask = '0;
  assign hc_gnt = hc_req && ct_gnt == '0;
  always @(posedge clk) begin
    hp <= {hp[0], hc_gnt};
    hc_resp_valid <= hp[1];
    if (hc_gnt) begin hc_seen.push_back(hc_txn); hmask <= hc_txn.addr & 13'h0FC0; end
    ct_resp_mask  <= hmask;
  end
  always @(posedge clk) begin
    ct_resp_valid <= rp1;
    ct_resp_ok    <= 1'b1;
    rp1 <= rp0;
    rp0 <= '0;
    for (int k = 0; k < NUM_NITX; k++) if (ct_gnt[k]) begin
      if (ct_txn[k].cmd == CT_RESV) rp0[k] <= 1'b1;
      else tfu_seen.push_back(ct_txn[k]);
    end
  end

  // ---------------------------------------------------------------- monitors
  int cs_hits = 0, nf_hits = 0;
  always @(posedge clk) begin
    if (cs_we == 4'b0010 && cs_waddr == 8'hA5 && cs_wdata == 24'h12_3456) cs_hits++;
    if (nf_in_wr == 4'b0100 && nf_in_data == 8'h5A) nf_hits++;
  end

  // ---------------------------------------------------------------- host access
  task automatic hw(logic [11:0] a, word_t d);
    @(negedge clk); h_addr = a; h_wdata = d; h_we = 1;
    @(negedge clk); h_we = 0;
  endtask
  task automatic hr(logic [11:0] a, output word_t d);
    @(negedge clk); h_addr = a; h_re = 1;
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  // one word from NIRX channel ch to the memory interface
  task automatic rx_word(int ch, ctcmd_e cmd, logic crc, word_t d);
    @(negedge clk);
    while (!host_space) @(negedge clk);
    bus_valid = 1; bus_mid = mid_t'(MID_NIRX0 + ch);
    bus_txn = '{cmd: cmd, addr: slv_mask_t'(1) << HOST_BIT, all: 1'b0, crc: crc, data: d};
    @(negedge clk);
    bus_valid = 0;
  endtask

  initial begin
    word_t r, ev, c;
    int t0, n;
    foreach (nf_out_data[l]) nf_out_data[l] = 8'h70 + 8'(l);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // control store, config, notifications
    hw(12'h1A5, 32'h0012_3456);
    check("control store write decoded", cs_hits == 1);
    hw(12'h482, 32'h3);
    hr(12'h482, r);
    check("config readback", r == 32'h3 && run);
    hw(12'h482, 32'h2);
    hw(12'h492, 32'h5A);
    check("notification write", nf_hits == 1);
    hr(12'h493, r);
    check("notification read", r == 32'h73);
    hr(12'h484, r);
    check("notification status", r == 32'h2B);

    // time stamp
    hw(12'h483, 32'd1000);
    t0 = cyc;
    repeat (37) @(posedge clk);
    hr(12'h483, r);
    check("time stamp counts", r == 32'd1000 + word_t'(cyc - t0) - 1);

    // TFU 7 sends one 5-word page with CRC
    for (int i = 0; i < 5; i++) mem[20'h08000 + 20'(i)] = 32'hF00D_0000 + i;
    hw(12'h407, {1'b1, 1'b0, 1'b0, 9'd4, 20'h08000});
    n = 0;
    while (tfu_seen.size() < 7 && n < 500) begin @(posedge clk); n++; end
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < 5; i++) c = crc_step(c, 32'hF00D_0000 + i);
    check("TFU word count", tfu_seen.size() == 7);
    if (tfu_seen.size() == 7) begin
      for (int i = 0; i < 5; i++)
        check($sformatf("TFU word %0d", i), tfu_seen[i].data == 32'hF00D_0000 + i &&
              tfu_seen[i].cmd == (i == 4 ? CT_MARK : CT_DTX) &&
              tfu_seen[i].addr == slv_mask_t'(1) << 7);
      check("TFU CRC as EOP", tfu_seen[5].cmd == CT_EOP && tfu_seen[5].data == c);
      check("TFU FREE", tfu_seen[6].cmd == CT_FREE);
    end
    repeat (5) @(posedge clk);
    check("irq with event", irq);
    hr(12'h480, ev);
    check("TFU event", ev[31:16] == {1'b0, 4'd7, 1'b1, 1'b0, 9'd4});

    // receive: channel 4 packet with good CRC into page 0x2000
    hw(12'h444, 32'h2000);
    c = 32'hFFFF_FFFF;
    rx_word(4, CT_DTX, 1'b0, 32'hABCD_0004);
    for (int i = 0; i < 9; i++) begin
      rx_word(4, CT_DTX, 1'b1, 32'h4400_0000 + i);
      c = crc_step(c, 32'h4400_0000 + i);
    end
    rx_word(4, CT_EOP, 1'b0, c);
    rx_word(4, CT_FREE, 1'b0, '0);
    repeat (20) @(posedge clk);
    begin
      automatic logic ok = mem[20'h2000] == 32'hABCD_0004 && mem[20'h200A] == c;
      for (int i = 0; i < 9; i++) if (mem[20'h2001 + 20'(i)] != 32'h4400_0000 + i) ok = 0;
      check("received packet in page", ok);
    end
    hr(12'h481, r);
    check("event count", r == 1);
    hr(12'h480, ev);
    check("receive event, good CRC", ev[31:16] == {1'b1, 4'd4, 1'b1, 1'b0, 9'd10});

    // no free page: stall, then supply one; bad CRC this time; MARK closes a page
    rx_word(4, CT_DTX, 1'b1, 32'h4500_0000);
    repeat (10) @(posedge clk);
    check("stall without free page", rx_stall);
    hw(12'h444, 32'h3000);
    repeat (10) @(posedge clk);
    check("stall ends", !rx_stall && mem[20'h3000] == 32'h4500_0000);
    rx_word(4, CT_MARK, 1'b1, 32'h4500_0001);
    hw(12'h444, 32'h3100);
    rx_word(4, CT_EOP, 1'b0, 32'h1234_5678);
    repeat (20) @(posedge clk);
    hr(12'h480, ev);
    check("MARK closes page", ev[31:16] == {1'b1, 4'd4, 1'b0, 1'b0, 9'd1});
    hr(12'h480, ev);
    check("bad CRC flagged", ev[31:16] == {1'b1, 4'd4, 1'b1, 1'b1, 9'd0} &&
                             mem[20'h3100] == 32'h1234_5678);

    // 70 words on channel 9: first 64-word page fills and closes
    hw(12'h449, 32'h4000);
    hw(12'h449, 32'h5000);
    for (int i = 0; i < 70; i++) rx_word(9, i == 69 ? CT_EOP : CT_DTX, 1'b0, 32'h9900_0000 + i);
    repeat (20) @(posedge clk);
    hr(12'h480, ev);
    check("full page closes", ev[31:16] == {1'b1, 4'd9, 1'b0, 1'b0, 9'd63});
    hr(12'h480, ev);
    check("rest in next page", ev[31:16] == {1'b1, 4'd9, 1'b1, 1'b1, 9'd5} &&
                               mem[20'h4000 + 20'd63] == 32'h9900_0000 + 63 &&
                               mem[20'h5000 + 20'd5] == 32'h9900_0000 + 69);
    hr(12'h481, r);
    check("queue empty", r == 0 && !irq);
    check("memory accessed at most every second cycle", acc_close == 0);

    // host command port: a HOLD goes on the bus once, its answer is readable
    hr(12'h486, r);
    check("queue full flags clear", r == 0);
    hw(12'h485, {13'h0, 3'(CT_HOLD), 2'b00, 1'b1, 13'h1041});
    hr(12'h485, r);
    check("host command pending", r[31]);
    hw(12'h485, {13'h0, 3'(CT_FREE), 2'b00, 1'b0, 13'h0001});   // ignored: busy
    repeat (10) @(posedge clk);
    hr(12'h485, r);
    check("host command answered", !r[31] && r[30] && r[12:0] == 13'h0040);
    check("host HOLD on the bus once", hc_seen.size() == 1 && hc_seen[0].cmd == CT_HOLD &&
          hc_seen[0].addr == 13'h1041 && hc_seen[0].all);
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
