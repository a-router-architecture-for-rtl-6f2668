// tb_prc_top: end-to-end test of the whole router at its default size (4 links,
// 3 virtual channels each, 28 bus masters), with every outgoing link looped back
// to the incoming link of the same number, as a single router can be wired for
// testing.
//
// The host side is modelled here: a buffer memory (word array), and a host that
// downloads a routing program into all four routing engines, supplies free pages,
// queues page tags for the TFUs and pops the event queue.
//
// Routing program: the header word is {flags, ctaddr1, ctaddr0, hops}. At each
// router a packet with hops = 0 (or any packet, once the host has sent the engine a
// non-zero notification) is buffered to memory; otherwise hops is decremented and
// the packet is forwarded to the slave mask {ctaddr1, ctaddr0}: flag bit 0 first
// tries a RESV from the engine and falls back to wait-for-one if it is refused,
// flag bit 1 asks for wait-for-all (multicast), otherwise wait-for-one; flag bit 2
// marks a header word for another router, which is skipped (the next word is read).
//
// Packets (TFU k sends on NITX k, which loops back into NIRX k):
//   P1  TFU0 -> NIRX0 -> NITX3 -> NIRX3 -> memory           (cut-through, then buffer)
//   P2  TFU1 -> NIRX1 -> NITX4 -> NIRX4 -> memory           (120 words, 2 pages)
//   P3  TFU2 -> NIRX2 -> engine RESV of NITX4 refused -> waits -> memory via NIRX4
//   P4  TFU5 -> NIRX5 -> waits for NITX4 -> memory via NIRX4
//   P5  TFU6 -> NIRX6 -> {NITX7, NITX10, memory} -> NIRX7, NIRX10 -> memory
//   P6  TFU3 -> NIRX3 -> NITX0 -> NIRX0 -> memory, header wrongly inside the CRC
//   P7  host notifies engine 0, then TFU0 -> NIRX0 -> memory (buffered at once)
//   P8  host HOLDs NITX9; TFU4 -> NIRX4 waits for NITX9 although it is not reserved
//   P9  TFU9 claims the held NITX9 with CHECK -> NIRX9 -> memory, before P8
//   P10 TFU10 -> NIRX10 -> memory, tag keeps the connection (no FREE)
//   P11 TFU10 through the kept connection -> memory unrouted, then FREE
//   P12 TFU7 -> NIRX7 with a two-word header: the engine skips the first word
//       (flag bit 2, meant for another node) and buffers on the second
// Checked: every copy lands in memory word for word with the header the routers
// wrote and the sender's CRC; the page events (count, end of packet, CRC error
// only for P6); all reservations released at the end; and that each mechanism
// happened: cut-through forwarding, buffering, multicast, wormhole waiting,
// refused reservation, link credit stall, receive page stall, FREE propagation,
// bus contention, notification FIFO use, CRC check and CRC error, host HOLD,
// CHECK of a held channel, and a connection kept across packets.
`timescale 1ns/1ps
module tb_prc_top;
  import prc_pkg::*;
  import re_isa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [SYM_W-1:0]  rx_sym [NUM_LINKS], tx_sym [NUM_LINKS];
  logic              rx_valid [NUM_LINKS], tx_valid [NUM_LINKS];
  logic [NUM_VC-1:0] rx_ack [NUM_LINKS], tx_ack [NUM_LINKS];
  logic [11:0] h_addr = '0;
  word_t       h_wdata = '0, h_rdata;
  logic        h_we = 0, h_re = 0, irq;
  logic [19:0] mem_addr;
  word_t       mem_wdata, mem_rdata = '0;
  logic        mem_we, mem_re;

  prc_top dut (.clk, .rst_n, .rx_sym, .rx_valid, .rx_ack, .tx_sym, .tx_valid, .tx_ack,
               .h_addr, .h_wdata, .h_we, .h_re, .h_rdata, .irq,
               .mem_addr, .mem_wdata, .mem_we, .mem_re, .mem_rdata);

  // loopback: link l out -> link l in
  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_loop
    assign rx_sym[l]   = tx_sym[l];
    assign rx_valid[l] = tx_valid[l];
    assign tx_ack[l]   = rx_ack[l];
  end

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

  // ---------------------------------------------------------------- routing program
  localparam logic [7:0] WT = 2, H = 3, TRY = 22, MC = 28, BUF = 30;
  localparam logic [7:0] CTL_RESVD = 8'h00, CTL_WAIT1 = 8'h08, CTL_WAITALL = 8'h10,
                         CTL_RESV_ALL = 8'h24;
  instr_t prog [44];
  initial begin
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = i_ldc(H, R_TRAP0, GO_NONE);
    prog[1]  = i_ldc(H, R_TRAP1, GO_NONE);
    prog[2]  = i_wait();
    prog[3]  = i_jump(1'b1, C_NOTIFY, 8'd5, 1'b0, 1'b0);
    prog[4]  = i_xfer(R_NFIFO, 5'd1, GO_NONE);               // reg1 <- host note
    prog[5]  = i_alu(ALU_PASS, 5'd1, 1'b0, 5'd0, 8'd0);
    prog[6]  = i_jump(1'b1, C_ZERO, BUF, 1'b0, 1'b0);
    prog[7]  = i_jump(1'b0, C_TRUE, 8'd38, 1'b0, 1'b0);
    prog[8]  = i_jump(1'b0, C_ZERO, BUF, 1'b0, 1'b0);
    prog[9]  = i_alu(ALU_SUB, R_NID0, 1'b1, 5'd0, 8'd1);
    prog[10] = i_xfer(R_ACC, R_CTD0, GO_NONE);
    prog[11] = i_xfer(R_NID0 + 1, R_CTD0 + 1, GO_NONE);
    prog[12] = i_xfer(R_NID0 + 2, R_CTD0 + 2, GO_NONE);
    prog[13] = i_xfer(R_NID0 + 3, R_CTD0 + 3, GO_NONE);
    prog[14] = i_xfer(R_NID0 + 1, R_CTADDR0, GO_NONE);
    prog[15] = i_xfer(R_NID0 + 2, R_CTADDR1, GO_NONE);
    prog[16] = i_alu(ALU_AND, R_NID0 + 3, 1'b1, 5'd0, 8'h01);
    prog[17] = i_jump(1'b1, C_ZERO, TRY, 1'b0, 1'b0);
    prog[18] = i_alu(ALU_AND, R_NID0 + 3, 1'b1, 5'd0, 8'h02);
    prog[19] = i_jump(1'b1, C_ZERO, MC, 1'b0, 1'b0);
    prog[20] = i_ldc(CTL_WAIT1, R_CTCTL, GO_RTP);
    prog[21] = i_jump(1'b0, C_TRUE, WT, 1'b0, 1'b0);
    prog[22] = i_ldc(CTL_RESV_ALL, R_CTCTL, GO_CTBUS);       // TRY
    prog[23] = i_jump(1'b1, C_ACK, 8'd26, 1'b0, 1'b0);
    prog[24] = i_ldc(CTL_RESVD, R_CTCTL, GO_RTP);
    prog[25] = i_jump(1'b0, C_TRUE, WT, 1'b0, 1'b0);
    prog[26] = i_ldc(CTL_WAIT1, R_CTCTL, GO_RTP);
    prog[27] = i_jump(1'b0, C_TRUE, WT, 1'b0, 1'b0);
    prog[28] = i_ldc(CTL_WAITALL, R_CTCTL, GO_RTP);          // MC
    prog[29] = i_jump(1'b0, C_TRUE, WT, 1'b0, 1'b0);
    prog[30] = i_xfer(R_NID0, R_CTD0, GO_NONE);              // BUF
    prog[31] = i_xfer(R_NID0 + 1, R_CTD0 + 1, GO_NONE);
    prog[32] = i_xfer(R_NID0 + 2, R_CTD0 + 2, GO_NONE);
    prog[33] = i_xfer(R_NID0 + 3, R_CTD0 + 3, GO_NONE);
    prog[34] = i_ldc(8'h00, R_CTADDR0, GO_NONE);
    prog[35] = i_ldc(8'h40, R_CTADDR1, GO_NONE);
    prog[36] = i_ldc(CTL_RESVD, R_CTCTL, GO_RTP);
    prog[37] = i_jump(1'b0, C_TRUE, WT, 1'b0, 1'b0);
    prog[38] = i_alu(ALU_AND, R_NID0 + 3, 1'b1, 5'd0, 8'h04);   // skip flag?
    prog[39] = i_jump(1'b1, C_ZERO, 8'd42, 1'b0, 1'b0);
    prog[40] = i_alu(ALU_PASS, R_NID0, 1'b0, 5'd0, 8'd0);
    prog[41] = i_jump(1'b0, C_TRUE, 8'd8, 1'b0, 1'b0);
    prog[42] = i_wait();                                      // next header word
    prog[43] = i_jump(1'b0, C_TRUE, 8'd38, 1'b0, 1'b0);
  end

  // ---------------------------------------------------------------- buffer memory
  localparam logic [19:0] RXBASE = 20'h10000, TXBASE = 20'h80000;
  word_t mem [logic [19:0]];
  word_t rx_stream [NUM_NITX][$];
  always @(posedge clk) begin
    if (mem_we) begin
      mem[mem_addr] = mem_wdata;
      if (mem_addr >= RXBASE && mem_addr < RXBASE + 20'h30000)
        rx_stream[(mem_addr - RXBASE) >> 14].push_back(mem_wdata);
    end
    if (mem_re) mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 32'hBAD0_BAD0;
  end

  // ---------------------------------------------------------------- host model
  typedef struct { logic [11:0] a; word_t d; } hw_t;
  hw_t   wq [$];
  int    next_page [NUM_NITX];
  word_t events [$];
  int    stall_run = 0;
  logic  ev_pend = 0;

  function automatic word_t page_addr(int ch);
    word_t a = word_t'(RXBASE) + word_t'(ch) * 32'h4000 + word_t'(next_page[ch]) * 32'h40;
    next_page[ch]++;
    return a;
  endfunction

  always @(negedge clk) begin
    if (ev_pend) begin
      events.push_back(h_rdata);
      ev_pend = 0;
    end
    h_we = 0; h_re = 0;
    if (rst_n) begin
      if (wq.size() > 0) begin
        automatic hw_t w = wq.pop_front();
        h_addr = w.a; h_wdata = w.d; h_we = 1;
      end else if (stall_run >= 20) begin
        automatic int ch = int'(dut.u_host.hc);
        h_addr = 12'h440 + 12'(ch); h_wdata = page_addr(ch); h_we = 1;
        stall_run = 0;
      end else if (irq) begin
        h_addr = 12'h480; h_re = 1; ev_pend = 1;
      end
    end
  end

  task automatic hwrite(logic [11:0] a, word_t d);
    wq.push_back('{a: a, d: d});
  endtask

  // ---------------------------------------------------------------- packets
  typedef struct {
    int    tfu;
    word_t hdr;
    int    n;           // data words
    int    page;        // data words per TFU page
    logic  hdr_in_crc;
    word_t hdr_at_dest;
    int    dests [$];
  } pkt_t;
  pkt_t pk [13];

  function automatic word_t dword(int p, int i);
    return {8'(p), 8'hD0, 16'(i)};
  endfunction
  function automatic word_t pkt_crc(int p);
    word_t c = 32'hFFFF_FFFF;
    if (pk[p].hdr_in_crc) c = crc_step(c, pk[p].hdr);
    for (int i = 0; i < pk[p].n; i++) c = crc_step(c, dword(p, i));
    return c;
  endfunction

  task automatic send(int p, logic keep = 1'b0, logic skip_word = 1'b0);
    logic [19:0] base = TXBASE + 20'(p) * 20'h1000;
    int np = (pk[p].n + pk[p].page - 1) / pk[p].page;
    mem[base] = pk[p].hdr;
    if (skip_word) begin           // a header word for another node goes first
      mem[base]         = 32'h04EE_EE77;
      mem[base + 20'd1] = pk[p].hdr;
    end
    for (int i = 0; i < pk[p].n; i++) mem[base + 20'h100 + 20'(i)] = dword(p, i);
    hwrite(12'h400 + 12'(pk[p].tfu), {1'b0, !pk[p].hdr_in_crc, 10'(skip_word), base});
    for (int j = 0; j < np; j++) begin
      int len = (j == np - 1) ? pk[p].n - j * pk[p].page : pk[p].page;
      hwrite(12'h400 + 12'(pk[p].tfu),
             {(j == np - 1), 1'b0, keep && (j == np - 1), 9'(len - 1),
              base + 20'h100 + 20'(j * pk[p].page)});
    end
  endtask

  function automatic int words_expected(int ch);
    int n = 0;
    for (int p = 1; p < 13; p++)
      foreach (pk[p].dests[k]) if (pk[p].dests[k] == ch) n += pk[p].n + 2;
    return n;
  endfunction

  task automatic wait_words(int ch, int n, int max, string what);
    int t = 0;
    while (rx_stream[ch].size() < n && t < max) begin @(posedge clk); t++; end
    check({what, " arrived"}, rx_stream[ch].size() >= n);
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_cut = 0, n_buf = 0, n_mcast = 0, n_wait = 0, n_refused = 0, n_credit = 0,
      n_pstall = 0, n_free = 0, n_contend = 0, n_note = 0, n_tfu_pages = 0,
      n_host_hold = 0, n_check = 0, n_tfu_eop = 0, n_tfu_free = 0, n_skip = 0;
  logic [NUM_VC-1:0] wt [NUM_LINKS];
  logic              nrd [NUM_LINKS];
  logic              hskip [NUM_LINKS];
  logic [NUM_VC-1:0] cstall [NUM_LINKS];
  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_obs
    assign wt[l]  = dut.g_link[l].waiting;
    assign nrd[l] = dut.g_link[l].u_rx.u_re.nfi_rd;
    assign hskip[l] = dut.g_link[l].u_rx.u_re.hdr_pop != '0 && dut.g_link[l].u_rx.u_re.hdr_open;
    for (genvar c = 0; c < NUM_VC; c++) begin : g_vc
      assign cstall[l][c] = !dut.g_link[l].u_tx.empty[c] &&
                            dut.g_link[l].u_tx.credit[c] == '0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.bus_valid) begin
      automatic ct_txn_t t = dut.bus_txn;
      automatic logic from_nirx = dut.bus_mid >= mid_t'(MID_NIRX0) && dut.bus_mid < mid_t'(MID_TFU0);
      if (from_nirx && is_data_cmd(t.cmd) && t.addr[NUM_NITX-1:0] != '0) n_cut++;
      if (from_nirx && t.cmd == CT_FREE && t.addr[NUM_NITX-1:0] != '0) n_free++;
      if (is_data_cmd(t.cmd) && $countones(t.addr) > 1) n_mcast++;
      if (dut.bus_mid == mid_t'(MID_HOST) && t.cmd == CT_HOLD) n_host_hold++;
      if (dut.bus_mid >= mid_t'(MID_TFU0) && dut.bus_mid < mid_t'(MID_HOST)) begin
        if (t.cmd == CT_EOP) n_tfu_eop++;
        if (t.cmd == CT_FREE) n_tfu_free++;
        if (t.cmd == CT_CHECK) n_check++;
      end
    end
    if (dut.resp_valid && dut.resp_mid < mid_t'(MID_NIRX0) && !dut.resp_ok) n_refused++;
    if ($countones(dut.m_req) > 1) n_contend++;
    if (dut.rx_stall) begin n_pstall++; stall_run++; end else stall_run = 0;
    for (int l = 0; l < NUM_LINKS; l++) begin
      if (wt[l] != '0) n_wait++;
      if (nrd[l]) n_note++;
      if (hskip[l]) n_skip++;
      if (cstall[l] != '0) n_credit++;
    end
  end

  // ---------------------------------------------------------------- test
  initial begin
    int t;
    for (int k = 0; k < NUM_NITX; k++) next_page[k] = 0;
    pk[1] = '{tfu: 0, hdr: 32'h0000_0801, n: 40, page: 40, hdr_in_crc: 0,
              hdr_at_dest: 32'h0000_0800, dests: '{3}};
    pk[2] = '{tfu: 1, hdr: 32'h0000_1001, n: 120, page: 60, hdr_in_crc: 0,
              hdr_at_dest: 32'h0000_1000, dests: '{4}};
    pk[3] = '{tfu: 2, hdr: 32'h0100_1001, n: 30, page: 30, hdr_in_crc: 0,
              hdr_at_dest: 32'h0100_1000, dests: '{4}};
    pk[4] = '{tfu: 5, hdr: 32'h0000_1001, n: 30, page: 30, hdr_in_crc: 0,
              hdr_at_dest: 32'h0000_1000, dests: '{4}};
    pk[5] = '{tfu: 6, hdr: 32'h0252_0001, n: 50, page: 50, hdr_in_crc: 0,
              hdr_at_dest: 32'h0252_0000, dests: '{6, 7, 10}};
    pk[6] = '{tfu: 3, hdr: 32'h0000_0101, n: 30, page: 30, hdr_in_crc: 1,
              hdr_at_dest: 32'h0000_0100, dests: '{0}};
    pk[7] = '{tfu: 0, hdr: 32'h0000_0801, n: 20, page: 20, hdr_in_crc: 0,
              hdr_at_dest: 32'h0000_0801, dests: '{0}};
    pk[8] = '{tfu: 4, hdr: 32'h0008_0001, n: 24, page: 24, hdr_in_crc: 0,
              hdr_at_dest: 32'h0008_0000, dests: '{9}};
    pk[9] = '{tfu: 9, hdr: 32'h0000_0900, n: 16, page: 16, hdr_in_crc: 0,
              hdr_at_dest: 32'h0000_0900, dests: '{9}};
    pk[10] = '{tfu: 10, hdr: 32'h0000_0A00, n: 16, page: 16, hdr_in_crc: 0,
               hdr_at_dest: 32'h0000_0A00, dests: '{10}};
    pk[11] = '{tfu: 10, hdr: 32'h0020_0001, n: 20, page: 20, hdr_in_crc: 1,
               hdr_at_dest: 32'h0020_0001, dests: '{10}};
    pk[12] = '{tfu: 7, hdr: 32'h0000_0C00, n: 12, page: 12, hdr_in_crc: 0,
               hdr_at_dest: 32'h0000_0C00, dests: '{7}};

    repeat (4) @(posedge clk);
    rst_n = 1;
    // download the program into every engine, give each channel two pages, run
    for (int l = 0; l < NUM_LINKS; l++)
      for (int i = 0; i < 44; i++) hwrite(12'(l * 256 + i), word_t'(prog[i]));
    for (int k = 0; k < NUM_NITX; k++) begin
      hwrite(12'h440 + 12'(k), page_addr(k));
      hwrite(12'h440 + 12'(k), page_addr(k));
    end
    hwrite(12'h482, 32'h2);
    t = 0;
    while (wq.size() > 0 && t < 2000) begin @(posedge clk); t++; end

    // P1: forward once, then buffer
    send(1);
    wait_words(3, words_expected(3), 20000, "P1");

    // P2 first, then P3 and P4 compete for the same NITX
    send(2);
    t = 0;
    while (!dut.reserved[4] && t < 5000) begin @(posedge clk); t++; end
    check("P2 holds NITX4", dut.reserved[4]);
    send(3);
    send(4);
    wait_words(4, words_expected(4), 60000, "P2-P4");

    // P5: multicast
    send(5);
    foreach (pk[5].dests[k]) wait_words(pk[5].dests[k], pk[5].n + 2, 30000, "P5 copy");

    // P6: header wrongly included in the CRC
    send(6);
    wait_words(0, pk[6].n + 2, 20000, "P6");

    // P7: the host tells engine 0 to buffer everything
    hwrite(12'h490, 32'h1);
    send(7);
    wait_words(0, words_expected(0), 20000, "P7");

    // P8/P9: the host holds NITX9; P8 (via NIRX4) must wait for it although it is
    // free, while TFU9 claims it with CHECK and sends P9 first
    hwrite(12'h485, {13'h0, 3'(CT_HOLD), 2'b00, 1'b0, 13'h0200});
    t = 0;
    while (!dut.held[9] && t < 2000) begin @(posedge clk); t++; end
    check("host HOLD placed", dut.held[9] && !dut.reserved[9]);
    send(8);
    t = 0;
    while (!dut.g_link[1].waiting[1] && t < 5000) begin @(posedge clk); t++; end
    repeat (200) @(posedge clk);
    check("P8 waits on the held NITX", dut.g_link[1].waiting[1] && !dut.reserved[9]);
    send(9);
    wait_words(9, words_expected(9), 40000, "P8/P9");
    check("P9 (host side) before P8 on the held NITX",
          rx_stream[9].size() > 1 && rx_stream[9][1][31:24] == 8'd9);

    // P10/P11: P10's tag keeps the connection, so P11 follows it to memory through
    // NIRX10 without being routed (its header, which asks for NITX11, arrives as is)
    send(10, 1'b1);
    send(11);
    wait_words(10, words_expected(10), 40000, "P10/P11");

    // P12: two header words; the engine skips the first (meant for another node)
    send(12, 1'b0, 1'b1);
    wait_words(7, words_expected(7), 20000, "P12");

    // drain: all links idle, all events read
    t = 0;
    while (t < 20000 && (wq.size() > 0 || irq || dut.reserved != '0 ||
           !dut.g_link[0].tx_idle || !dut.g_link[1].tx_idle ||
           !dut.g_link[2].tx_idle || !dut.g_link[3].tx_idle)) begin
      @(posedge clk); t++;
    end
    repeat (50) @(posedge clk);

    // ---------------------------------------------------------------- data check
    for (int ch = 0; ch < NUM_NITX; ch++) begin
      automatic int i = 0;
      int got [13];
      foreach (got[p]) got[p] = 0;
      check($sformatf("ch %0d word count", ch), rx_stream[ch].size() == words_expected(ch));
      while (i + 1 < rx_stream[ch].size()) begin
        automatic word_t h = rx_stream[ch][i];
        automatic int p = int'(rx_stream[ch][i+1][31:24]);
        automatic logic ok = 1;
        if (p < 1 || p > 12) begin
          check($sformatf("ch %0d: unknown packet", ch), 0);
          break;
        end
        got[p]++;
        if (h != pk[p].hdr_at_dest) ok = 0;
        for (int k = 0; k < pk[p].n; k++)
          if (i + 1 + k >= rx_stream[ch].size() || rx_stream[ch][i+1+k] != dword(p, k)) ok = 0;
        if (i + 1 + pk[p].n >= rx_stream[ch].size() ||
            rx_stream[ch][i+1+pk[p].n] != pkt_crc(p)) ok = 0;
        check($sformatf("P%0d intact in ch %0d", p, ch), ok);
        i += pk[p].n + 2;
      end
      for (int p = 1; p < 13; p++) begin
        automatic int n = 0;
        foreach (pk[p].dests[k]) if (pk[p].dests[k] == ch) n++;
        check($sformatf("P%0d copies in ch %0d", p, ch), got[p] == n);
      end
    end

    // ---------------------------------------------------------------- events
    begin
      automatic int n_rx_eop = 0, n_err = 0, n_tx = 0, n_tx_last = 0, err_ch = -1;
      foreach (events[k]) begin
        if (events[k][31]) begin
          n_buf++;
          if (events[k][26]) n_rx_eop++;
          if (events[k][25]) begin n_err++; err_ch = int'(events[k][30:27]); end
        end else begin
          n_tx++;
          if (events[k][26]) n_tx_last++;
        end
      end
      n_tfu_pages = n_tx;
      check("one receive end-of-packet event per copy", n_rx_eop == 14);
      check("exactly one CRC error, on P6's channel", n_err == 1 && err_ch == 0);
      check("TFU page events", n_tx == 12 + 1 + 2 + 1 + 1 + 1 + 1 + 1 + 4 + 1 && n_tx_last == 12);
    end
    check("all reservations released", dut.reserved == '0 && dut.held == '0);
    check("all links idle", dut.g_link[0].tx_idle && dut.g_link[1].tx_idle &&
                            dut.g_link[2].tx_idle && dut.g_link[3].tx_idle);

    $display("mechanisms: cut-through words %0d, buffered pages %0d, multicast words %0d",
             n_cut, n_buf, n_mcast);
    $display("            wormhole wait cycles %0d, refused engine RESVs %0d", n_wait, n_refused);
    $display("            link credit stall cycles %0d, receive page stall cycles %0d",
             n_credit, n_pstall);
    $display("            FREEs forwarded %0d, bus contention cycles %0d, notifications %0d",
             n_free, n_contend, n_note);
    $display("            TFU pages sent %0d, host HOLDs %0d, TFU CHECKs %0d, kept connections %0d",
             n_tfu_pages, n_host_hold, n_check, n_tfu_eop - n_tfu_free);
    $display("            header words skipped %0d", n_skip);
    check("mechanism: cut-through forwarding", n_cut > 0);
    check("mechanism: buffering to memory", n_buf > 0);
    check("mechanism: multicast", n_mcast > 0);
    check("mechanism: wormhole wait", n_wait > 0);
    check("mechanism: refused reservation", n_refused > 0);
    check("mechanism: link credit stall", n_credit > 0);
    check("mechanism: receive page stall", n_pstall > 0);
    check("mechanism: FREE propagation", n_free > 0);
    check("mechanism: bus contention", n_contend > 0);
    check("mechanism: notification FIFO", n_note > 0);
    check("mechanism: TFU transmission", n_tfu_pages > 0);
    check("mechanism: host HOLD", n_host_hold == 1);
    check("mechanism: CHECK claims a held NITX", n_check == 1);
    check("mechanism: connection kept across a packet", n_tfu_eop - n_tfu_free == 1);
    check("mechanism: header word skipped", n_skip == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
