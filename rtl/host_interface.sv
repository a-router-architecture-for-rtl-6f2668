// host_interface: the PRC's memory and control interface, with the twelve TFUs and
// the transmit/receive CRC units and the time-stamp unit.
//
// The host talks to the PRC in pages. It sends a packet by placing it in buffer
// memory (its own DMA, not through the PRC), then writing page tags into the
// transmission page queue of a TFU; it receives by supplying free pages to the
// reception page queue of each incoming virtual channel. Completed pages, sent or
// received, are logged in the event queue; irq is high while events wait.
//
// Control interface (synchronous, one access per cycle, read data one cycle later):
//   write 0x000-0x3FF  control store word: link = addr[9:8], index = addr[7:0]
//   write 0x400+k      transmission page tag for TFU/NITX k (format in tfu)
//   write 0x440+k      free page word address for reception channel k (link*3+vc)
//   r/w   0x482        config: [0] 1024-byte pages (else 256-byte), [1] run engines
//   read  0x480        pop the event queue (0 when empty)
//   read  0x481        number of queued events
//   r/w   0x483        time stamp (write loads it)
//   read  0x484        notification FIFO status: [7:4] host->engine full,
//                      [3:0] engine->host empty (one bit per link)
//   write 0x485        host command: [18:16] CTBUS command, [13] all, [12:0] slave
//                      mask; issued on the CTBUS as master 28 (ignored while busy)
//   read  0x485        [31] command pending, [30] last command ok, [12:0] the mask
//                      the reservation unit returned
//   read  0x486        [27:16] reception page queue full, [11:0] TFU tag queue full
// The host command port lets the host HOLD an NITX (later RESVs by routing engines
// and NIRXs fail), which the TFU of that NITX then claims with CHECK; it can also
// RESV or FREE channels directly, e.g. to end a connection kept open across packets.
//   r/w   0x490+l      notification FIFO of the routing engine of link l
// Buffer memory port: one access every second cycle (the memory runs at half the
// core clock), word address, read data valid the cycle after mem_re. Accesses are
// shared by the TFUs' reads and the receive path's writes through a binary-tree
// arbiter of the same kind as the CTBUS's.
// Receive path: CTBUS words addressed to the memory interface (slave bit 12) are
// queued with the NIRX that sent them. Each word goes to the next location of that
// channel's open page, taking a new page from the reception page queue when needed.
// A page closes on MARK, on EOP or when full, and its event is logged:
//   [31]=1 receive, [30:27] channel, [26] end of packet, [25] CRC error,
//   [24:16] words in the page minus 1, [15:0] time stamp.
// On EOP the word is the sender's CRC and is compared with the running CRC of the
// words marked for the CRC (it is stored too). A FREE closes an open page and
// restarts the channel's CRC.
// The queues, page sizes, event queue, CRC and time stamping are from the design;
// the register map, tag and event formats and the arbitration are this design's own.
module host_interface
  import prc_pkg::*;
  import re_isa_pkg::*;
#(
  parameter int unsigned RXQ_DEPTH = 8,
  parameter int unsigned EVQ_DEPTH = 16,
  parameter int unsigned FPQ_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // control interface
  input  logic [11:0] h_addr,
  input  word_t       h_wdata,
  input  logic        h_we,
  input  logic        h_re,
  output word_t       h_rdata,
  output logic        irq,
  // routing engine control
  output logic        run,
  output logic [NUM_LINKS-1:0] cs_we,
  output logic [7:0]  cs_waddr,
  output instr_t      cs_wdata,
  output logic [NUM_LINKS-1:0] nf_in_wr,
  output logic [7:0]  nf_in_data,
  output logic [NUM_LINKS-1:0] nf_out_rd,
  input  logic [7:0]  nf_out_data [NUM_LINKS],
  input  logic [NUM_LINKS-1:0] nf_in_full,
  input  logic [NUM_LINKS-1:0] nf_out_empty,
  // buffer memory
  output logic [19:0] mem_addr,
  output word_t       mem_wdata,
  output logic        mem_we,
  output logic        mem_re,
  input  word_t       mem_rdata,
  // CTBUS: TFU master ports
  output logic [NUM_NITX-1:0] ct_req,
  output ct_txn_t     ct_txn [NUM_NITX],
  input  logic [NUM_NITX-1:0] ct_gnt,
  input  logic [NUM_NITX-1:0] ct_resp_valid,
  input  logic        ct_resp_ok,
  input  slv_mask_t   ct_resp_mask,
  input  nitx_mask_t  reserved,
  input  nitx_mask_t  held,
  input  slv_mask_t   slv_space,
  // CTBUS: host command master port
  output logic        hc_req,
  output ct_txn_t     hc_txn,
  input  logic        hc_gnt,
  input  logic        hc_resp_valid,
  // CTBUS: memory interface as slave
  input  logic        bus_valid,
  input  ct_txn_t     bus_txn,
  input  mid_t        bus_mid,
  output logic        host_space,
  // observation
  output logic        rx_stall      // receive word waiting for a free page
);
  localparam int unsigned NM = NUM_NITX + 1;   // memory requesters: 12 TFUs + receive

  // ---------------------------------------------------------------- time stamp
  word_t now;
  logic  ts_load;
  assign ts_load = h_we && h_addr == 12'h483;
  timestamp_unit u_ts (.clk, .rst_n, .load(ts_load), .load_value(h_wdata), .now);

  // ---------------------------------------------------------------- config
  logic big_pages;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      big_pages <= 1'b0;
      run       <= 1'b0;
    end else if (h_we && h_addr == 12'h482) begin
      big_pages <= h_wdata[0];
      run       <= h_wdata[1];
    end
  end

  assign cs_waddr   = h_addr[7:0];
  assign cs_wdata   = h_wdata[23:0];
  assign nf_in_data = h_wdata[7:0];
  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_link
    assign cs_we[l]     = h_we && h_addr[11:10] == 2'b00 && h_addr[9:8] == 2'(l);
    assign nf_in_wr[l]  = h_we && h_addr == 12'h490 + 12'(l);
    assign nf_out_rd[l] = h_re && h_addr == 12'h490 + 12'(l);
  end

  // ---------------------------------------------------------------- event queue
  logic        evq_wr, evq_rd, evq_empty, evq_full;
  word_t       evq_wdata, evq_head;
  logic [$clog2(EVQ_DEPTH):0] evq_cnt;
  sync_fifo #(.W(32), .DEPTH(EVQ_DEPTH)) u_evq (
    .clk, .rst_n, .wr(evq_wr), .wdata(evq_wdata), .rd(evq_rd), .rdata(evq_head),
    .empty(evq_empty), .full(evq_full), .count(evq_cnt)
  );
  assign evq_rd = h_re && h_addr == 12'h480;
  assign irq    = !evq_empty;

  // ---------------------------------------------------------------- host commands
  logic      hc_pend, hc_sent, hc_ok;
  slv_mask_t hc_mask;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc_pend <= 1'b0;
      hc_sent <= 1'b0;
      hc_ok   <= 1'b0;
      hc_mask <= '0;
      hc_txn  <= '0;
    end else if (!hc_pend) begin
      if (h_we && h_addr == 12'h485) begin
        hc_pend      <= 1'b1;
        hc_sent      <= 1'b0;
        hc_txn.cmd   <= ctcmd_e'(h_wdata[18:16]);
        hc_txn.all   <= h_wdata[13];
        hc_txn.addr  <= h_wdata[12:0];
        hc_txn.crc   <= 1'b0;
        hc_txn.data  <= '0;
      end
    end else if (!hc_sent) begin
      if (hc_gnt) hc_sent <= 1'b1;
    end else if (hc_resp_valid) begin
      hc_pend <= 1'b0;
      hc_ok   <= ct_resp_ok;
      hc_mask <= ct_resp_mask;
    end
  end
  assign hc_req = hc_pend && !hc_sent;

  // ---------------------------------------------------------------- host reads
  logic [NUM_NITX-1:0] tag_full, fp_full;   // TFU tag queues, reception page queues
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_rdata <= '0;
    else if (h_re) begin
      unique case (h_addr)
        12'h480: h_rdata <= evq_empty ? '0 : evq_head;
        12'h481: h_rdata <= word_t'(evq_cnt);
        12'h482: h_rdata <= {30'h0, run, big_pages};
        12'h483: h_rdata <= now;
        12'h484: h_rdata <= {24'h0, nf_in_full, nf_out_empty};
        12'h485: h_rdata <= {hc_pend, hc_ok, 17'h0, hc_mask};
        12'h486: h_rdata <= {4'h0, fp_full, 4'h0, tag_full};
        12'h490: h_rdata <= {24'h0, nf_out_data[0]};
        12'h491: h_rdata <= {24'h0, nf_out_data[1]};
        12'h492: h_rdata <= {24'h0, nf_out_data[2]};
        12'h493: h_rdata <= {24'h0, nf_out_data[3]};
        default: h_rdata <= '0;
      endcase
    end
  end

  // ---------------------------------------------------------------- memory arbitration
  logic          slot;
  logic [NM-1:0] m_req, m_gnt;
  logic          m_gv;
  logic [$clog2(NM)-1:0] m_gid;
  logic          rd_pend;
  logic [$clog2(NM)-1:0] rd_owner;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot <= 1'b0;
    else        slot <= !slot;
  end

  ctbus_arbiter #(.N(NM)) u_marb (
    .clk, .rst_n, .req(slot ? m_req : '0), .gnt(m_gnt), .gnt_valid(m_gv), .gnt_id(m_gid)
  );

  // ---------------------------------------------------------------- TFUs
  logic [NUM_NITX-1:0] t_mreq, t_crc_en, t_crc_clr, t_ev_valid, t_ev_ack, t_rvalid;
  logic [19:0]         t_maddr [NUM_NITX];
  word_t               t_ev [NUM_NITX];
  word_t               tx_crc [NUM_NITX];

  for (genvar k = 0; k < NUM_NITX; k++) begin : g_tfu
    tfu #(.NITX_ID(k)) u_tfu (
      .clk, .rst_n,
      .tag_wr(h_we && h_addr == 12'h400 + 12'(k)), .tag_data(h_wdata), .tag_full(tag_full[k]),
      .mem_req(t_mreq[k]), .mem_addr(t_maddr[k]), .mem_gnt(m_gnt[k]),
      .mem_rvalid(t_rvalid[k]), .mem_rdata,
      .crc_en(t_crc_en[k]), .crc_clr(t_crc_clr[k]), .crc_state(tx_crc[k]),
      .ct_req(ct_req[k]), .ct_txn(ct_txn[k]), .ct_gnt(ct_gnt[k]),
      .ct_resp_valid(ct_resp_valid[k]), .ct_resp_ok,
      .reserved, .held, .nitx_space(slv_space[k]),
      .ev_valid(t_ev_valid[k]), .ev_data(t_ev[k]), .ev_ack(t_ev_ack[k])
    );
    assign t_rvalid[k] = rd_pend && rd_owner == $clog2(NM)'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend  <= 1'b0;
      rd_owner <= '0;
    end else begin
      rd_pend  <= m_gv && m_gid != $clog2(NM)'(NUM_NITX);
      rd_owner <= m_gid;
    end
  end

  crc_unit #(.NCH(NUM_NITX)) u_txcrc (
    .clk, .rst_n, .clr(t_crc_clr), .upd_en(|t_crc_en), .upd_ch(4'(rd_owner)),
    .upd_word(mem_rdata), .state(tx_crc)
  );

  // ---------------------------------------------------------------- receive path
  typedef struct packed {
    logic [3:0] ch;
    ctcmd_e     cmd;
    logic       crc;
    word_t      data;
  } rxent_t;

  logic   rxq_wr, rxq_rd, rxq_empty, rxq_full;
  rxent_t rxq_w, rxq_h;
  logic [$clog2(RXQ_DEPTH):0] rxq_cnt;

  assign rxq_wr = bus_valid && bus_txn.addr[HOST_BIT] &&
                  (is_data_cmd(bus_txn.cmd) || bus_txn.cmd == CT_FREE) &&
                  bus_mid >= mid_t'(MID_NIRX0) && bus_mid < mid_t'(MID_TFU0);
  always_comb begin
    rxq_w.ch   = 4'(bus_mid - mid_t'(MID_NIRX0));
    rxq_w.cmd  = bus_txn.cmd;
    rxq_w.crc  = bus_txn.crc;
    rxq_w.data = bus_txn.data;
  end
  sync_fifo #(.W($bits(rxent_t)), .DEPTH(RXQ_DEPTH)) u_rxq (
    .clk, .rst_n, .wr(rxq_wr), .wdata(rxq_w), .rd(rxq_rd), .rdata(rxq_h),
    .empty(rxq_empty), .full(rxq_full), .count(rxq_cnt)
  );
  assign host_space = (rxq_cnt < ($clog2(RXQ_DEPTH)+1)'(RXQ_DEPTH - 2));

  // reception page queues
  logic [NUM_NITX-1:0] fp_empty, fp_pop;
  logic [19:0]         fp_head [NUM_NITX];
  for (genvar k = 0; k < NUM_NITX; k++) begin : g_fpq
    logic [$clog2(FPQ_DEPTH):0] cnt;
    sync_fifo #(.W(20), .DEPTH(FPQ_DEPTH)) u_fpq (
      .clk, .rst_n, .wr(h_we && h_addr == 12'h440 + 12'(k)), .wdata(h_wdata[19:0]),
      .rd(fp_pop[k]), .rdata(fp_head[k]), .empty(fp_empty[k]), .full(fp_full[k]), .count(cnt)
    );
  end

  logic [NUM_NITX-1:0] pg_open;
  logic [19:0]         pg_base [NUM_NITX];
  logic [8:0]          pg_cnt  [NUM_NITX];
  word_t               rx_crc  [NUM_NITX];
  logic [NUM_NITX-1:0] rx_crc_clr;
  logic                rx_upd;

  logic [3:0]  hc;
  logic        h_data, h_free, rx_can, rx_go, rx_close, rx_eop, rx_err;
  logic [19:0] wbase;
  logic [8:0]  plast;

  assign hc     = rxq_h.ch;
  assign h_data = !rxq_empty && is_data_cmd(rxq_h.cmd);
  assign h_free = !rxq_empty && rxq_h.cmd == CT_FREE;
  assign rx_can = h_data && (pg_open[hc] || !fp_empty[hc]) && !evq_full;

  always_comb begin
    plast    = big_pages ? 9'd255 : 9'd63;
    wbase    = pg_open[hc] ? pg_base[hc] : fp_head[hc];
    rx_go    = m_gnt[NUM_NITX];
    rx_eop   = rxq_h.cmd == CT_EOP;
    rx_err   = rx_eop && (rx_crc[hc] != rxq_h.data);
    rx_close = rx_go && (rxq_h.cmd != CT_DTX ||
                         (pg_open[hc] ? pg_cnt[hc] : 9'd0) == plast);
    rx_upd   = rx_go && rxq_h.crc && !rx_eop;
    rxq_rd   = rx_go || (h_free && !evq_full);
    rx_stall = h_data && !pg_open[hc] && fp_empty[hc];
    fp_pop   = '0;
    if (rx_go && !pg_open[hc]) fp_pop[hc] = 1'b1;
    rx_crc_clr = '0;
    if ((rx_go && rx_eop) || (h_free && !evq_full)) rx_crc_clr[hc] = 1'b1;
  end

  assign m_req = {rx_can, t_mreq};

  crc_unit #(.NCH(NUM_NITX)) u_rxcrc (
    .clk, .rst_n, .clr(rx_crc_clr), .upd_en(rx_upd), .upd_ch(hc), .upd_word(rxq_h.data),
    .state(rx_crc)
  );

  // memory port
  always_comb begin
    mem_we    = rx_go;
    mem_re    = m_gv && !rx_go;
    mem_wdata = rxq_h.data;
    mem_addr  = rx_go ? wbase + 20'(pg_open[hc] ? pg_cnt[hc] : 9'd0)
                      : t_maddr[m_gid < $clog2(NM)'(NUM_NITX) ? 4'(m_gid) : 4'd0];
  end

  // page bookkeeping and events
  logic [8:0] cnt_now;
  assign cnt_now = pg_open[hc] ? pg_cnt[hc] : 9'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pg_open <= '0;
      for (int k = 0; k < NUM_NITX; k++) begin
        pg_base[k] <= '0;
        pg_cnt[k]  <= '0;
      end
    end else begin
      if (rx_go) begin
        if (!pg_open[hc]) pg_base[hc] <= fp_head[hc];
        pg_open[hc] <= !rx_close;
        pg_cnt[hc]  <= rx_close ? 9'd0 : cnt_now + 9'd1;
      end else if (h_free && !evq_full && pg_open[hc]) begin
        pg_open[hc] <= 1'b0;
        pg_cnt[hc]  <= '0;
      end
    end
  end

  logic rx_ev;
  word_t rx_evw;
  assign rx_ev  = rx_close || (h_free && !evq_full && pg_open[hc]);
  assign rx_evw = rx_close ? {1'b1, hc, rx_eop, rx_err, cnt_now, now[15:0]}
                           : {1'b1, hc, 1'b1, 1'b0, pg_cnt[hc] - 9'd1, now[15:0]};

  // TFU events go in when the receive path is not logging one
  always_comb begin
    t_ev_ack  = '0;
    evq_wr    = 1'b0;
    evq_wdata = rx_evw;
    if (rx_ev) begin
      evq_wr = 1'b1;
    end else if (!evq_full) begin
      for (int k = NUM_NITX-1; k >= 0; k--) begin
        if (t_ev_valid[k]) begin
          t_ev_ack  = '0;
          t_ev_ack[k] = 1'b1;
          evq_wdata = {t_ev[k][31:16], now[15:0]};
        end
      end
      evq_wr = |t_ev_valid;
    end
  end

  a_evq: assert property (@(posedge clk) disable iff (!rst_n) evq_wr |-> !evq_full);
  a_rxq: assert property (@(posedge clk) disable iff (!rst_n) rxq_wr |-> !rxq_full);
endmodule
