// prc_top: the Programmable Routing Controller, a single-chip router for multihop
// point-to-point networks whose routing and switching policies are set by
// microprograms rather than fixed in hardware.
//
// Structure: four receiver modules (one per incoming physical link, each with a
// routing engine and three NIRXs), four transmitter modules (three NITXs each), the
// host interface (control registers, twelve TFUs, page queues, event queue, CRC and
// time-stamp units, buffer-memory port) and the CTBUS that connects them all.
// CTBUS masters (29): routing engine of link l = l, NIRX (l,c) = 4 + 3l + c,
// TFU k = 16 + k, host command port = 28. CTBUS slaves: NITX (l,c) = bit 3l + c, memory interface = bit 12.
// A packet arriving on link l is parsed by that link's routing engine, which picks
// and possibly reserves outbound channels; the NIRX then streams the packet over the
// CTBUS to the chosen NITX(s) (cut-through), or to buffer memory when the program
// buffers it (virtual cut-through / packet switching), or waits for a channel
// (wormhole). Which of these happens is decided per packet by the microprogram.
// Links: 10-bit symbol plus strobe, one symbol every second cycle; a per-virtual-
// channel ack wire per link returns buffer credits. The host interface, link
// widths and the off-chip buffer memory port are described in host_interface and
// transmitter_module. All logic runs on one clock (the 40 MHz core clock of the
// original); the slower link and memory rates are kept by strobes, not clocks.
module prc_top
  import prc_pkg::*;
  import re_isa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // incoming links
  input  logic [SYM_W-1:0]  rx_sym   [NUM_LINKS],
  input  logic              rx_valid [NUM_LINKS],
  output logic [NUM_VC-1:0] rx_ack   [NUM_LINKS],
  // outgoing links
  output logic [SYM_W-1:0]  tx_sym   [NUM_LINKS],
  output logic              tx_valid [NUM_LINKS],
  input  logic [NUM_VC-1:0] tx_ack   [NUM_LINKS],
  // host control interface
  input  logic [11:0]       h_addr,
  input  word_t             h_wdata,
  input  logic              h_we,
  input  logic              h_re,
  output word_t             h_rdata,
  output logic              irq,
  // buffer memory
  output logic [19:0]       mem_addr,
  output word_t             mem_wdata,
  output logic              mem_we,
  output logic              mem_re,
  input  word_t             mem_rdata
);
  // ---------------------------------------------------------------- CTBUS
  logic [NUM_MST-1:0] m_req, m_gnt, m_resp;
  ct_txn_t            m_txn [NUM_MST];
  logic               bus_valid, resp_valid, resp_ok;
  ct_txn_t            bus_txn;
  mid_t               bus_mid, resp_mid;
  slv_mask_t          resp_mask, slv_space;
  nitx_mask_t         reserved, held;

  ctbus #(.N(NUM_MST)) u_ctbus (
    .clk, .rst_n, .req(m_req), .txn(m_txn), .gnt(m_gnt),
    .bus_valid, .bus_txn, .bus_mid,
    .resp_valid, .resp_mid, .resp_ok, .resp_mask, .reserved, .held
  );

  for (genvar i = 0; i < NUM_MST; i++) begin : g_resp
    assign m_resp[i] = resp_valid && resp_mid == mid_t'(i);
  end

  // ---------------------------------------------------------------- host interface
  logic                 run;
  logic [NUM_LINKS-1:0] cs_we, nf_in_wr, nf_out_rd, nf_in_full, nf_out_empty;
  logic [7:0]           cs_waddr, nf_in_data;
  instr_t               cs_wdata;
  logic [7:0]           nf_out_data [NUM_LINKS];
  logic                 host_space, rx_stall;
  ct_txn_t              t_txn [NUM_NITX];

  host_interface u_host (
    .clk, .rst_n,
    .h_addr, .h_wdata, .h_we, .h_re, .h_rdata, .irq,
    .run, .cs_we, .cs_waddr, .cs_wdata, .nf_in_wr, .nf_in_data, .nf_out_rd, .nf_out_data,
    .nf_in_full, .nf_out_empty,
    .mem_addr, .mem_wdata, .mem_we, .mem_re, .mem_rdata,
    .ct_req(m_req[MID_TFU0 +: NUM_NITX]), .ct_txn(t_txn),
    .ct_gnt(m_gnt[MID_TFU0 +: NUM_NITX]), .ct_resp_valid(m_resp[MID_TFU0 +: NUM_NITX]),
    .ct_resp_ok(resp_ok), .ct_resp_mask(resp_mask), .reserved, .held, .slv_space,
    .hc_req(m_req[MID_HOST]), .hc_txn(m_txn[MID_HOST]), .hc_gnt(m_gnt[MID_HOST]),
    .hc_resp_valid(m_resp[MID_HOST]),
    .bus_valid, .bus_txn, .bus_mid, .host_space, .rx_stall
  );
  for (genvar k = 0; k < NUM_NITX; k++) begin : g_tfu_txn
    assign m_txn[MID_TFU0 + k] = t_txn[k];
  end
  assign slv_space[HOST_BIT] = host_space;

  // ---------------------------------------------------------------- links
  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_link
    logic [3:0]  r_req, r_gnt, r_resp;
    ct_txn_t     r_txn [4];
    logic [2:0]  waiting;
    logic [7:0]  re_pc;
    logic        re_exec, tx_idle;

    assign r_gnt  = {m_gnt[MID_NIRX0 + 3*l +: 3], m_gnt[MID_RE0 + l]};
    assign r_resp = {m_resp[MID_NIRX0 + 3*l +: 3], m_resp[MID_RE0 + l]};
    assign m_req[MID_RE0 + l] = r_req[0];
    assign m_txn[MID_RE0 + l] = r_txn[0];
    for (genvar c = 0; c < NUM_VC; c++) begin : g_vc
      assign m_req[MID_NIRX0 + 3*l + c] = r_req[c+1];
      assign m_txn[MID_NIRX0 + 3*l + c] = r_txn[c+1];
    end

    receiver_module u_rx (
      .clk, .rst_n, .run,
      .sym(rx_sym[l]), .sym_valid(rx_valid[l]), .ack_out(rx_ack[l]),
      .cs_we(cs_we[l]), .cs_waddr, .cs_wdata,
      .nf_in_wr(nf_in_wr[l]), .nf_in_data, .nf_in_full(nf_in_full[l]),
      .nf_out_rd(nf_out_rd[l]), .nf_out_data(nf_out_data[l]), .nf_out_empty(nf_out_empty[l]),
      .ct_req(r_req), .ct_txn(r_txn), .ct_gnt(r_gnt), .ct_resp_valid(r_resp),
      .ct_resp_ok(resp_ok), .ct_resp_mask(resp_mask),
      .reserved, .held, .slv_space,
      .nirx_waiting(waiting), .re_pc, .re_exec
    );

    logic [NUM_VC-1:0] space;
    transmitter_module #(.LINK(l)) u_tx (
      .clk, .rst_n, .bus_valid, .bus_txn, .space,
      .sym(tx_sym[l]), .sym_valid(tx_valid[l]), .ack_in(tx_ack[l]), .idle(tx_idle)
    );
    assign slv_space[3*l +: 3] = space;
  end
endmodule
