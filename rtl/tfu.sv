// tfu: transmitter fetch unit, the host-side source of packets for one NITX.
//
// The host describes a packet as a list of page tags written into this unit's
// transmission page queue (TAG_DEPTH entries). Tag format:
//   [31] last page of the packet   [30] page not covered by the CRC (header page)
//   [29] keep the connection (on the last page: no FREE after this packet)
//   [28:20] page length in words minus 1   [19:0] word address in buffer memory
// For each packet the unit
//   1. waits until its NITX (slave NITX_ID) is not reserved, then sends RESV on the
//      CTBUS, or CHECK if the NITX is held (a hold placed by the host interface is
//      this unit's to claim), and retries until the reservation succeeds;
//   2. for every page, reads the words from buffer memory one at a time (mem_req,
//      granted by the memory interface; the word returns with mem_rvalid) and puts
//      each on the CTBUS as DTX, the last word of a page as MARK;
//   3. after the last page, sends the packet's CRC (crc_state, kept by the shared
//      transmit CRC unit) as the EOP word, then FREE, which releases the NITX here and
//      travels with the packet to release the channels it held downstream.
// If the last page's tag has the keep bit, the FREE is left out: the NITX and the
// downstream channels stay allocated, and the next packet skips step 1 and runs
// through the same connection until a packet without the keep bit ends it.
// After each page it posts an event (ev_valid until ev_ack): [31]=0 (transmit),
// [30:27] channel, [26] last page, [25] 0, [24:16] words in the page minus 1; the host
// interface adds the time stamp in [15:0].
// Page-level transfer, reservation before transfer and the DTX/MARK/EOP/FREE usage
// and connections that outlive a packet are from the design; the tag layout, the one-word-at-a-time fetch and the CRC word
// as EOP are this design's choices.
module tfu
  import prc_pkg::*;
#(
  parameter int unsigned NITX_ID   = 0,
  parameter int unsigned TAG_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // transmission page queue
  input  logic        tag_wr,
  input  word_t       tag_data,
  output logic        tag_full,
  // buffer memory read
  output logic        mem_req,
  output logic [19:0] mem_addr,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  word_t       mem_rdata,
  output logic        crc_en,     // the word now returning counts in the CRC
  output logic        crc_clr,
  input  word_t       crc_state,
  // CTBUS master
  output logic        ct_req,
  output ct_txn_t     ct_txn,
  input  logic        ct_gnt,
  input  logic        ct_resp_valid,
  input  logic        ct_resp_ok,
  input  nitx_mask_t  reserved,
  input  nitx_mask_t  held,
  input  logic        nitx_space,
  // event
  output logic        ev_valid,
  output word_t       ev_data,
  input  logic        ev_ack
);
  typedef enum logic [3:0] {
    S_IDLE, S_ACQ, S_RESV, S_RESP, S_FETCH, S_DATA, S_SEND, S_EVT, S_NEXT,
    S_WTAG, S_CRC, S_FREE
  } state_e;

  state_e      st;
  logic        t_empty, t_pop;
  word_t       tag;
  logic [$clog2(TAG_DEPTH):0] t_cnt;
  logic        pkt_last;
  logic [9:0]  widx;
  word_t       wbuf;
  logic        tag_last, tag_nocrc, tag_keep, pkt_keep, own;
  logic [9:0]  tag_len;
  logic [19:0] tag_addr;
  slv_mask_t   me;

  sync_fifo #(.W(32), .DEPTH(TAG_DEPTH)) u_tags (
    .clk, .rst_n, .wr(tag_wr), .wdata(tag_data), .rd(t_pop), .rdata(tag),
    .empty(t_empty), .full(tag_full), .count(t_cnt)
  );

  assign tag_last  = tag[31];
  assign tag_nocrc = tag[30];
  assign tag_keep  = tag[29];
  assign tag_len   = {1'b0, tag[28:20]};
  assign tag_addr  = tag[19:0];
  assign me        = slv_mask_t'(1) << NITX_ID;

  assign mem_req  = (st == S_FETCH);
  assign mem_addr = tag_addr + 20'(widx);
  assign crc_en   = (st == S_DATA) && mem_rvalid && !tag_nocrc;
  assign crc_clr  = (st == S_IDLE);
  assign t_pop    = (st == S_NEXT);

  always_comb begin
    ct_req = 1'b0;
    ct_txn = '0;
    ct_txn.addr = me;
    ct_txn.all  = 1'b1;
    unique case (st)
      S_RESV: begin ct_req = 1'b1; ct_txn.cmd = held[NITX_ID] ? CT_CHECK : CT_RESV; end
      S_SEND: begin
        ct_req      = nitx_space;
        ct_txn.cmd  = (widx == tag_len) ? CT_MARK : CT_DTX;
        ct_txn.crc  = !tag_nocrc;
        ct_txn.data = wbuf;
      end
      S_CRC: begin
        ct_req      = nitx_space;
        ct_txn.cmd  = CT_EOP;
        ct_txn.data = crc_state;
      end
      S_FREE: begin ct_req = nitx_space; ct_txn.cmd = CT_FREE; end
      default: ;
    endcase
  end

  assign ev_valid = (st == S_EVT);
  assign ev_data  = {1'b0, 4'(NITX_ID), tag_last, 1'b0, 9'(tag_len), 16'h0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      widx     <= '0;
      wbuf     <= '0;
      pkt_last <= 1'b0;
      pkt_keep <= 1'b0;
      own      <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE:  if (!t_empty) st <= own ? S_FETCH : S_ACQ;
        S_ACQ:   if (!reserved[NITX_ID]) st <= S_RESV;
        S_RESV:  if (ct_gnt) st <= S_RESP;
        S_RESP:  if (ct_resp_valid) st <= ct_resp_ok ? S_FETCH : S_ACQ;
        S_FETCH: if (mem_gnt) st <= S_DATA;
        S_DATA:  if (mem_rvalid) begin
                   wbuf <= mem_rdata;
                   st   <= S_SEND;
                 end
        S_SEND:  if (ct_gnt) begin
                   if (widx == tag_len) st <= S_EVT;
                   else begin
                     widx <= widx + 1'b1;
                     st   <= S_FETCH;
                   end
                 end
        S_EVT:   if (ev_ack) begin
                   pkt_last <= tag_last;
                   pkt_keep <= tag_keep;
                   st       <= S_NEXT;
                 end
        S_NEXT:  begin
                   widx <= '0;
                   st   <= pkt_last ? S_CRC : S_WTAG;
                 end
        S_WTAG:  if (!t_empty) st <= S_FETCH;
        S_CRC:   if (ct_gnt) begin
                   own <= pkt_keep;
                   st  <= pkt_keep ? S_IDLE : S_FREE;
                 end
        S_FREE:  if (ct_gnt) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
