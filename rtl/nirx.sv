// nirx: network interface receiver, the state machine of one incoming virtual
// channel. It does the slow, per-packet work so that the routing engine, shared by
// three channels, only parses headers and decides.
//
// Operation, for each packet:
//   ROUTE  : words at the head of the channel's input buffer are offered to the
//            routing engine (hdr_valid/hdr_word); the engine takes as many as it
//            wants (hdr_pop) until it answers with a routing primitive (rtp_valid).
//   ACQUIRE: RTP_RESVD     - the slaves in the mask are already reserved;
//            RTP_WAIT_ONE  - watch the reservation status until any masked NITX is
//                            free, then RESV that one NITX; retry on failure;
//            RTP_WAIT_ALL  - wait until every masked NITX is free, then RESV all of
//                            them at once (multicast);
//            RTP_DISCARD   - drop the packet.
//   FORWARD: send the engine's ctd word (with the command of the last header word it
//            took, and its CRC flag), then every following word with its own command
//            (DTX/MARK/EOP) to the mask, one CTBUS transaction per word, only when all
//            addressed slaves show room.
//   FREE   : a FREE arriving from the link is put on the CTBUS to the same mask,
//            releasing the local NITXs (which pass it downstream) and closing the
//            packet in the memory interface; the channel is then idle again.
// The sequence follows the incoming-channel description (forward to the engine,
// wait for a selected channel to become free, multicast waits for all); the
// primitive encoding and the per-word CTBUS request are this design's choices.
module nirx
  import prc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // input buffer (show-ahead)
  input  logic       in_valid,
  input  flit_t      in_flit,
  output logic       in_pop,
  // routing engine
  output logic       hdr_valid,
  output word_t      hdr_word,
  input  logic       hdr_pop,
  input  logic       rtp_valid,
  input  rtp_t       rtp,
  // CTBUS master
  output logic       ct_req,
  output ct_txn_t    ct_txn,
  input  logic       ct_gnt,
  input  logic       ct_resp_valid,
  input  logic       ct_resp_ok,
  // status
  input  nitx_mask_t reserved,
  input  nitx_mask_t held,
  input  slv_mask_t  slv_space,
  output logic       waiting       // blocked waiting for an outbound channel
);
  typedef enum logic [2:0] {
    S_ROUTE, S_ACQ, S_RESV, S_RESP, S_CTD, S_BODY, S_DROP
  } state_e;

  state_e     st;
  slv_mask_t  mask, try_mask;
  rtp_t       rq;
  ctcmd_e     hcmd;
  nitx_mask_t busy, cand, pick;
  logic       room;

  assign busy = reserved | held;
  assign cand = mask[NUM_NITX-1:0] & ~busy;
  assign pick = cand & (~cand + 1'b1);           // lowest free candidate
  assign room = ((mask & ~slv_space) == '0);

  assign hdr_valid = (st == S_ROUTE) && in_valid && is_data_cmd(in_flit.cmd);
  assign hdr_word  = in_flit.data;
  assign waiting   = (st == S_ACQ);

  always_comb begin
    ct_req = 1'b0;
    ct_txn = '0;
    in_pop = 1'b0;
    ct_txn.addr = mask;
    unique case (st)
      S_ROUTE: in_pop = hdr_pop || (in_valid && !is_data_cmd(in_flit.cmd));
      S_RESV: begin
        ct_req      = 1'b1;
        ct_txn.cmd  = CT_RESV;
        ct_txn.addr = try_mask;
        ct_txn.all  = 1'b1;
      end
      S_CTD: begin
        ct_req      = room;
        ct_txn.cmd  = hcmd;
        ct_txn.crc  = rq.crc;
        ct_txn.data = rq.ctd;
      end
      S_BODY: begin
        if (in_valid) begin
          ct_req      = room;
          ct_txn.cmd  = is_data_cmd(in_flit.cmd) ? in_flit.cmd : CT_FREE;
          ct_txn.crc  = 1'b1;
          ct_txn.data = in_flit.data;
          in_pop      = ct_gnt;
        end
      end
      S_DROP: in_pop = in_valid;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_ROUTE;
      mask     <= '0;
      try_mask <= '0;
      rq       <= '0;
      hcmd     <= CT_DTX;
    end else begin
      unique case (st)
        S_ROUTE: begin
          if (hdr_pop) hcmd <= in_flit.cmd;
          if (rtp_valid) begin
            rq   <= rtp;
            mask <= rtp.addr;
            unique case (rtp.mode)
              RTP_RESVD:   st <= S_CTD;
              RTP_DISCARD: st <= S_DROP;
              default:     st <= (rtp.addr[NUM_NITX-1:0] == '0) ? S_CTD : S_ACQ;
            endcase
          end
        end
        S_ACQ: begin
          if (rq.mode == RTP_WAIT_ALL) begin
            if ((mask[NUM_NITX-1:0] & busy) == '0) begin
              try_mask <= mask;
              st       <= S_RESV;
            end
          end else if (cand != '0) begin
            try_mask <= {1'b0, pick};
            st       <= S_RESV;
          end
        end
        S_RESV: if (ct_gnt) st <= S_RESP;
        S_RESP: if (ct_resp_valid) begin
          if (ct_resp_ok) begin
            if (rq.mode == RTP_WAIT_ONE) mask <= {mask[HOST_BIT], try_mask[NUM_NITX-1:0]};
            st <= S_CTD;
          end else begin
            st <= S_ACQ;
          end
        end
        S_CTD:  if (ct_gnt) st <= S_BODY;
        S_BODY: if (in_valid && ct_gnt && !is_data_cmd(in_flit.cmd)) st <= S_ROUTE;
        S_DROP: if (in_valid && !is_data_cmd(in_flit.cmd)) st <= S_ROUTE;
        default: st <= S_ROUTE;
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ct_req && !ct_gnt && st == S_RESV |=> ct_req);
endmodule
