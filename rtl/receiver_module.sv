// receiver_module: one incoming physical link. It reassembles link symbols into
// words, buffers them per virtual channel, and hands them to three NIRXs (one per
// incoming virtual channel) that share one routing engine.
//
// Deserializer: every valid 10-bit symbol carries one data byte (most significant
// first) and two tag bits; the fourth symbol of a frame completes the word, and the
// eight tag bits give its CTBUS command and virtual channel (layout as in
// transmitter_module). The word goes into that channel's RX_DEPTH-deep buffer.
// Whenever an NIRX takes a word from its buffer, ack_out[c] pulses for one cycle to
// return a credit to the upstream transmitter.
// CTBUS master ports, index 0 = routing engine, 1..3 = NIRX of channels 0..2.
// The buffer depth, the separate ack wires and the tag layout are this design's
// own; the one-engine-per-link arrangement with three NIRXs follows the design.
module receiver_module
  import prc_pkg::*;
  import re_isa_pkg::*;
#(
  parameter int unsigned RX_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  // link
  input  logic [SYM_W-1:0]  sym,
  input  logic              sym_valid,
  output logic [NUM_VC-1:0] ack_out,
  // control store download and notification FIFOs of the routing engine
  input  logic              cs_we,
  input  logic [7:0]        cs_waddr,
  input  instr_t            cs_wdata,
  input  logic              nf_in_wr,
  input  logic [7:0]        nf_in_data,
  output logic              nf_in_full,
  input  logic              nf_out_rd,
  output logic [7:0]        nf_out_data,
  output logic              nf_out_empty,
  // CTBUS master ports
  output logic [3:0]        ct_req,
  output ct_txn_t           ct_txn [4],
  input  logic [3:0]        ct_gnt,
  input  logic [3:0]        ct_resp_valid,
  input  logic              ct_resp_ok,
  input  slv_mask_t         ct_resp_mask,
  input  nitx_mask_t        reserved,
  input  nitx_mask_t        held,
  input  slv_mask_t         slv_space,
  // observation
  output logic [NUM_VC-1:0] nirx_waiting,
  output logic [7:0]        re_pc,
  output logic              re_exec
);
  // ---------------------------------------------------------------- deserializer
  logic [1:0]  si;
  logic [23:0] dbuf;
  logic [5:0]  tbuf;
  logic        push;
  flit_t       pflit;
  logic [1:0]  pvc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      si   <= '0;
      dbuf <= '0;
      tbuf <= '0;
    end else if (sym_valid) begin
      si   <= si + 1'b1;
      dbuf <= {dbuf[15:0], sym[7:0]};
      tbuf <= {tbuf[3:0], sym[9:8]};
    end
  end

  always_comb begin
    push       = sym_valid && (si == 2'd3);
    pflit.data = {dbuf, sym[7:0]};
    pflit.cmd  = ctcmd_e'(tbuf[5:3]);        // sym0 {c2,c1}, sym1 {c0,v1}
    pvc        = {tbuf[2], tbuf[1]};         // sym1 v1, sym2 v0
  end

  // ---------------------------------------------------------------- channel buffers
  logic [NUM_VC-1:0] q_empty, q_full, q_pop;
  flit_t             q_head [NUM_VC];
  logic [$clog2(RX_DEPTH):0] q_cnt [NUM_VC];

  // engine <-> NIRX
  logic [2:0] hdr_valid, hdr_pop, rtp_valid;
  word_t      hdr_word [3];
  rtp_t       rtp;

  for (genvar c = 0; c < NUM_VC; c++) begin : g_ch
    sync_fifo #(.W($bits(flit_t)), .DEPTH(RX_DEPTH)) u_q (
      .clk, .rst_n,
      .wr(push && pvc == 2'(c)), .wdata(pflit),
      .rd(q_pop[c]), .rdata(q_head[c]),
      .empty(q_empty[c]), .full(q_full[c]), .count(q_cnt[c])
    );
    assign ack_out[c] = q_pop[c] && !q_empty[c];

    nirx u_nirx (
      .clk, .rst_n,
      .in_valid(!q_empty[c]), .in_flit(q_head[c]), .in_pop(q_pop[c]),
      .hdr_valid(hdr_valid[c]), .hdr_word(hdr_word[c]), .hdr_pop(hdr_pop[c]),
      .rtp_valid(rtp_valid[c]), .rtp,
      .ct_req(ct_req[c+1]), .ct_txn(ct_txn[c+1]), .ct_gnt(ct_gnt[c+1]),
      .ct_resp_valid(ct_resp_valid[c+1]), .ct_resp_ok,
      .reserved, .held, .slv_space,
      .waiting(nirx_waiting[c])
    );
  end

  routing_engine u_re (
    .clk, .rst_n, .run,
    .cs_we, .cs_waddr, .cs_wdata,
    .hdr_valid, .hdr_word, .hdr_pop,
    .rtp_valid, .rtp,
    .ct_req(ct_req[0]), .ct_txn(ct_txn[0]), .ct_gnt(ct_gnt[0]),
    .ct_resp_valid(ct_resp_valid[0]), .ct_resp_ok, .ct_resp_mask,
    .reserved, .held,
    .nf_in_wr, .nf_in_data, .nf_in_full, .nf_out_rd, .nf_out_data, .nf_out_empty,
    .pc_o(re_pc), .exec_o(re_exec)
  );

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> !q_full[pvc]);
endmodule
