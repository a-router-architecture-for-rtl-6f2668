// transmitter_module: one outgoing physical link and its three NITXs (one per
// outbound virtual channel).
//
// The NITXs are CTBUS slaves: a DTX/MARK/EOP word or a FREE whose slave mask selects
// NITX (LINK, c) is queued in that NITX's own DEPTH-word queue, so a virtual channel
// that is blocked downstream never holds up the other two. A FREE is sent on as a
// flit of its own so that the next router releases its reservations.
// Link scheduling: whenever the link is free, the next frame is taken from a channel
// that has a word and a credit, round robin starting after the channel sent last.
// Link format: one 10-bit symbol (8 data bits and 2 tag bits) every second cycle,
// so a 32-bit word takes 8 cycles; the 8 tag bits of a frame's four symbols carry
// the CTBUS command and the virtual channel. Data bytes go most significant first;
// tags: symbol 0 {cmd[2],cmd[1]}, symbol 1 {cmd[0],vc[1]}, symbol 2 {vc[0],0},
// symbol 3 {0,0}.
// Flow control: a credit counter per virtual channel, loaded with the depth of the
// receiver's buffer and returned one per word through ack_in[c]. space[c] tells
// masters whether NITX c can take another word, with two words of slack for bus
// words already granted.
// Taken from the design: one NITX per transmission virtual channel, 10 bits per two
// cycles, 8 cycles per word, FREE propagation. This design's own: the queue depth,
// round-robin link sharing, the tag layout, separate ack wires for the reverse flow
// control (the original folds them into the reverse link's tag bits), and one link
// per port (the original shares each output pin group between two links).
module transmitter_module
  import prc_pkg::*;
#(
  parameter int unsigned LINK     = 0,
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned RX_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_valid,
  input  ct_txn_t           bus_txn,
  output logic [NUM_VC-1:0] space,
  output logic [SYM_W-1:0]  sym,
  output logic              sym_valid,
  input  logic [NUM_VC-1:0] ack_in,
  output logic              idle          // queues empty and no frame in flight
);
  localparam int unsigned CW = $clog2(RX_DEPTH + 1);

  logic [NUM_VC-1:0] sel, wr, rd, empty, full, ready;
  flit_t             wdata;
  flit_t             head [NUM_VC];
  logic [CW-1:0]     credit [NUM_VC];
  flit_t             cur;
  logic [1:0]        cur_vc, last_vc, nxt;
  logic              active, phase, start, link_free;
  logic [1:0]        symi;

  assign sel = bus_txn.addr[LINK*NUM_VC +: NUM_VC];
  always_comb begin
    wdata.cmd  = bus_txn.cmd;
    wdata.data = bus_txn.data;
  end

  for (genvar c = 0; c < NUM_VC; c++) begin : g_nitx
    logic [$clog2(DEPTH):0] count;
    assign wr[c] = bus_valid && sel[c] &&
                   (is_data_cmd(bus_txn.cmd) || bus_txn.cmd == CT_FREE);
    sync_fifo #(.W($bits(flit_t)), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n, .wr(wr[c]), .wdata, .rd(rd[c]), .rdata(head[c]),
      .empty(empty[c]), .full(full[c]), .count
    );
    assign space[c] = (count < ($clog2(DEPTH)+1)'(DEPTH - 2));
    assign ready[c] = !empty[c] && credit[c] != '0;
    assign rd[c]    = start && nxt == 2'(c);
  end

  // round robin: first ready channel after the one that sent last
  always_comb begin
    nxt = last_vc;
    for (int k = NUM_VC; k >= 1; k--) begin
      logic [1:0] c;
      c = 2'((int'(last_vc) + k) % NUM_VC);
      if (ready[c]) nxt = c;
    end
  end

  assign link_free = !active || (phase && symi == 2'd3);
  assign start     = link_free && (ready != '0);
  assign idle      = (empty == '1) && !active;

  always_comb begin
    logic [1:0] t;
    unique case (symi)
      2'd0: t = {cur.cmd[2], cur.cmd[1]};
      2'd1: t = {cur.cmd[0], cur_vc[1]};
      2'd2: t = {cur_vc[0], 1'b0};
      default: t = 2'b00;
    endcase
    sym       = {t, cur.data[8*(3-int'(symi)) +: 8]};
    sym_valid = active && !phase;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      phase   <= 1'b0;
      symi    <= '0;
      cur     <= '0;
      cur_vc  <= '0;
      last_vc <= 2'(NUM_VC - 1);
      for (int c = 0; c < NUM_VC; c++) credit[c] <= CW'(RX_DEPTH);
    end else begin
      for (int c = 0; c < NUM_VC; c++) begin
        if (rd[c]) credit[c] <= credit[c] - 1'b1 + CW'(ack_in[c]);
        else       credit[c] <= credit[c] + CW'(ack_in[c]);
      end
      if (start) begin
        cur     <= head[nxt];
        cur_vc  <= nxt;
        last_vc <= nxt;
        active  <= 1'b1;
        phase   <= 1'b0;
        symi    <= 2'd0;
      end else if (active) begin
        phase <= !phase;
        if (phase) begin
          symi <= symi + 1'b1;
          if (symi == 2'd3) active <= 1'b0;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) (wr & full) == '0);
  for (genvar c = 0; c < NUM_VC; c++) begin : g_chk
    a_credit: assert property (@(posedge clk) disable iff (!rst_n)
      credit[c] <= CW'(RX_DEPTH));
  end
endmodule
