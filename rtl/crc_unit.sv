// crc_unit: CRC generation and checking for the packet data that passes between
// the buffer memory and the network, one running CRC per channel.
//
// The unit sits on a word path that carries at most one word per cycle for any of
// NCH channels (the transmit path shared by the TFUs, or the receive path shared by
// the NIRXs). upd_en folds upd_word into the CRC of channel upd_ch; clr[c] restarts
// channel c (clear wins over an update of the same channel). state[c] is the CRC of
// all words folded in since the last clear, ready the cycle after the update.
// Code: CRC-32 generator 0x04C11DB7, initial value 0xFFFFFFFF, word fed most
// significant bit first, no final inversion. The CRC word is sent after the last
// data word of a packet; the receiver compares it with its own running value.
// Where the CRC sits (transmit and receive data paths, transparent to the host) is
// from the design; the polynomial and word ordering are this design's choice.
module crc_unit
  import prc_pkg::*;
#(
  parameter int unsigned NCH = NUM_NITX
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] clr,
  input  logic           upd_en,
  input  logic [$clog2(NCH)-1:0] upd_ch,
  input  word_t          upd_word,
  output word_t          state [NCH]
);
  localparam word_t POLY = 32'h04C1_1DB7;
  localparam word_t INIT = 32'hFFFF_FFFF;

  function automatic word_t crc_step(word_t c, word_t w);
    word_t r = c;
    for (int b = 31; b >= 0; b--) begin
      logic fb = r[31] ^ w[b];
      r = {r[30:0], 1'b0} ^ (fb ? POLY : 32'h0);
    end
    return r;
  endfunction

  word_t nxt;
  assign nxt = crc_step(state[upd_ch], upd_word);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) state[c] <= INIT;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        if (clr[c])                                     state[c] <= INIT;
        else if (upd_en && upd_ch == $clog2(NCH)'(c))   state[c] <= nxt;
      end
    end
  end
endmodule
