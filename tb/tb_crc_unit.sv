// tb_crc_unit: feeds random words for several interleaved channels into the CRC unit
// and compares every channel's CRC with a reference computed in the testbench by
// long division of the message bits (generator 0x04C11DB7, start 0xFFFFFFFF, MSB
// first). Also checks that a clear restarts only its channel and wins over an update.
`timescale 1ns/1ps
module tb_crc_unit;
  import prc_pkg::*;
  localparam int NCH = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NCH-1:0] clr = '0;
  logic upd_en = 0;
  logic [3:0] upd_ch = 0;
  word_t upd_word = '0;
  word_t state [NCH];

  crc_unit #(.NCH(NCH)) dut (.clk, .rst_n, .clr, .upd_en, .upd_ch, .upd_word, .state);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: shift register division, one message bit at a time
  word_t ref_crc [NCH];
  function automatic word_t ref_step(word_t r, word_t w);
    logic [63:0] m;
    m = {r ^ w, 32'h0};               // start value folded into the first 32 bits
    for (int b = 63; b >= 32; b--)
      if (m[b]) m[b -: 33] = m[b -: 33] ^ 33'h1_04C1_1DB7;
    return m[31:0];
  endfunction

  initial begin
    foreach (ref_crc[i]) ref_crc[i] = 32'hFFFF_FFFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 500; k++) begin
      automatic int c = $urandom % NCH;
      upd_en = 1; upd_ch = 4'(c); upd_word = $urandom;
      clr = '0;
      if (k % 97 == 50) begin
        automatic int d = $urandom % NCH;
        clr[d] = 1;
        ref_crc[d] = 32'hFFFF_FFFF;
        if (d != c) ref_crc[c] = ref_step(ref_crc[c], upd_word);
      end else begin
        ref_crc[c] = ref_step(ref_crc[c], upd_word);
      end
      @(posedge clk); #1;
      upd_en = 0; clr = '0;
      check($sformatf("word %0d", k), state[c] == ref_crc[c]);
    end
    for (int c = 0; c < NCH; c++) check($sformatf("final %0d", c), state[c] == ref_crc[c]);
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
