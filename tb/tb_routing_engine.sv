// tb_routing_engine: loads a minimal-path routing microprogram into the routing
// engine and checks the routing primitives and CTBUS commands it produces.
//
// The program (assembled below with the re_isa_pkg helpers) routes a packet that
// arrived travelling in +x, with the header word {nid3, x offset, y offset, nid0}:
// channel 0 uses dimension order (x first, then y, buffer at the destination),
// channels 1 and 2 adapt: x links are tried high channel first through linked
// subroutines that RESV and test the answer, y-only packets use the as-many-of
// mask update and an as-many-of RESV, and everything blocked falls back to a
// wait-for-one primitive. Links: +x = link 0, +y = link 1, -y = link 3.
// Checked: primitive mode/mask/word per case, the CTBUS transactions, address
// feedback, wait priority, and that the fastest path (channel 0, x still non-zero)
// takes 7 instructions in 8 cycles from header acceptance to primitive.
`timescale 1ns/1ps
module tb_routing_engine;
  import prc_pkg::*;
  import re_isa_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  logic       cs_we = 0;
  logic [7:0] cs_waddr = 0;
  instr_t     cs_wdata = '0;
  logic [2:0] hdr_valid = 0, hdr_pop, rtp_valid;
  word_t      hdr_word [3];
  rtp_t       rtp;
  logic       ct_req, ct_gnt, ct_resp_valid = 0, ct_resp_ok = 0;
  ct_txn_t    ct_txn;
  slv_mask_t  ct_resp_mask = '0;
  nitx_mask_t reserved = '0, held = '0;
  logic       nf_in_full, nf_out_empty;
  logic [7:0] nf_out_data, pc;
  logic       exec;

  routing_engine dut (
    .clk, .rst_n, .run, .cs_we, .cs_waddr, .cs_wdata,
    .hdr_valid, .hdr_word, .hdr_pop, .rtp_valid, .rtp,
    .ct_req, .ct_txn, .ct_gnt, .ct_resp_valid, .ct_resp_ok, .ct_resp_mask,
    .reserved, .held,
    .nf_in_wr(1'b0), .nf_in_data(8'h00), .nf_in_full,
    .nf_out_rd(1'b0), .nf_out_data, .nf_out_empty,
    .pc_o(pc), .exec_o(exec)
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- program
  instr_t prog [128];
  localparam logic [7:0] INIT = 0, ADAPT = 5, DIM = 20, GET02 = 30, GET01 = 35,
                         YONLY = 40, YNEG = 47, AMO = 49, YBLK = 57, BUF = 62,
                         DIMY = 70, DIMYN = 78;
  localparam logic [7:0] CTL_RESV_ALL = 8'h24, CTL_RESV_AMO = 8'h04,
                         CTL_RTP_RESVD = 8'h00, CTL_RTP_WAIT1 = 8'h08;
  function automatic logic [4:0] busyc(int i); return C_BUSY0 + 5'(i); endfunction

  initial begin
    for (int i = 0; i < 128; i++) prog[i] = '0;
    prog[0]  = i_ldc(8'h80, 5'd0, GO_NONE);               // sign mask in reg0
    prog[1]  = i_ldc(DIM, R_TRAP1, GO_NONE);
    prog[2]  = i_ldc(ADAPT, R_TRAP0, GO_NONE);
    prog[3]  = i_ldc(8'h00, R_CTADDR1, GO_NONE);
    prog[4]  = i_wait();
    // adaptive (channels 2 and 1)
    prog[5]  = i_xfer(R_NID0 + 1, R_CTD0 + 1, GO_NONE);
    prog[6]  = i_alu(ALU_ADD, R_NID0 + 2, 1'b1, 5'd0, 8'd1);
    prog[7]  = i_xfer(R_ACC, R_CTD0 + 2, GO_NONE);
    prog[8]  = i_jump(1'b0, C_ZERO, YONLY, 1'b0, 1'b0);
    prog[9]  = i_jump(1'b1, busyc(2), GET02, 1'b1, 1'b0);
    prog[10] = i_jump(1'b1, busyc(1), GET01, 1'b1, 1'b0);
    prog[11] = i_ldc(8'h07, R_CTADDR0, GO_NONE);
    prog[12] = i_ldc(8'h00, R_CTADDR1, GO_NONE);
    prog[13] = i_ldc(CTL_RTP_WAIT1, R_CTCTL, GO_RTP);
    prog[14] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    // dimension order (channel 0)
    prog[20] = i_xfer(R_NID0 + 1, R_CTD0 + 1, GO_NONE);
    prog[21] = i_alu(ALU_ADD, R_NID0 + 2, 1'b1, 5'd0, 8'd1);
    prog[22] = i_xfer(R_ACC, R_CTD0 + 2, GO_NONE);
    prog[23] = i_jump(1'b0, C_ZERO, DIMY, 1'b0, 1'b0);
    prog[24] = i_ldc(8'h01, R_CTADDR0, GO_NONE);
    prog[25] = i_ldc(CTL_RTP_WAIT1, R_CTCTL, GO_RTP);
    prog[26] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    // reserve O_02 / O_01
    prog[30] = i_ldc(8'h04, R_CTADDR0, GO_NONE);
    prog[31] = i_ldc(CTL_RESV_ALL, R_CTCTL, GO_CTBUS);
    prog[32] = i_ret(1'b1, C_ACK);
    prog[33] = i_ldc(CTL_RTP_RESVD, R_CTCTL, GO_RTP);
    prog[34] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    prog[35] = i_ldc(8'h02, R_CTADDR0, GO_NONE);
    prog[36] = i_ldc(CTL_RESV_ALL, R_CTCTL, GO_CTBUS);
    prog[37] = i_ret(1'b1, C_ACK);
    prog[38] = i_ldc(CTL_RTP_RESVD, R_CTCTL, GO_RTP);
    prog[39] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    // y only, adaptive: as many of the y link's channels as are free
    prog[40] = i_alu(ALU_PASS, R_NID0 + 1, 1'b0, 5'd0, 8'd0);
    prog[41] = i_jump(1'b0, C_ZERO, BUF, 1'b0, 1'b0);
    prog[42] = i_alu(ALU_AND, R_NID0 + 1, 1'b0, 5'd0, 8'd0);
    prog[43] = i_jump(1'b1, C_ZERO, YNEG, 1'b0, 1'b0);
    prog[44] = i_ldc(8'h00, R_CTADDR0, GO_NONE);
    prog[45] = i_ldc(8'h38, R_CTADDR1, GO_NONE);            // -y link (3)
    prog[46] = i_jump(1'b0, C_TRUE, AMO, 1'b0, 1'b0);
    prog[47] = i_ldc(8'h38, R_CTADDR0, GO_NONE);            // +y link (1)
    prog[48] = i_ldc(8'h00, R_CTADDR1, GO_NONE);
    prog[49] = i_xfer(R_CTADDR0, 5'd2, GO_NONE);
    prog[50] = i_xfer(R_CTADDR1, 5'd3, GO_NONE);
    prog[51] = i_flag(FL_AMO, 2'd0, 1'b0, C_TRUE);
    prog[52] = i_jump(1'b0, C_AMONULL, YBLK, 1'b0, 1'b0);
    prog[53] = i_ldc(CTL_RESV_AMO, R_CTCTL, GO_CTBUS);
    prog[54] = i_jump(1'b1, C_ACK, YBLK, 1'b0, 1'b0);
    prog[55] = i_ldc(CTL_RTP_RESVD, R_CTCTL, GO_RTP);
    prog[56] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    prog[57] = i_xfer(5'd2, R_CTADDR0, GO_NONE);
    prog[58] = i_xfer(5'd3, R_CTADDR1, GO_NONE);
    prog[59] = i_ldc(CTL_RTP_WAIT1, R_CTCTL, GO_RTP);
    prog[60] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    // buffer at this node
    prog[62] = i_ldc(8'h00, R_CTADDR0, GO_NONE);
    prog[63] = i_ldc(8'h40, R_CTADDR1, GO_NONE);
    prog[64] = i_ldc(CTL_RTP_RESVD, R_CTCTL, GO_RTP);
    prog[65] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    // dimension order, y
    prog[70] = i_alu(ALU_PASS, R_NID0 + 1, 1'b0, 5'd0, 8'd0);
    prog[71] = i_jump(1'b0, C_ZERO, BUF, 1'b0, 1'b0);
    prog[72] = i_alu(ALU_AND, R_NID0 + 1, 1'b0, 5'd0, 8'd0);
    prog[73] = i_jump(1'b1, C_ZERO, DIMYN, 1'b0, 1'b0);
    prog[74] = i_ldc(8'h00, R_CTADDR0, GO_NONE);
    prog[75] = i_ldc(8'h08, R_CTADDR1, GO_NONE);            // O_30
    prog[76] = i_ldc(CTL_RTP_WAIT1, R_CTCTL, GO_RTP);
    prog[77] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
    prog[78] = i_ldc(8'h08, R_CTADDR0, GO_NONE);            // O_10
    prog[79] = i_ldc(8'h00, R_CTADDR1, GO_NONE);
    prog[80] = i_ldc(CTL_RTP_WAIT1, R_CTCTL, GO_RTP);
    prog[81] = i_jump(1'b0, C_TRUE, INIT, 1'b0, 1'b0);
  end

  // ---------------------------------------------------------------- CTBUS model
  // Grants at once; answers two cycles after the grant with resp_ok_next and,
  // for an all-or-nothing RESV, the requested mask, otherwise resp_mask_next.
  logic      resp_ok_next = 1;
  slv_mask_t resp_mask_next = '0;
  ct_txn_t   last_txn;
  int        n_txn = 0;
  logic [1:0] resp_dly = 0;
  assign ct_gnt = ct_req;
  always @(posedge clk) begin
    ct_resp_valid <= 1'b0;
    if (ct_req) begin
      last_txn <= ct_txn;
      n_txn    <= n_txn + 1;
      resp_dly <= 2'd2;
    end else if (resp_dly != 0) begin
      resp_dly <= resp_dly - 1'b1;
      if (resp_dly == 2'd1) begin
        ct_resp_valid <= 1'b1;
        ct_resp_ok    <= resp_ok_next;
        ct_resp_mask  <= last_txn.all ? last_txn.addr : resp_mask_next;
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  rtp_t got;
  int   got_ch, t_pop, t_rtp;

  task automatic send_hdr(int ch, word_t w);
    #1;
    hdr_word[ch] = w;
    hdr_valid[ch] = 1'b1;
    got_ch = -1;
    t_pop = -1;
    // outputs are sampled half a cycle before the edge that acts on them
    for (int i = 0; i < 200 && got_ch < 0; i++) begin
      @(negedge clk);
      if (hdr_pop[ch]) t_pop = cyc;
      if (rtp_valid != 0) begin
        got = rtp; t_rtp = cyc;
        got_ch = rtp_valid[2] ? 2 : rtp_valid[1] ? 1 : 0;
      end
      @(posedge clk); #1;
      if (t_pop >= 0) hdr_valid[ch] = 1'b0;
    end
  endtask

  initial begin
    hdr_word[0] = '0; hdr_word[1] = '0; hdr_word[2] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 128; i++) begin
      cs_we <= 1; cs_waddr <= 8'(i); cs_wdata <= prog[i];
      @(posedge clk);
    end
    cs_we <= 0;
    run <= 1;
    repeat (10) @(posedge clk);

    // 1: channel 0, x = -3, y = 5: +x, low channel, wait-for-one; fastest path
    send_hdr(0, 32'hAAFD_0533);
    check("c1 channel", got_ch == 0);
    check("c1 mode", got.mode == RTP_WAIT_ONE);
    check("c1 mask", got.addr == 13'h0001);
    check("c1 x offset stepped", got.ctd[23:16] == 8'hFE && got.ctd[15:8] == 8'h05);
    check("c1 7 instructions in 8 cycles", t_rtp - t_pop == 7);
    $display("dimension-order x path: header accepted at %0d, primitive at %0d", t_pop, t_rtp);
    repeat (4) @(posedge clk);

    // 2: channel 0, x = -1, y = 0: arrived, buffer to memory
    send_hdr(0, 32'h00FF_0000);
    check("c2 mode", got.mode == RTP_RESVD);
    check("c2 host", got.addr == 13'h1000);
    repeat (4) @(posedge clk);

    // 3: channel 0, x = -1, y = -2: +y link low channel
    send_hdr(0, 32'h00FF_FE00);
    check("c3 mode", got.mode == RTP_WAIT_ONE);
    check("c3 mask", got.addr == 13'h0008);
    check("c3 y kept", got.ctd[15:8] == 8'hFE && got.ctd[23:16] == 8'h00);
    repeat (4) @(posedge clk);

    // 4: channel 1 (trap0), x = -4: O_02 free, RESV succeeds
    n_txn = 0; resp_ok_next = 1;
    send_hdr(1, 32'h00FC_0100);
    check("c4 channel", got_ch == 1);
    check("c4 mode", got.mode == RTP_RESVD);
    check("c4 mask", got.addr == 13'h0004);
    check("c4 one RESV", n_txn == 1 && last_txn.cmd == CT_RESV && last_txn.all &&
                         last_txn.addr == 13'h0004);
    repeat (4) @(posedge clk);

    // 5: channel 2 (falls through), O_02 busy, RESV of O_01 refused: wait-for-one
    n_txn = 0; resp_ok_next = 0; reserved = 12'h004;
    send_hdr(2, 32'h00FC_0100);
    check("c5 channel", got_ch == 2);
    check("c5 mode", got.mode == RTP_WAIT_ONE);
    check("c5 mask", got.addr == 13'h0007);
    check("c5 tried O_01", n_txn == 1 && last_txn.addr == 13'h0002);
    repeat (4) @(posedge clk);

    // 6: channel 1, x = -1, y = 3: -y link, O_30 busy, as-many-of RESV gets O_31
    n_txn = 0; resp_ok_next = 1; reserved = 12'h200; resp_mask_next = 13'h0400;
    send_hdr(1, 32'h00FF_0300);
    check("c6 as-many-of RESV", n_txn == 1 && last_txn.cmd == CT_RESV && !last_txn.all &&
                                last_txn.addr == 13'h0C00);
    check("c6 mode", got.mode == RTP_RESVD);
    check("c6 address feedback", got.addr == 13'h0400);
    repeat (4) @(posedge clk);

    // 7: same, whole -y link busy: nothing asked, wait-for-one on the link
    n_txn = 0; reserved = 12'h000; held = 12'hE00;
    send_hdr(1, 32'h00FF_0300);
    check("c7 no bus access", n_txn == 0);
    check("c7 mode", got.mode == RTP_WAIT_ONE);
    check("c7 mask", got.addr == 13'h0E00);
    held = '0;
    repeat (4) @(posedge clk);

    // 8: channels 0 and 2 offer headers together: channel 2 goes first
    hdr_word[0] = 32'h00FF_0000; hdr_valid[0] = 1'b1;
    send_hdr(2, 32'h00FC_0100);
    check("c8 channel 2 first", got_ch == 2);
    got_ch = -1;
    for (int i = 0; i < 100 && got_ch < 0; i++) begin
      @(negedge clk);
      if (hdr_pop[0]) begin @(posedge clk); #1; hdr_valid[0] = 1'b0; end
      if (rtp_valid != 0) got_ch = rtp_valid[0] ? 0 : 9;
    end
    check("c8 then channel 0", got_ch == 0);

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
