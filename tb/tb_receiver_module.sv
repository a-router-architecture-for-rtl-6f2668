// tb_receiver_module: one incoming link with its deserializer, channel buffers,
// three NIRXs and routing engine, driven from the link side by a symbol
// serializer written here, and served on the bus side by a CTBUS model (one grant
// per cycle, answers two cycles after the grant, reservation state kept here).
// The engine runs a small program that copies the header word to ctd and takes the
// slave mask from its middle bytes, asking for wait-for-one.
// Three packets are sent at once on the three virtual channels, their frames
// interleaved on the link: channel 0 to NITX 3, channel 1 to NITX 4 or 5 (NITX 4
// is busy, so 5 must be chosen), channel 2 to memory only.
// Checked: each NIRX puts exactly its packet on the bus (header, data words with
// their commands, FREE) to the right mask; the link never gets more words ahead
// than the receiver's buffers hold, acks return every credit; the engine is reached.
`timescale 1ns/1ps
module tb_receiver_module;
  import prc_pkg::*;
  import re_isa_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  logic [SYM_W-1:0]  sym = '0;
  logic              sym_valid = 0;
  logic [NUM_VC-1:0] ack_out, nirx_waiting;
  logic              cs_we = 0;
  logic [7:0]        cs_waddr = '0, nf_out_data, re_pc;
  instr_t            cs_wdata = '0;
  logic              nf_in_full, nf_out_empty, re_exec;
  logic [3:0]        ct_req, ct_gnt = '0, ct_resp_valid = '0;
  ct_txn_t           ct_txn [4];
  logic              ct_resp_ok = 0;
  slv_mask_t         ct_resp_mask = '0, slv_space = '1;
  nitx_mask_t        reserved = '0, held = '0;

  receiver_module dut (
    .clk, .rst_n, .run, .sym, .sym_valid, .ack_out,
    .cs_we, .cs_waddr, .cs_wdata, .nf_in_wr(1'b0), .nf_in_data(8'h00), .nf_in_full,
    .nf_out_rd(1'b0), .nf_out_data, .nf_out_empty,
    .ct_req, .ct_txn, .ct_gnt, .ct_resp_valid, .ct_resp_ok, .ct_resp_mask,
    .reserved, .held, .slv_space, .nirx_waiting, .re_pc, .re_exec
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- program
  instr_t prog [12];
  initial begin
    foreach (prog[i]) prog[i] = '0;
    prog[0] = i_ldc(8'd3, R_TRAP0, GO_NONE);
    prog[1] = i_ldc(8'd3, R_TRAP1, GO_NONE);
    prog[2] = i_wait();
    prog[3] = i_xfer(R_NID0, R_CTD0, GO_NONE);
    prog[4] = i_xfer(R_NID0 + 1, R_CTD0 + 1, GO_NONE);
    prog[5] = i_xfer(R_NID0 + 2, R_CTD0 + 2, GO_NONE);
    prog[6] = i_xfer(R_NID0 + 3, R_CTD0 + 3, GO_NONE);
    prog[7] = i_xfer(R_NID0 + 1, R_CTADDR0, GO_NONE);
    prog[8] = i_xfer(R_NID0 + 2, R_CTADDR1, GO_NONE);
    prog[9] = i_ldc(8'h08, R_CTCTL, GO_RTP);
    prog[10] = i_jump(1'b0, C_TRUE, 8'd2, 1'b0, 1'b0);
  end

  // ---------------------------------------------------------------- link side
  typedef struct { int vc; flit_t f; } frame_t;
  frame_t txq [NUM_VC][$];
  flit_t  sent [NUM_VC][$];
  int     credit [NUM_VC];
  int     over = 0, acks = 0, words_sent = 0;
  logic [SYM_W-1:0] syms [4];
  int     sidx = 4, phase = 0, rr = 0;

  function automatic void make_syms(int vc, flit_t f);
    logic [2:0] c = f.cmd;
    logic [1:0] v = 2'(vc);
    syms[0] = {c[2], c[1], f.data[31:24]};
    syms[1] = {c[0], v[1], f.data[23:16]};
    syms[2] = {v[0], 1'b0, f.data[15:8]};
    syms[3] = {2'b00, f.data[7:0]};
  endfunction

  // ---------------------------------------------------------------- bus side
  ct_txn_t seen [4][$];
  logic [1:0] rp_v [2];
  int         rp_m [2];
  logic       rp_ok [2];
  slv_mask_t  rp_mask [2];
  int         gcount [4];

  always @(posedge clk) begin
    #1;
    // answers
    ct_resp_valid = '0;
    if (rp_v[1][0]) begin
      ct_resp_valid[rp_m[1]] = 1'b1;
      ct_resp_ok   = rp_ok[1];
      ct_resp_mask = rp_mask[1];
      if (rp_ok[1]) reserved |= rp_mask[1][NUM_NITX-1:0];
    end
    rp_v[1] = rp_v[0]; rp_m[1] = rp_m[0]; rp_ok[1] = rp_ok[0]; rp_mask[1] = rp_mask[0];
    rp_v[0] = '0;
    // serializer: a symbol every second cycle
    sym_valid = 0;
    if (rst_n) begin
      phase = !phase;
      if (phase) begin
        if (sidx == 4) begin
          for (int k = 0; k < NUM_VC; k++) begin
            automatic int c = (rr + k) % NUM_VC;
            if (sidx == 4 && txq[c].size() > 0 && credit[c] > 0) begin
              automatic frame_t fr = txq[c].pop_front();
              make_syms(c, fr.f);
              credit[c]--;
              words_sent++;
              if (credit[c] < 0) over++;
              sidx = 0;
              rr = c + 1;
            end
          end
        end
        if (sidx < 4) begin
          sym = syms[sidx]; sym_valid = 1; sidx++;
        end
      end
    end
    slv_space = ($urandom_range(0, 3) == 0) ? '0 : '1;
    #1;
    ct_gnt = '0;
    for (int k = 0; k < 4; k++) begin
      automatic int m = (gcount[0] + k) % 4;
      if (ct_req[m] && ct_gnt == '0) ct_gnt[m] = 1'b1;
    end
    gcount[0]++;
    #1;
    // credits returned (ack_out settles once the grants are known)
    for (int c = 0; c < NUM_VC; c++) if (ack_out[c]) begin credit[c]++; acks++; end
    for (int m = 0; m < 4; m++) if (ct_gnt[m]) begin
      if (ct_txn[m].cmd == CT_RESV) begin
        rp_v[0] = 2'b01; rp_m[0] = m;
        rp_ok[0] = (ct_txn[m].addr[NUM_NITX-1:0] & (reserved | held)) == '0;
        rp_mask[0] = ct_txn[m].addr;
      end else begin
        seen[m].push_back(ct_txn[m]);
        if (ct_txn[m].cmd == CT_FREE) reserved &= ~ct_txn[m].addr[NUM_NITX-1:0];
      end
    end
  end

  task automatic packet(int vc, word_t hdr, int n);
    frame_t fr;
    fr.vc = vc;
    fr.f = '{cmd: CT_MARK, data: hdr};
    txq[vc].push_back(fr);
    for (int i = 0; i < n; i++) begin
      fr.f = '{cmd: (i == n-1) ? CT_EOP : CT_DTX, data: {8'(vc), 8'hE0, 16'(i)}};
      txq[vc].push_back(fr);
    end
    fr.f = '{cmd: CT_FREE, data: '0};
    txq[vc].push_back(fr);
  endtask

  initial begin
    int t;
    word_t hdr [NUM_VC];
    slv_mask_t msk [NUM_VC];
    int n [NUM_VC];
    for (int c = 0; c < NUM_VC; c++) credit[c] = 4;
    rp_v[0] = '0; rp_v[1] = '0; gcount[0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); cs_we = 1; cs_waddr = 8'(i); cs_wdata = prog[i];
    end
    @(negedge clk); cs_we = 0; run = 1;
    reserved[4] = 1'b1;
    hdr[0] = 32'h0000_0800;   msk[0] = slv_mask_t'(1) << 3;        n[0] = 12;
    hdr[1] = 32'h0000_3000;   msk[1] = slv_mask_t'(1) << 5;        n[1] = 9;
    hdr[2] = 32'h0040_0000;   msk[2] = slv_mask_t'(1) << HOST_BIT; n[2] = 15;
    for (int c = 0; c < NUM_VC; c++) packet(c, hdr[c], n[c]);
    t = 0;
    while (t < 20000 && (txq[0].size() + txq[1].size() + txq[2].size() > 0 ||
           seen[1].size() + seen[2].size() + seen[3].size() < 12+9+15+6)) begin
      @(posedge clk); t++;
    end
    repeat (40) @(posedge clk);
    for (int c = 0; c < NUM_VC; c++) begin
      automatic int m = c + 1;
      check($sformatf("vc %0d word count", c), seen[m].size() == n[c] + 2);
      if (seen[m].size() == n[c] + 2) begin
        check($sformatf("vc %0d header", c), seen[m][0].data == hdr[c] &&
                                             seen[m][0].cmd == CT_MARK);
        for (int i = 0; i < n[c]; i++)
          check($sformatf("vc %0d word %0d", c, i),
                seen[m][1+i].data == {8'(c), 8'hE0, 16'(i)} &&
                seen[m][1+i].cmd == ((i == n[c]-1) ? CT_EOP : CT_DTX));
        check($sformatf("vc %0d FREE", c), seen[m][n[c]+1].cmd == CT_FREE);
        foreach (seen[m][i]) check($sformatf("vc %0d mask %0d", c, i), seen[m][i].addr == msk[c]);
      end
    end
    check("engine issued no bus command", seen[0].size() == 0);
    check("credits never exceeded", over == 0);
    check("every word acknowledged", acks == words_sent && acks == 12+9+15+6);
    check("reservations released", reserved == 12'h010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
