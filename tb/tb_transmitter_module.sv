// tb_transmitter_module: the outgoing link of link 1 (NITXs 3, 4, 5).
// The testbench puts words on the bus for this link's channels and for other
// slaves (which must be ignored), decodes the symbol stream on its own and
// returns credits like a receiver with a 4-word buffer per channel.
// Checked: every word arrives with its command, data and virtual channel, in bus
// order within its channel, FREE included; symbols come every second cycle and
// back-to-back words start 8 cycles apart (32 bits at 10 bits per two cycles); a
// channel whose receiver withholds credits stops after 4 words while the other
// channels keep sending, and resumes when credits return; space is honoured so no
// queue overflows.
`timescale 1ns/1ps
module tb_transmitter_module;
  import prc_pkg::*;
  localparam int L = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              bus_valid = 0, sym_valid, idle;
  logic [NUM_VC-1:0] space;
  ct_txn_t           bus_txn = '0;
  logic [SYM_W-1:0]  sym;
  logic [NUM_VC-1:0] ack_in = '0;

  transmitter_module #(.LINK(L)) dut (.clk, .rst_n, .bus_valid, .bus_txn, .space,
                                      .sym, .sym_valid, .ack_in, .idle);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { ctcmd_e cmd; word_t data; int vc; } rx_t;
  rx_t exp_q [$], got_q [$];

  // receiver-side decoder
  int   cyc = 0, si = 0, last_sym = -10, sym_gap_bad = 0, frame_t [$];
  logic [7:0] tags;
  word_t dw;
  int   outstanding [NUM_VC];
  int   over_credit = 0;
  logic hold_ack [NUM_VC];
  int   pend_ack [NUM_VC];

  always @(posedge clk) begin
    #1;
    cyc++;
    ack_in = '0;
    for (int c = 0; c < NUM_VC; c++)
      if (!hold_ack[c] && pend_ack[c] > 0 && $urandom_range(0, 3) == 0) begin
        ack_in[c] = 1'b1; pend_ack[c]--; outstanding[c]--;
      end
  end
  always @(negedge clk) if (rst_n && sym_valid) begin
    if (si != 0 && cyc - last_sym != 2) sym_gap_bad++;
    last_sym = cyc;
    if (si == 0) frame_t.push_back(cyc);
    tags = {tags[5:0], sym[9:8]};
    dw   = {dw[23:0], sym[7:0]};
    si++;
    if (si == 4) begin
      rx_t r;
      int vc;
      si = 0;
      r.cmd  = ctcmd_e'(tags[7:5]);
      vc     = int'({tags[4], tags[3]});
      r.vc   = vc;
      r.data = dw;
      got_q.push_back(r);
      outstanding[vc]++;
      pend_ack[vc]++;
      if (outstanding[vc] > 4) over_credit++;
    end
  end

  task automatic send(ctcmd_e cmd, slv_mask_t addr, word_t data);
    @(negedge clk);
    while ((addr[L*3 +: 3] & ~space) != '0) @(negedge clk);
    bus_valid = 1; bus_txn = '{cmd: cmd, addr: addr, all: 1'b0, crc: 1'b0, data: data};
    @(negedge clk);
    bus_valid = 0;
    if (addr[L*3 +: 3] != '0 && cmd != CT_RESV && cmd != CT_HOLD && cmd != CT_CHECK) begin
      rx_t r;
      r.cmd = cmd; r.data = data;
      r.vc = addr[L*3] ? 0 : addr[L*3+1] ? 1 : 2;
      exp_q.push_back(r);
    end
  endtask

  initial begin
    int n0;
    for (int c = 0; c < NUM_VC; c++) begin outstanding[c] = 0; hold_ack[c] = 0; pend_ack[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    check("idle after reset", idle);
    // back-to-back words on all channels, interleaved with traffic for other slaves
    for (int i = 0; i < 24; i++) begin
      automatic int c = i % 3;
      send(i % 5 == 4 ? CT_MARK : CT_DTX, slv_mask_t'(1) << (L*3 + c), word_t'(32'h5000_0000 + i));
      if (i % 4 == 0) send(CT_DTX, slv_mask_t'(1) << 7, 32'hDEAD_0000 + i);
      if (i % 7 == 0) send(CT_RESV, slv_mask_t'(1) << (L*3), 32'hDEAD_1111);
    end
    send(CT_EOP, slv_mask_t'(1) << (L*3 + 2), 32'h5EE0_0001);
    send(CT_FREE, slv_mask_t'(1) << (L*3 + 2), '0);
    while (!idle) @(posedge clk);
    repeat (20) @(posedge clk);
    // start spacing while the queue was busy: 8 cycles
    begin
      int bad = 0;
      for (int i = 1; i < 20; i++) if (frame_t[i] - frame_t[i-1] < 8) bad++;
      check("frames at least 8 cycles apart", bad == 0);
      check("back-to-back frames exactly 8 apart", frame_t[5] - frame_t[4] == 8);
    end
    check("symbols every second cycle", sym_gap_bad == 0);

    // credit stall on channel 1
    hold_ack[1] = 1;
    n0 = got_q.size();
    for (int i = 0; i < 6; i++)
      send(CT_DTX, slv_mask_t'(1) << (L*3 + 1), word_t'(32'h7100_0000 + i));
    for (int i = 0; i < 3; i++)
      send(CT_DTX, slv_mask_t'(1) << (L*3), word_t'(32'h7000_0000 + i));
    repeat (200) @(posedge clk);
    begin
      int n1 = 0, nz = 0;
      for (int i = n0; i < got_q.size(); i++) begin
        if (got_q[i].vc == 1) n1++;
        if (got_q[i].vc == 0) nz++;
      end
      check("channel stops at 4 credits", n1 == 4 && !idle);
      check("other channel passes the blocked one", nz == 3);
    end
    n0 += 3;
    hold_ack[1] = 0;
    while (!idle) @(posedge clk);
    repeat (30) @(posedge clk);
    check("channel resumes", got_q.size() - n0 == 6);
    check("never more than 4 words outstanding", over_credit == 0);

    check("word count", got_q.size() == exp_q.size());
    for (int c = 0; c < NUM_VC; c++) begin
      rx_t e [$], g [$];
      foreach (exp_q[i]) if (exp_q[i].vc == c) e.push_back(exp_q[i]);
      foreach (got_q[i]) if (got_q[i].vc == c) g.push_back(got_q[i]);
      check($sformatf("vc %0d count", c), e.size() == g.size());
      for (int i = 0; i < e.size() && i < g.size(); i++)
        check($sformatf("vc %0d word %0d", c, i), g[i].cmd == e[i].cmd && g[i].data == e[i].data);
    end
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
