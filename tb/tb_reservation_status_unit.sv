// tb_reservation_status_unit: drives channel-allocation commands one per cycle, as
// the CTBUS would, and checks the answers and the reserved/held state against a
// simple reference model kept in the testbench: all-or-nothing and as-many-of RESV,
// FREE, HOLD making later RESVs fail even on a busy channel, CHECK by the holder
// only (the TFUs and the host port count as one holder), and a random command
// stream compared cycle by cycle with the model.
`timescale 1ns/1ps
module tb_reservation_status_unit;
  import prc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cmd_valid = 0, all = 0;
  ctcmd_e     cmd = CT_DTX;
  slv_mask_t  addr = '0;
  mid_t       mid = '0;
  logic       resp_valid, resp_ok;
  mid_t       resp_mid;
  slv_mask_t  resp_mask;
  nitx_mask_t reserved, held;

  reservation_status_unit dut (.clk, .rst_n, .cmd_valid, .cmd, .addr, .all, .mid,
    .resp_valid, .resp_mid, .resp_ok, .resp_mask, .reserved, .held);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  nitx_mask_t m_res = '0, m_held = '0;
  int         m_holder [NUM_NITX];
  logic       e_ok;
  nitx_mask_t e_take;

  task automatic model(ctcmd_e c, nitx_mask_t s, logic a, int who_mst);
    // the host interface (masters 16..28) owns holds as one master
    int who = (who_mst >= 16) ? 16 : who_mst;
    nitx_mask_t free_ = ~m_res & ~m_held;
    e_ok = 1; e_take = '0;
    case (c)
      CT_RESV: begin
        if (a) begin
          e_ok = ((s & ~free_) == 0);
          if (e_ok) e_take = s;
        end else begin
          e_take = s & free_;
          e_ok = (e_take != 0) || (s == 0);
        end
        m_res |= e_take;
      end
      CT_CHECK: begin
        for (int i = 0; i < NUM_NITX; i++)
          if (s[i] && !(m_held[i] && m_holder[i] == who && !m_res[i])) e_ok = 0;
        if (e_ok) begin e_take = s; m_res |= s; m_held &= ~s; end
      end
      CT_FREE: begin
        m_res &= ~s;
        for (int i = 0; i < NUM_NITX; i++) if (s[i] && m_holder[i] == who) m_held[i] = 0;
      end
      CT_HOLD: begin
        m_held |= s;
        for (int i = 0; i < NUM_NITX; i++) if (s[i]) m_holder[i] = who;
      end
      default: ;
    endcase
  endtask

  task automatic issue(ctcmd_e c, nitx_mask_t s, logic a, int who, string tag);
    cmd_valid = 1; cmd = c; addr = {1'b0, s}; all = a; mid = mid_t'(who);
    model(c, s, a, who);
    @(posedge clk); #1;
    cmd_valid = 0;
    check({tag, " answer"}, resp_valid && resp_mid == mid_t'(who) && resp_ok == e_ok &&
          ((c != CT_RESV && c != CT_CHECK) || resp_mask[NUM_NITX-1:0] == e_take));
    check({tag, " state"}, reserved == m_res && held == m_held);
  endtask

  initial begin
    foreach (m_holder[i]) m_holder[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    issue(CT_RESV, 12'h003, 1, 4, "resv all free");
    check("resv all free ok", resp_ok && reserved == 12'h003);
    issue(CT_RESV, 12'h006, 1, 5, "resv all clash");
    check("clash refused", !resp_ok && reserved == 12'h003);
    issue(CT_RESV, 12'h006, 0, 5, "as-many-of");
    check("as-many-of takes free one", resp_ok && resp_mask[11:0] == 12'h004);
    issue(CT_HOLD, 12'h001, 0, 20, "hold busy");
    issue(CT_FREE, 12'h001, 0, 4, "free held");
    check("still held after owner's free", held == 12'h001 && !reserved[0]);
    issue(CT_RESV, 12'h001, 1, 6, "resv of held");
    check("held refuses resv", !resp_ok);
    issue(CT_CHECK, 12'h001, 1, 6, "check by other");
    check("check by other refused", !resp_ok);
    issue(CT_CHECK, 12'h001, 1, 20, "check by holder");
    check("check by holder ok", resp_ok && reserved[0] && !held[0]);
    // a hold placed by the host command port is claimed by a TFU (same owner)
    issue(CT_FREE, 12'h001, 0, 20, "free for host hold");
    issue(CT_HOLD, 12'h800, 0, 28, "host hold");
    issue(CT_RESV, 12'h800, 1, 7, "resv of host-held");
    check("host hold refuses NIRX resv", !resp_ok && held[11]);
    issue(CT_CHECK, 12'h800, 1, 27, "tfu check");
    check("TFU claims host hold", resp_ok && reserved[11] && !held[11]);
    // random stream
    for (int k = 0; k < 400; k++) begin
      ctcmd_e c;
      case ($urandom % 4)
        0: c = CT_RESV; 1: c = CT_FREE; 2: c = CT_HOLD; default: c = CT_CHECK;
      endcase
      issue(c, nitx_mask_t'($urandom) & nitx_mask_t'($urandom), 1'($urandom),
            ($urandom % 4 == 0) ? 16 + ($urandom % 13) : 4 + ($urandom % 3), "random");
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
