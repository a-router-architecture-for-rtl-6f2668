// routing_engine: the small programmable processor that each incoming physical
// link dedicates to header parsing, route computation and channel reservation for
// the packets arriving on its three virtual channels.
//
// It is an 8-bit microcontroller with a 256-word control store, a 16-byte register
// file, an 8-bit ALU (add, subtract, Boolean ops) writing an accumulator with zero
// and carry flags, four user flags and a one-level link register for subroutines.
// Around the CPU sit:
//   data input   : "wait" blocks until one of the three NIRXs offers a header word,
//                  latches it into nid3..nid0 (nid3 = most significant byte) and
//                  branches: channel 2 falls through, channel 1 goes to trap0,
//                  channel 0 to trap1. Fixed priority 2 > 1 > 0 when several wait.
//                  A wait issued while a header is open (no go rtp since the
//                  previous wait) takes the next word of the same channel and
//                  falls through, so multi-word headers (source lists) can be
//                  parsed and skipped word by word.
//   data output  : ctd3..ctd0 (next word to send), ctaddr1/ctaddr0 (13-bit slave
//                  mask {host, O32..O00}), ctctl (CTBUS command, routing primitive
//                  mode, all, CRC flags). "go rtp" hands these to the NIRX of the
//                  last wait as a routing primitive; "go ctbus" issues the ctctl
//                  command on the CTBUS as a bus master.
//   switch status: the reserved/held state of all 12 NITXs as jump conditions,
//                  a conflict check (mask against busy NITXs) and an as-many-of
//                  update (mask &= free NITXs, flag when nothing is left). When a
//                  RESV or CHECK succeeds, the granted mask is written back into
//                  ctaddr (address feedback).
//   control      : host download port into the control store and two 4-deep 8-bit
//                  notification FIFOs (host->engine read as register 30, engine->host
//                  written as register 30; a write to a full FIFO waits until the
//                  host has read).
// Timing: one instruction per cycle; a taken branch (jump, return, or a wait that
// goes to a trap address) costs one extra cycle. An instruction that tests the ack
// flag, or issues a second "go ctbus", waits until the previous CTBUS command has
// been answered. With run low the engine sits at address 0 so the host can load it.
// The instruction classes, registers and 256/16 sizes follow the design described;
// the binary encoding (re_isa_pkg) and the exact stall rules are this design's own.
module routing_engine
  import prc_pkg::*;
  import re_isa_pkg::*;
#(
  parameter int unsigned CS_DEPTH = 256,
  parameter int unsigned NREGS    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // control store download
  input  logic          cs_we,
  input  logic [7:0]    cs_waddr,
  input  instr_t        cs_wdata,
  // data input: header words offered by the three NIRXs
  input  logic [2:0]    hdr_valid,
  input  word_t         hdr_word [3],
  output logic [2:0]    hdr_pop,
  // routing primitive to the NIRXs
  output logic [2:0]    rtp_valid,
  output rtp_t          rtp,
  // CTBUS master port
  output logic          ct_req,
  output ct_txn_t       ct_txn,
  input  logic          ct_gnt,
  input  logic          ct_resp_valid,
  input  logic          ct_resp_ok,
  input  slv_mask_t     ct_resp_mask,
  // switch status
  input  nitx_mask_t    reserved,
  input  nitx_mask_t    held,
  // notification FIFOs
  input  logic          nf_in_wr,
  input  logic [7:0]    nf_in_data,
  output logic          nf_in_full,
  input  logic          nf_out_rd,
  output logic [7:0]    nf_out_data,
  output logic          nf_out_empty,
  // observation
  output logic [7:0]    pc_o,
  output logic          exec_o      // an instruction completed this cycle
);
  // ---------------------------------------------------------------- state
  instr_t      cs [CS_DEPTH];
  logic [7:0]  pc, lr;
  logic        bubble;
  logic [7:0]  rf [NREGS];
  logic [7:0]  acc;
  logic        zf, cf, ackf, conff, amonf;
  logic [3:0]  uf;
  logic [7:0]  nid [4];
  logic [7:0]  ctd [4];
  logic [5:0]  ctaddr0;
  logic [6:0]  ctaddr1;
  logic [7:0]  ctctl, trap0, trap1;
  logic [1:0]  cur_ch;
  logic        ct_pend;     // command issued, answer not yet back
  logic        ct_reqq;     // command waiting for the bus
  ct_txn_t     ct_txnq;

  // ---------------------------------------------------------------- fields
  instr_t      ir;
  opcode_e     op;
  logic [1:0]  go;
  logic [4:0]  fa, fb, fdst, fsrc, fcond, jcond;
  logic        fneg, jneg, jlink, jind, bimm;
  logic [7:0]  imm;

  assign ir    = cs[pc[$clog2(CS_DEPTH)-1:0]];
  assign op    = opcode_e'(ir[23:20]);
  assign go    = ir[19:18];
  assign fa    = ir[15:11];
  assign fb    = ir[9:5];
  assign bimm  = ir[10];
  assign imm   = ir[7:0];
  assign fdst  = ir[15:11];
  assign fsrc  = ir[10:6];
  assign fneg  = ir[14];
  assign fcond = ir[13:9];
  assign jneg  = ir[19];
  assign jlink = ir[18];
  assign jind  = ir[17];
  assign jcond = ir[16:12];

  // ---------------------------------------------------------------- notification FIFOs
  logic       nfi_empty, nfo_full, nfi_rd, nfo_wr;
  logic [7:0] nfi_data;
  logic [2:0] nfi_cnt, nfo_cnt;

  sync_fifo #(.W(8), .DEPTH(4)) u_nf_in (
    .clk, .rst_n, .wr(nf_in_wr), .wdata(nf_in_data), .rd(nfi_rd), .rdata(nfi_data),
    .empty(nfi_empty), .full(nf_in_full), .count(nfi_cnt)
  );

  // ---------------------------------------------------------------- operand read
  nitx_mask_t busy;
  slv_mask_t  mask;
  assign busy = reserved | held;
  assign mask = {ctaddr1, ctaddr0};

  function automatic logic [7:0] rd_reg(logic [4:0] a);
    logic [7:0] v;
    if (a < 5'd16)            v = (32'(a) < NREGS) ? rf[a[$clog2(NREGS)-1:0]] : 8'h00;
    else if (a == R_ACC)      v = acc;
    else if (a <= 5'd20)      v = nid[2'(a - R_NID0)];
    else if (a <= 5'd24)      v = ctd[2'(a - R_CTD0)];
    else if (a == R_CTADDR0)  v = {2'b00, ctaddr0};
    else if (a == R_CTADDR1)  v = {1'b0, ctaddr1};
    else if (a == R_CTCTL)    v = ctctl;
    else if (a == R_TRAP0)    v = trap0;
    else if (a == R_TRAP1)    v = trap1;
    else if (a == R_NFIFO)    v = nfi_data;
    else                      v = {4'h0, uf};
    return v;
  endfunction

  function automatic logic cond_val(logic [4:0] c);
    logic v;
    if (c >= C_BUSY0)         v = (4'(c - C_BUSY0) < 4'(NUM_NITX)) ? busy[4'(c - C_BUSY0)] : 1'b0;
    else if (c >= C_UF0)      v = (c - C_UF0 < 4) ? uf[c[1:0]] : 1'b0;
    else begin
      unique case (c)
        C_TRUE:     v = 1'b1;
        C_ZERO:     v = zf;
        C_CARRY:    v = cf;
        C_ACK:      v = ackf;
        C_CONFLICT: v = conff;
        C_AMONULL:  v = amonf;
        C_NOTIFY:   v = !nfi_empty;
        default:    v = 1'b0;
      endcase
    end
    return v;
  endfunction

  // ---------------------------------------------------------------- execute
  logic        exec, stall, taken;
  logic [7:0]  npc;
  logic        wr_en;
  logic [4:0]  wr_dst;
  logic [7:0]  wr_val;
  logic        alu_en;
  logic [8:0]  alu_res;
  logic [7:0]  opa, opb;
  logic        go_rtp, go_ct;
  logic [1:0]  wait_ch;
  logic        hdr_open;   // a header is being parsed: no go rtp since the last wait
  logic        uses_ack;

  always_comb begin
    opa = rd_reg(fa);
    opb = bimm ? imm : rd_reg(fb);
    unique case (aluop_e'(ir[19:16]))
      ALU_ADD: alu_res = {1'b0, opa} + {1'b0, opb};
      ALU_SUB: alu_res = {1'b0, opa} + {1'b0, ~opb} + 9'd1;
      ALU_AND: alu_res = {1'b0, opa & opb};
      ALU_OR:  alu_res = {1'b0, opa | opb};
      ALU_XOR: alu_res = {1'b0, opa ^ opb};
      ALU_NOT: alu_res = {1'b0, ~opa};
      ALU_SHL: alu_res = {opa, 1'b0};
      ALU_SHR: alu_res = {opa[0], 1'b0, opa[7:1]};
      default: alu_res = {1'b0, opa};
    endcase
  end

  always_comb begin
    if (hdr_open) wait_ch = cur_ch;
    else          wait_ch = hdr_valid[2] ? 2'd2 : hdr_valid[1] ? 2'd1 : 2'd0;
    uses_ack = ((op == OP_JUMP || op == OP_RET) && jcond == C_ACK) ||
               (op == OP_FLAG && fcond == C_ACK);
    go_rtp = (op == OP_LDC || op == OP_XFER) && go == GO_RTP;
    go_ct  = (op == OP_LDC || op == OP_XFER) && go == GO_CTBUS;
    stall  = (uses_ack && (ct_pend || ct_reqq)) ||
             (go_ct && (ct_pend || ct_reqq)) ||
             (op == OP_WAIT && !hdr_open && hdr_valid == 3'b000) ||
             (op == OP_WAIT && hdr_open && !hdr_valid[cur_ch]) ||
             ((op == OP_LDC || op == OP_XFER) && fdst == R_NFIFO && nfo_full);
    exec   = run && !bubble && !stall;

    wr_en  = 1'b0;
    wr_dst = fdst;
    wr_val = imm;
    alu_en = 1'b0;
    taken  = 1'b0;
    npc    = pc + 8'd1;
    unique case (op)
      OP_ALU:  alu_en = 1'b1;
      OP_LDC:  begin wr_en = 1'b1; wr_val = imm; end
      OP_XFER: begin wr_en = 1'b1; wr_val = rd_reg(fsrc); end
      OP_JUMP: if (cond_val(jcond) ^ jneg) begin
                 taken = 1'b1;
                 npc   = jind ? acc : imm;
               end
      OP_RET:  if (cond_val(jcond) ^ jneg) begin
                 taken = 1'b1;
                 npc   = lr;
               end
      OP_WAIT: if (!hdr_open && wait_ch != 2'd2) begin
                 taken = 1'b1;
                 npc   = (wait_ch == 2'd1) ? trap0 : trap1;
               end
      default: ;
    endcase
  end

  // values of the data output registers after this instruction's write
  logic [7:0] n_ctd [4];
  logic [5:0] n_ctaddr0;
  logic [6:0] n_ctaddr1;
  logic [7:0] n_ctctl;
  always_comb begin
    for (int k = 0; k < 4; k++)
      n_ctd[k] = (wr_en && wr_dst == R_CTD0 + 5'(k)) ? wr_val : ctd[k];
    n_ctaddr0 = (wr_en && wr_dst == R_CTADDR0) ? wr_val[5:0] : ctaddr0;
    n_ctaddr1 = (wr_en && wr_dst == R_CTADDR1) ? wr_val[6:0] : ctaddr1;
    n_ctctl   = (wr_en && wr_dst == R_CTCTL)   ? wr_val      : ctctl;
  end

  assign hdr_pop = (exec && op == OP_WAIT) ? (3'b001 << wait_ch) : 3'b000;
  assign nfi_rd  = exec && (((op == OP_XFER) && fsrc == R_NFIFO) ||
                            ((op == OP_ALU) && (fa == R_NFIFO || (!bimm && fb == R_NFIFO))));
  assign nfo_wr  = exec && wr_en && wr_dst == R_NFIFO;

  sync_fifo #(.W(8), .DEPTH(4)) u_nf_out (
    .clk, .rst_n, .wr(nfo_wr), .wdata(wr_val), .rd(nf_out_rd), .rdata(nf_out_data),
    .empty(nf_out_empty), .full(nfo_full), .count(nfo_cnt)
  );

  always_comb begin
    rtp.ctd  = {n_ctd[3], n_ctd[2], n_ctd[1], n_ctd[0]};
    rtp.addr = {n_ctaddr1, n_ctaddr0};
    rtp.mode = rtp_mode_e'(n_ctctl[CTL_MODE_LSB +: 2]);
    rtp.crc  = n_ctctl[CTL_CRC];
  end
  assign rtp_valid = (exec && go_rtp) ? (3'b001 << cur_ch) : 3'b000;

  assign ct_req = ct_reqq;
  assign ct_txn = ct_txnq;
  assign pc_o   = pc;
  assign exec_o = exec;

  always_ff @(posedge clk) begin
    if (cs_we) cs[cs_waddr[$clog2(CS_DEPTH)-1:0]] <= cs_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; lr <= '0; bubble <= 1'b0;
      acc <= '0; zf <= 1'b0; cf <= 1'b0; ackf <= 1'b0; conff <= 1'b0; amonf <= 1'b0;
      uf <= '0; ctaddr0 <= '0; ctaddr1 <= '0; ctctl <= '0; trap0 <= '0; trap1 <= '0;
      cur_ch <= '0; hdr_open <= 1'b0; ct_pend <= 1'b0; ct_reqq <= 1'b0; ct_txnq <= '0;
      for (int k = 0; k < 4; k++) begin nid[k] <= '0; ctd[k] <= '0; end
      for (int k = 0; k < NREGS; k++) rf[k] <= '0;
    end else if (!run) begin
      pc <= '0; bubble <= 1'b0;
    end else begin
      // CTBUS command in flight
      if (ct_reqq && ct_gnt) begin
        ct_reqq <= 1'b0;
        ct_pend <= 1'b1;
      end
      if (ct_resp_valid && ct_pend) begin
        ct_pend <= 1'b0;
        ackf    <= ct_resp_ok;
        if (ct_resp_ok && (ct_txnq.cmd == CT_RESV || ct_txnq.cmd == CT_CHECK)) begin
          ctaddr0 <= ct_resp_mask[5:0];           // address feedback
          ctaddr1 <= ct_resp_mask[12:6];
        end
      end

      bubble <= exec && taken;
      if (exec) begin
        pc <= npc;
        if (op == OP_JUMP && jlink) lr <= pc + 8'd1;
        if (alu_en) begin
          acc <= alu_res[7:0];
          zf  <= (alu_res[7:0] == 8'h00);
          cf  <= alu_res[8];
        end
        if (wr_en) begin
          if (wr_dst < 5'd16) begin
            if (32'(wr_dst) < NREGS) rf[wr_dst[$clog2(NREGS)-1:0]] <= wr_val;
          end else if (wr_dst == R_ACC) acc <= wr_val;
          else if (wr_dst >= R_CTD0 && wr_dst <= 5'd24) ctd[2'(wr_dst - R_CTD0)] <= wr_val;
          else if (wr_dst == R_CTADDR0) ctaddr0 <= wr_val[5:0];
          else if (wr_dst == R_CTADDR1) ctaddr1 <= wr_val[6:0];
          else if (wr_dst == R_CTCTL)   ctctl   <= wr_val;
          else if (wr_dst == R_TRAP0)   trap0   <= wr_val;
          else if (wr_dst == R_TRAP1)   trap1   <= wr_val;
        end
        if (op == OP_FLAG) begin
          unique case (flagop_e'(ir[19:17]))
            FL_SET:      uf[ir[16:15]] <= 1'b1;
            FL_CLR:      uf[ir[16:15]] <= 1'b0;
            FL_COPY:     uf[ir[16:15]] <= cond_val(fcond) ^ fneg;
            FL_CONFLICT: conff <= ((mask[NUM_NITX-1:0] & busy) != '0);
            FL_AMO: begin
              ctaddr0 <= ctaddr0 & ~busy[5:0];
              ctaddr1 <= ctaddr1 & {1'b1, ~busy[11:6]};
              amonf   <= ((mask[NUM_NITX-1:0] & ~busy) == '0);
            end
            default: ;
          endcase
        end
        if (op == OP_WAIT) hdr_open <= 1'b1;
        if (go_rtp)        hdr_open <= 1'b0;
        if (op == OP_WAIT) begin
          cur_ch <= wait_ch;
          {nid[3], nid[2], nid[1], nid[0]} <= hdr_word[wait_ch];
        end
        if (go_ct) begin
          ct_reqq      <= 1'b1;
          ct_txnq.cmd  <= ctcmd_e'(n_ctctl[CTL_CMD_LSB +: 3]);
          ct_txnq.addr <= {n_ctaddr1, n_ctaddr0};
          ct_txnq.all  <= n_ctctl[CTL_ALL];
          ct_txnq.crc  <= n_ctctl[CTL_CRC];
          ct_txnq.data <= {n_ctd[3], n_ctd[2], n_ctd[1], n_ctd[0]};
        end
      end
    end
  end

  // A CTBUS request stays up until granted.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ct_req && !ct_gnt && run |=> ct_req);
endmodule
