// re_isa_pkg: instruction encoding of the routing engine.
//
// The instruction classes (alu, ldc, xfer, flag, jump, return, wait, and the
// "go rtp" / "go ctbus" side effects of ldc and xfer) are the routing engine's
// instruction set; the 24-bit binary format, the register numbers and the
// condition codes below are this design's own encoding.
//
//   [23:20] opcode
//   ALU   : [19:16] alu op  [15:11] src A  [10] B is immediate  [9:5] src B  [7:0] imm
//   LDC   : [19:18] go      [15:11] dst                                      [7:0] imm
//   XFER  : [19:18] go      [15:11] dst    [10:6] src
//   FLAG  : [19:17] flag op [16:15] user flag  [14] negate  [13:9] condition
//   JUMP  : [19] negate [18] link [17] indirect (target = acc) [16:12] cond [7:0] target
//   RETURN: [19] negate                                        [16:12] cond
//   WAIT  : no operands; channel 2 falls through, channel 1 goes to trap0, 0 to trap1
package re_isa_pkg;

  typedef enum logic [3:0] {
    OP_NOP = 4'd0, OP_ALU = 4'd1, OP_LDC = 4'd2, OP_XFER = 4'd3,
    OP_FLAG = 4'd4, OP_JUMP = 4'd5, OP_RET = 4'd6, OP_WAIT = 4'd7
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_PASS = 4'd0, ALU_ADD = 4'd1, ALU_SUB = 4'd2, ALU_AND = 4'd3,
    ALU_OR   = 4'd4, ALU_XOR = 4'd5, ALU_NOT = 4'd6, ALU_SHL = 4'd7,
    ALU_SHR  = 4'd8
  } aluop_e;

  typedef enum logic [2:0] {
    FL_SET = 3'd0, FL_CLR = 3'd1, FL_COPY = 3'd2, FL_CONFLICT = 3'd3, FL_AMO = 3'd4
  } flagop_e;

  // go field of ldc / xfer
  localparam logic [1:0] GO_NONE = 2'd0, GO_RTP = 2'd1, GO_CTBUS = 2'd2;

  // register numbers
  localparam logic [4:0] R_REG0   = 5'd0;   // reg0..reg15 = 0..15
  localparam logic [4:0] R_ACC    = 5'd16;
  localparam logic [4:0] R_NID0   = 5'd17;  // nid0..nid3 = 17..20 (read only)
  localparam logic [4:0] R_CTD0   = 5'd21;  // ctd0..ctd3 = 21..24
  localparam logic [4:0] R_CTADDR0 = 5'd25; // 6-bit mask {O12..O00}
  localparam logic [4:0] R_CTADDR1 = 5'd26; // 7-bit mask {host, O32..O20}
  localparam logic [4:0] R_CTCTL  = 5'd27;
  localparam logic [4:0] R_TRAP0  = 5'd28;
  localparam logic [4:0] R_TRAP1  = 5'd29;
  localparam logic [4:0] R_NFIFO  = 5'd30;  // read: pop host->engine FIFO, write: push engine->host
  localparam logic [4:0] R_UFLAGS = 5'd31;  // user flags (read only)

  // condition codes
  localparam logic [4:0] C_TRUE = 5'd0, C_ZERO = 5'd1, C_CARRY = 5'd2, C_ACK = 5'd3,
                         C_CONFLICT = 5'd4, C_AMONULL = 5'd5, C_NOTIFY = 5'd6,
                         C_UF0 = 5'd8,      // user flags 8..11
                         C_BUSY0 = 5'd16;   // NITX i reserved or held: 16+i

  // ctctl fields
  localparam int unsigned CTL_CMD_LSB = 0;   // [2:0] CTBUS command
  localparam int unsigned CTL_MODE_LSB = 3;  // [4:3] routing primitive mode
  localparam int unsigned CTL_ALL = 5;       // reserve all of the slaves
  localparam int unsigned CTL_CRC = 6;       // include word in CRC

  typedef logic [23:0] instr_t;

  function automatic instr_t i_alu(aluop_e op, logic [4:0] a, logic bimm, logic [4:0] b,
                                   logic [7:0] imm);
    instr_t i = '0;
    i[23:20] = OP_ALU; i[19:16] = op; i[15:11] = a; i[10] = bimm;
    if (bimm) i[7:0] = imm; else i[9:5] = b;
    return i;
  endfunction
  function automatic instr_t i_ldc(logic [7:0] imm, logic [4:0] dst, logic [1:0] go);
    instr_t i = '0;
    i[23:20] = OP_LDC; i[19:18] = go; i[15:11] = dst; i[7:0] = imm;
    return i;
  endfunction
  function automatic instr_t i_xfer(logic [4:0] src, logic [4:0] dst, logic [1:0] go);
    instr_t i = '0;
    i[23:20] = OP_XFER; i[19:18] = go; i[15:11] = dst; i[10:6] = src;
    return i;
  endfunction
  function automatic instr_t i_flag(flagop_e op, logic [1:0] uf, logic neg, logic [4:0] cond);
    instr_t i = '0;
    i[23:20] = OP_FLAG; i[19:17] = op; i[16:15] = uf; i[14] = neg; i[13:9] = cond;
    return i;
  endfunction
  function automatic instr_t i_jump(logic neg, logic [4:0] cond, logic [7:0] tgt,
                                    logic link, logic ind);
    instr_t i = '0;
    i[23:20] = OP_JUMP; i[19] = neg; i[18] = link; i[17] = ind; i[16:12] = cond;
    i[7:0] = tgt;
    return i;
  endfunction
  function automatic instr_t i_ret(logic neg, logic [4:0] cond);
    instr_t i = '0;
    i[23:20] = OP_RET; i[19] = neg; i[16:12] = cond;
    return i;
  endfunction
  function automatic instr_t i_wait();
    instr_t i = '0;
    i[23:20] = OP_WAIT;
    return i;
  endfunction

endpackage
