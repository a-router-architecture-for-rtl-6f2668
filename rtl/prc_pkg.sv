// prc_pkg: types and constants shared by the Programmable Routing Controller (PRC).
//
// The PRC has four bidirectional physical links with three virtual channels each.
// Every outgoing virtual channel is served by a network interface transmitter
// (NITX); NITX O_lc (link l, channel c) is slave number l*3+c on the cut-through
// bus (CTBUS). Slave bit 12 addresses the memory interface ("host"). This
// numbering follows the 7+6 bit address masks {host, O32..O20} / {O12..O00} of the
// multicast header example; the bit order inside the mask is this design's choice.
//
// CTBUS commands are the seven of the command set (DTX, MARK, EOP, FREE, RESV,
// HOLD, CHECK); their 3-bit encoding is this design's choice.
package prc_pkg;

  localparam int unsigned NUM_LINKS = 4;
  localparam int unsigned NUM_VC    = 3;
  localparam int unsigned NUM_NITX  = NUM_LINKS * NUM_VC;   // 12
  localparam int unsigned NUM_SLV   = NUM_NITX + 1;         // + memory interface
  localparam int unsigned HOST_BIT  = NUM_NITX;             // bit 12 of a slave mask
  localparam int unsigned WORD_W    = 32;

  // CTBUS masters: 4 routing engines, 12 NIRXs, 12 TFUs and the host command port.
  localparam int unsigned NUM_MST   = NUM_LINKS + 2 * NUM_NITX + 1;  // 29
  localparam int unsigned MID_W     = 5;
  localparam int unsigned MID_RE0   = 0;                     // routing engine of link l: l
  localparam int unsigned MID_NIRX0 = NUM_LINKS;             // NIRX l*3+c: 4 + l*3+c
  localparam int unsigned MID_TFU0  = NUM_LINKS + NUM_NITX;  // TFU k: 16 + k
  localparam int unsigned MID_HOST  = MID_TFU0 + NUM_NITX;   // host commands: 28

  typedef logic [NUM_SLV-1:0]  slv_mask_t;
  typedef logic [NUM_NITX-1:0] nitx_mask_t;
  typedef logic [MID_W-1:0]    mid_t;
  typedef logic [WORD_W-1:0]   word_t;

  typedef enum logic [2:0] {
    CT_DTX   = 3'd0,   // normal data transfer
    CT_MARK  = 3'd1,   // end-of-page data transfer
    CT_EOP   = 3'd2,   // end-of-packet data transfer
    CT_FREE  = 3'd3,   // relinquish selected channels
    CT_RESV  = 3'd4,   // reserve selected channels
    CT_HOLD  = 3'd5,   // host override: later RESVs of these channels fail
    CT_CHECK = 3'd6    // reserve channels held by the issuer
  } ctcmd_e;

  // Owner of a HOLD: the TFUs and the host command port together are one master,
  // the host interface; every routing engine and NIRX is a master of its own.
  function automatic mid_t owner_of(mid_t m);
    return (m >= mid_t'(MID_TFU0)) ? mid_t'(MID_TFU0) : m;
  endfunction

  function automatic logic is_data_cmd(ctcmd_e c);
    return (c == CT_DTX) || (c == CT_MARK) || (c == CT_EOP);
  endfunction

  // One CTBUS transaction as presented by a master and broadcast by the bus.
  typedef struct packed {
    ctcmd_e    cmd;
    slv_mask_t addr;   // selected slaves
    logic      all;    // RESV: 1 = all-or-nothing, 0 = as many as are free
    logic      crc;    // data word counts in the packet CRC
    word_t     data;
  } ct_txn_t;

  // Words buffered per link virtual channel and carried over the link.
  typedef struct packed {
    ctcmd_e cmd;
    word_t  data;
  } flit_t;

  // Routing primitive (RTP) from a routing engine to one of its NIRXs.
  // ctctl layout (this design's encoding of the Boolean control flags):
  //   [2:0] CTBUS command for "go ctbus", [4:3] RTP mode, [5] all, [6] word in CRC
  typedef enum logic [1:0] {
    RTP_RESVD    = 2'd0,   // slaves in the mask are reserved: forward now
    RTP_WAIT_ONE = 2'd1,   // wait until one slave in the mask is free, reserve it
    RTP_WAIT_ALL = 2'd2,   // wait until all slaves in the mask are free (multicast)
    RTP_DISCARD  = 2'd3    // drop the rest of the packet
  } rtp_mode_e;

  typedef struct packed {
    word_t     ctd;     // next word to transmit (ctd3..ctd0)
    slv_mask_t addr;    // ctaddr1, ctaddr0
    rtp_mode_e mode;
    logic      crc;     // include ctd word in the CRC
  } rtp_t;

  // Link symbol: 8 data bits and 2 tag bits; four symbols carry one flit.
  localparam int unsigned SYM_W = 10;

endpackage
