// ctbus: the cut-through bus (CTBUS), a 32-bit time-division multiplexed bus that
// is both the PRC's data switch and its channel allocator.
//
// Pipeline: in cycle t the arbiter picks one requesting master (gnt, combinational);
// in cycle t+1 that master's transaction is on the bus (bus_valid/bus_txn/bus_mid),
// seen by every slave at once, so one data transaction may feed several NITXs and
// the memory interface together (multicast). Channel commands on the bus go to the
// reservation status unit, whose answer reaches the master in cycle t+2
// (resp_valid with resp_mid). A master keeps its request and transaction steady
// until it sees its grant bit, and must only request a data transaction when the
// addressed slaves have room (they show it in their space signals).
// Because access is pipelined, a master that saw a channel free may still lose the
// RESV to another master; the reservation status unit settles that in bus order.
module ctbus
  import prc_pkg::*;
#(
  parameter int unsigned N = NUM_MST
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic    [N-1:0] req,
  input  ct_txn_t         txn [N],
  output logic    [N-1:0] gnt,
  output logic       bus_valid,
  output ct_txn_t    bus_txn,
  output mid_t       bus_mid,
  output logic       resp_valid,
  output mid_t       resp_mid,
  output logic       resp_ok,
  output slv_mask_t  resp_mask,
  output nitx_mask_t reserved,
  output nitx_mask_t held
);
  logic                  gv;
  logic [$clog2(N)-1:0]  gid;

  ctbus_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req, .gnt, .gnt_valid(gv), .gnt_id(gid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_valid <= 1'b0;
      bus_txn   <= '0;
      bus_mid   <= '0;
    end else begin
      bus_valid <= gv;
      if (gv) begin
        bus_txn <= txn[gid];
        bus_mid <= mid_t'(gid);
      end
    end
  end

  reservation_status_unit u_rsu (
    .clk, .rst_n,
    .cmd_valid (bus_valid),
    .cmd       (bus_txn.cmd),
    .addr      (bus_txn.addr),
    .all       (bus_txn.all),
    .mid       (bus_mid),
    .resp_valid, .resp_mid, .resp_ok, .resp_mask,
    .reserved, .held
  );
endmodule
