// ctbus_arbiter: demand-slotted binary priority-tree arbiter for the CTBUS.
//
// The requesters are the leaves of a binary tree. Every inner node holds one
// priority bit saying which of its two subtrees wins when both request. Each
// cycle the grant is found by walking from the root towards a requesting leaf
// (combinational, one-hot gnt in the same cycle as req). Only nodes on the
// granted path whose two subtrees both requested flip their bit, so a busy
// subtree cannot starve its sibling and bandwidth is shared evenly among the
// active masters. A slot is given only on demand: with no request nothing changes.
// The tree shape follows the description of the bus arbiter as a binary priority
// tree; the rule for flipping the node bits is this design's choice.
module ctbus_arbiter #(
  parameter int unsigned N = 29
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic         gnt_valid,
  output logic [$clog2(N)-1:0] gnt_id
);
  localparam int unsigned LV = (N < 2) ? 1 : $clog2(N);
  localparam int unsigned L  = 1 << LV;       // leaves

  logic [2*L-1:1] any;        // subtree has a request (heap order, leaves at L..2L-1)
  logic [L-1:1]   pri;        // 1: right subtree wins a tie
  logic [L-1:1]   flip;
  int unsigned    node;

  always_comb begin
    for (int unsigned i = 0; i < L; i++)
      any[L+i] = (i < N) ? req[i] : 1'b0;
    for (int unsigned i = L-1; i >= 1; i--)
      any[i] = any[2*i] | any[2*i+1];

    flip = '0;
    node = 1;
    for (int unsigned lv = 0; lv < LV; lv++) begin
      if (any[2*node] && any[2*node+1]) begin
        flip[node] = 1'b1;
        node = pri[node] ? 2*node+1 : 2*node;
      end else if (any[2*node+1]) begin
        node = 2*node+1;
      end else begin
        node = 2*node;
      end
    end

    gnt_valid = any[1];
    gnt_id    = $bits(gnt_id)'(node - L);
    gnt       = '0;
    if (any[1]) gnt[node - L] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pri <= '0;
    else        pri <= pri ^ flip;
  end
endmodule
