// reservation_status_unit: the reserved / held state of every NITX.
//
// The CTBUS serializes all channel-allocation commands, so this unit sees at most
// one per cycle and needs no arbitration of its own. For the command on the bus in
// cycle t it answers in cycle t+1 (resp_ok, resp_mask) to the issuing master.
//   RESV  all=1: reserve every selected NITX if all are free and not held, else fail.
//   RESV  all=0: reserve those selected NITXs that are free ("as many of"); fails
//                only if none could be taken. resp_mask returns what was taken.
//   FREE       : release the selected NITXs; drops holds the issuer itself placed.
//   HOLD       : mark the selected NITXs held for the issuer; RESVs from anyone then
//                fail, even while the NITX is still busy.
//   CHECK      : reserve the selected NITXs if all are held by the issuer and free.
// "Issuer" means the owning master: the host interface (its TFUs and its host
// command port, masters 16-28) counts as one, so a HOLD the host places can be
// claimed by the TFU that sends on that NITX.
// Data commands (DTX/MARK/EOP) always answer ok. The memory-interface bit of a mask
// is never reservable and is passed through. reserved/held are visible to every
// master at all times (the routing engines' switch status).
// Command meanings follow the CTBUS command set; the all / as-many-of variants of
// RESV and the one-cycle response timing are this design's choices.
module reservation_status_unit
  import prc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  ctcmd_e     cmd,
  input  slv_mask_t  addr,
  input  logic       all,
  input  mid_t       mid,
  output logic       resp_valid,
  output mid_t       resp_mid,
  output logic       resp_ok,
  output slv_mask_t  resp_mask,
  output nitx_mask_t reserved,
  output nitx_mask_t held
);
  mid_t       holder [NUM_NITX];
  nitx_mask_t sel, avail, take, held_mine;
  logic       ok;

  always_comb begin
    sel   = addr[NUM_NITX-1:0];
    avail = ~reserved & ~held;
    for (int i = 0; i < NUM_NITX; i++)
      held_mine[i] = held[i] && (holder[i] == owner_of(mid)) && !reserved[i];
    take = '0;
    ok   = 1'b1;
    unique case (cmd)
      CT_RESV: begin
        if (all) begin
          ok   = ((sel & ~avail) == '0);
          take = ok ? sel : '0;
        end else begin
          take = sel & avail;
          ok   = (take != '0) || (sel == '0);
        end
      end
      CT_CHECK: begin
        ok   = ((sel & ~held_mine) == '0);
        take = ok ? sel : '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reserved   <= '0;
      held       <= '0;
      resp_valid <= 1'b0;
      resp_mid   <= '0;
      resp_ok    <= 1'b0;
      resp_mask  <= '0;
      for (int i = 0; i < NUM_NITX; i++) holder[i] <= '0;
    end else begin
      resp_valid <= cmd_valid;
      resp_mid   <= mid;
      resp_ok    <= ok;
      resp_mask  <= {addr[HOST_BIT], (cmd == CT_RESV || cmd == CT_CHECK) ? take : sel};
      if (cmd_valid) begin
        unique case (cmd)
          CT_RESV:  reserved <= reserved | take;
          CT_CHECK: begin
            reserved <= reserved | take;
            held     <= held & ~take;
          end
          CT_FREE: begin
            reserved <= reserved & ~sel;
            for (int i = 0; i < NUM_NITX; i++)
              if (sel[i] && holder[i] == owner_of(mid)) held[i] <= 1'b0;
          end
          CT_HOLD: begin
            held <= held | sel;
            for (int i = 0; i < NUM_NITX; i++)
              if (sel[i]) holder[i] <= owner_of(mid);
          end
          default: ;
        endcase
      end
    end
  end
endmodule
