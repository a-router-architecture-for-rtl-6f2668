// timestamp_unit: the PRC's packet time base.
//
// A 32-bit counter advances once per core clock. The host can read it and load a
// new value (load/load_value), which lets software pull the clocks of neighbouring
// nodes together. Every page event logged by the host interface carries the low 16
// bits of the time at which the page was completed, so the host can time-stamp the
// packets it sends and receives. That the PRC time-stamps packets to help control
// clock drift is from the design; the counter width, the host load and using the
// stamp in the event records are this design's choices.
module timestamp_unit
  import prc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t load_value,
  output word_t now
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    now <= '0;
    else if (load) now <= load_value;
    else           now <= now + 1'b1;
  end
endmodule
