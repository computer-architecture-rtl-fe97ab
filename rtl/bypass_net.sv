// bypass_net: forwards register values produced in the current cycle by the
// later stages to the register-read stage.
//
// Each producing stage (execute and memory in this pipeline) offers at most
// one BypassValue per cycle: a register number and the value it will write.
// Each of the two consumer ports asks for one register number and receives
// a valid value if some producer offers that register. When several offer
// the same register the lowest-numbered producer wins; producers are ordered
// youngest first, so the most recent value wins. The network is purely
// combinational. Producing, consuming and matching on register number follow
// the design; the number of producers and the priority order are this
// design's own.
module bypass_net
  import uarch_pkg::*;
#(
  parameter int unsigned NPROD = 2
) (
  input  BypassValue prod [NPROD],  // produceBypass, one per producing stage
  input  Rindx       cons1_idx,     // consumeBypass1
  output logic       cons1_valid,
  output Data        cons1_value,
  output logic [NPROD-1:0] cons1_sel, // one-hot: which producer supplied it
  input  Rindx       cons2_idx,     // consumeBypass2
  output logic       cons2_valid,
  output Data        cons2_value,
  output logic [NPROD-1:0] cons2_sel
);
  always_comb begin
    cons1_valid = 1'b0;
    cons1_value = '0;
    cons2_valid = 1'b0;
    cons2_value = '0;
    cons1_sel   = '0;
    cons2_sel   = '0;
    for (int i = NPROD - 1; i >= 0; i--) begin
      if (prod[i].valid && prod[i].regnum == cons1_idx) begin
        cons1_valid = 1'b1;
        cons1_value = prod[i].value;
        cons1_sel   = '0;
        cons1_sel[i] = 1'b1;
      end
      if (prod[i].valid && prod[i].regnum == cons2_idx) begin
        cons2_valid = 1'b1;
        cons2_value = prod[i].value;
        cons2_sel   = '0;
        cons2_sel[i] = 1'b1;
      end
    end
  end
endmodule
