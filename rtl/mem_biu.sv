// mem_biu: shared-memory side bus interface unit. It joins one high-speed
// bus, clocked at 80 MHz, to two port controllers clocked at 40 MHz.
//
// The bus is time-shared in alternate 80 MHz slots: the even slot belongs
// to port controller 0, the odd slot to port controller 1, so both can use
// the bus in every 40 MHz cycle without conflict, as the document
// describes. Upstream, the word on the bus in a controller's slot is
// registered and held for that controller, which samples it at its next
// 40 MHz edge. Downstream, the controller's word (registered at the 40 MHz
// edge) is driven onto the bus in its slot.
//
// Timing: clk rises together with every second rising edge of clk_bus.
// `phase` is 0 at the clk_bus edges that coincide with a clk edge; it is
// reset by `rst`, which must be released in the second half of a clk
// cycle (after the clk_bus edge that lies between two clk edges) so that
// the first clk_bus edge out of reset is one that coincides with clk. The ECL/TTL level
// conversion the document mentions has no logic counterpart here.
module mem_biu
  import uwgsp4_pkg::*;
(
  input  logic     clk_bus,
  input  logic     rst,
  input  up_word_t bus_up,        // bus word towards memory, per slot
  output dn_word_t bus_dn,        // bus word towards the processors
  output logic     bus_slot,      // which port controller owns the current slot
  output up_word_t pc_up  [2],
  input  dn_word_t pc_dn  [2]
);
  logic     phase;
  up_word_t hold [2];

  assign bus_slot = phase;

  always_ff @(posedge clk_bus) begin
    if (rst) begin
      phase   <= 1'b0;
      hold[0] <= '0;
      hold[1] <= '0;
      bus_dn  <= '0;
    end else begin
      phase <= ~phase;
      // the slot that is on the bus now belongs to controller `phase`
      hold[phase] <= bus_up;
      // drive the next slot's owner's word
      bus_dn <= pc_dn[~phase];
    end
  end

  // A controller's upstream word must not be overwritten before it has been
  // sampled: slot 0 is captured at an even edge, slot 1 at the following
  // odd edge, and the 40 MHz edge after both samples the pair.
  assign pc_up[0] = hold[0];
  assign pc_up[1] = hold[1];
endmodule
