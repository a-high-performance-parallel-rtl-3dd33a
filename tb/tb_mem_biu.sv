// tb_mem_biu: puts a numbered word on the bus in every 80 MHz slot and
// checks that each port controller receives exactly the words of its own
// slot, once each and in order; drives a numbered word from each port
// controller every 40 MHz cycle and checks that each appears on the bus
// once, in its owner's slot.
module tb_mem_biu;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  logic clk, clk_bus, rst = 1;
  always begin
    clk_bus = 1; clk = 1; #6.25; clk_bus = 0; #6.25;
    clk_bus = 1; clk = 0; #6.25; clk_bus = 0; #6.25;
  end
  up_word_t bus_up; dn_word_t bus_dn; logic bus_slot;
  up_word_t pc_up [2]; dn_word_t pc_dn [2];
  mem_biu dut (.*);

  int checks = 0, failures = 0;
  int sent_up [2], got_up [2], sent_dn [2], got_dn [2];

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus side: a word numbered per owner in every slot; monitor downstream
  always @(negedge clk_bus) if (!rst) begin
    int p; p = int'(bus_slot);
    bus_up = '0; bus_up.kind = UP_WDATA; bus_up.src = 2'(p); bus_up.data = 32'(sent_up[p]);
    sent_up[p]++;
    if (bus_dn.rvalid) begin
      checks++;
      if (bus_dn.src != 2'(p) || bus_dn.data != 32'(got_dn[p])) begin
        failures++; $display("FAIL downstream slot %0d got src %0d word %0d exp %0d", p, bus_dn.src, bus_dn.data, got_dn[p]);
      end
      got_dn[p]++;
    end
  end

  // controller side, 40 MHz
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < 2; p++) begin
      if (pc_up[p].kind == UP_WDATA) begin
        checks++;
        if (pc_up[p].src != 2'(p) || pc_up[p].data != 32'(got_up[p])) begin
          failures++; $display("FAIL upstream pc %0d got src %0d word %0d exp %0d", p, pc_up[p].src, pc_up[p].data, got_up[p]);
        end
        got_up[p]++;
      end
      pc_dn[p] <= '0;
      pc_dn[p].rvalid <= 1'b1;
      pc_dn[p].src    <= 2'(p);
      pc_dn[p].data   <= 32'(sent_dn[p]);
      sent_dn[p]++;
    end
  end

  initial begin
    for (int p = 0; p < 2; p++) begin sent_up[p] = 0; got_up[p] = 0; sent_dn[p] = 0; got_dn[p] = 0; pc_dn[p] = '0; end
    bus_up = '0;
    repeat (3) @(posedge clk);
    #15 rst = 0;
    repeat (200) @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (got_up[p] < 190 || got_dn[p] < 190) begin failures++; $display("FAIL pc %0d: %0d up, %0d down", p, got_up[p], got_dn[p]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
