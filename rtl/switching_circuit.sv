// switching_circuit: the application logic of the test system, a "heater"
// that burns dynamic power in regions that can be switched on one by one.
//
// It holds REGIONS x FLOPS_PER_REGION flip-flops, 28,200 in all as in the
// published system. The flops of a region form a ring shift register loaded
// at reset with an alternating 1010... pattern; while the region runs, every
// clock shifts the ring by one place, so every flop toggles on every cycle,
// the highest switching activity the logic can have. pause stops all regions
// at once and leaves their contents in place, so activity can be halted for a
// measurement and resumed where it stopped.
//
// From the published system: the flop count, the full-speed toggling and the
// independently enabled regions; steps of 10 % of the activity were used
// there, which is why 10 regions of 2,820 flops are the default here. The ring
// structure, the alternating pattern and the pause input are this design's
// choices. The (* keep *) attribute asks synthesis not to trim the rings,
// whose only purpose is to switch.
//
// Interface: region_en (one bit per region), pause (overrides region_en),
// probe (bit 0 of each region, toggling every cycle while it runs) and
// active (region_en & ~pause, registered, for observation).
`timescale 1ns/1ps
module switching_circuit #(
  parameter int unsigned REGIONS          = 10,
  parameter int unsigned FLOPS_PER_REGION = 2820
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [REGIONS-1:0] region_en,
  input  logic               pause,
  output logic [REGIONS-1:0] probe,
  output logic [REGIONS-1:0] active
);

  for (genvar g = 0; g < REGIONS; g++) begin : g_region
    (* keep = "true" *) logic [FLOPS_PER_REGION-1:0] ring;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ring <= FLOPS_PER_REGION'({(FLOPS_PER_REGION + 1) / 2 {2'b10}});
      end else if (region_en[g] && !pause) begin
        ring <= {ring[FLOPS_PER_REGION-2:0], ring[FLOPS_PER_REGION-1]};
      end
    end

    assign probe[g] = ring[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active <= '0;
    else        active <= region_en & {REGIONS{!pause}};
  end

endmodule
