// partition_sync: reads the 16 samples of a tdc_register in four partitions and aligns
// them in the clk_ph[0] (system clock) domain.
//
// Partition p holds bins 4p .. 4p+4 of one clock period; the flip-flops on partition
// borders (bins 0, 4, 8, 12) are read into both neighbouring partitions, and bin 16 of
// partition 3 is bin 0 of the following period. Each partition is read by a clock edge
// that comes 6/16 to 8/16 of a period after its last sample and before that sample is
// overwritten:
//   partition 0 (bins 0..4,  rise 0..4)          : falling edge of clk_ph[2]  (10/16)
//   partition 1 (bins 4..8,  rise 4..7, fall 0)  : rising  edge of clk_ph[0]  (16/16)
//   partition 2 (bins 8..12, fall 0..4)          : rising  edge of clk_ph[4]  (20/16)
//   partition 3 (bins 12..16, fall 4..7, rise 0) : falling edge of clk_ph[0]  (24/16)
// A second register stage on clk_ph[0] brings all four into the system domain; an
// extra stage on partition 0 aligns it with the others. The four partitions of period n are
// therefore presented together on part after clock-0 edge n+2.
// The four-partition read-out follows the design description; which clock reads which
// partition is this design's own choice.
`timescale 1ps/1ps
module partition_sync
  import tdc_pkg::*;
(
  input  logic              clk_ph0,   // phase 0: system clock
  input  logic              clk_ph2,
  input  logic              clk_ph4,
  input  logic [7:0]        q_rise,
  input  logic [7:0]        q_fall,
  output logic [PART_W-1:0] part [N_PART]
);

  logic [PART_W-1:0] p0_a, p1_a, p2_a, p3_a;   // first read, in the partition's own clock
  logic [PART_W-1:0] p0_b;                     // alignment stage in the clk_ph[0] domain

  always_ff @(negedge clk_ph2) p0_a <= q_rise[4:0];
  always_ff @(posedge clk_ph0) p1_a <= {q_fall[0], q_rise[7:4]};
  always_ff @(posedge clk_ph4) p2_a <= q_fall[4:0];
  always_ff @(negedge clk_ph0) p3_a <= {q_rise[0], q_fall[7:4]};

  always_ff @(posedge clk_ph0) begin
    p0_b    <= p0_a;
    part[0] <= p0_b;
    part[1] <= p1_a;
    part[2] <= p2_a;
    part[3] <= p3_a;
  end

endmodule
