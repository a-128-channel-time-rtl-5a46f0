// hit_finder: hit searching algorithm of one TDC channel.
//
// Looks at the four aligned partitions of one clock period. Inside partition p, bit j
// and bit j+1 are neighbouring samples (bins 4p+j and 4p+j+1); a 0->1 change between
// them is a leading edge, a 1->0 change a trailing edge. Leading and trailing edge
// detection are enabled separately. The hit time is built from the coarse count of the
// period, the partition number and the position of the change:
//     t = 16*coarse + 4*p + j + 1
// i.e. the bin of the first sample that shows the new level (a change found at the last
// position of partition 3 lands in bin 0 of the next period).
//
// At most one hit per clock period leaves the block: the earliest enabled edge. If a
// second enabled edge occurs in the same period (a pulse or gap shorter than one clock
// period) it is dropped and hit_lost pulses. This one-hit-per-period rule is this
// design's choice; the edge search per partition and the time formula follow the
// design description.
//
// Timing: hit_valid/hit are registered, one clock after part/coarse.
`timescale 1ps/1ps
module hit_finder
  import tdc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                lead_en,
  input  logic                trail_en,
  input  logic [PART_W-1:0]   part [N_PART],
  input  logic [COARSE_W-1:0] coarse,
  output logic                hit_valid,
  output hit_t                hit,
  output logic                hit_lost
);

  logic       found, found_lead, two;
  logic [4:0] pos;   // 4p + j

  always_comb begin
    found      = 1'b0;
    found_lead = 1'b0;
    two        = 1'b0;
    pos        = '0;
    for (int p = N_PART - 1; p >= 0; p--) begin
      for (int j = PART_W - 2; j >= 0; j--) begin
        logic rise, fall;
        rise = !part[p][j] &&  part[p][j+1] && lead_en;
        fall =  part[p][j] && !part[p][j+1] && trail_en;
        if (rise || fall) begin
          // scanning from the latest position backwards: the last one kept is the earliest
          two        = found;
          found      = 1'b1;
          found_lead = rise;
          pos        = 5'(4 * p + j);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hit_valid <= 1'b0;
      hit_lost  <= 1'b0;
      hit       <= '0;
    end else begin
      hit_valid   <= found;
      hit_lost    <= two;
      hit.leading <= found_lead;
      hit.t       <= {coarse, FINE_W'(0)} + TIME_W'(pos) + TIME_W'(1);
    end
  end

endmodule
