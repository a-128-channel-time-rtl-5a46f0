// tb_hit_finder: random and directed partition patterns with all four edge settings.
// A reference model walks the 17 samples of the period in time order, finds the first
// enabled transition and computes t = 16*coarse + position + 1; the DUT's registered
// output is compared one clock later, including the lost-hit flag.
`timescale 1ps/1ps
module tb_hit_finder;
  import tdc_pkg::*;
  logic clk = 0, rst = 1, lead_en, trail_en;
  logic [PART_W-1:0] part [N_PART];
  logic [COARSE_W-1:0] coarse;
  logic hit_valid, hit_lost;
  hit_t hit;
  int checks = 0, failures = 0;
  int n_lead = 0, n_trail = 0, n_border = 0;
  always #1000 clk = ~clk;
  hit_finder dut (.clk, .rst, .lead_en, .trail_en, .part, .coarse, .hit_valid, .hit, .hit_lost);
  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [16:0] s;
    logic ev, el, elost;
    time_t et;
    int cnt;
    lead_en = 1; trail_en = 1; coarse = '0;
    for (int p = 0; p < 4; p++) part[p] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // samples of one period: mostly steady levels with one or two edges, sometimes random
      case ($urandom % 4)
        0: s = 17'($urandom);
        1: s = 17'h1FFFF << ($urandom % 17);
        2: s = ~(17'h1FFFF << ($urandom % 17));
        default: s = {17{$urandom % 2 == 1}};
      endcase
      if (i < 34) s = (i < 17) ? (17'h1FFFF << i) : ~(17'h1FFFF << (i - 17)); // every position
      lead_en  = (i < 100) ? 1'b1 : 1'($urandom);
      trail_en = (i < 100) ? 1'b1 : 1'($urandom);
      coarse   = COARSE_W'($urandom);
      for (int p = 0; p < 4; p++)
        for (int j = 0; j < 5; j++) part[p][j] = s[4 * p + j];
      // reference
      ev = 0; el = 0; et = '0; cnt = 0;
      for (int b = 0; b < 16; b++) begin
        logic r, f;
        r = !s[b] && s[b+1] && lead_en;
        f = s[b] && !s[b+1] && trail_en;
        if (r || f) begin
          if (!ev) begin
            ev = 1; el = r; et = {coarse, 4'd0} + time_t'(b + 1);
            if (b % 4 == 3) n_border++;
          end
          cnt++;
        end
      end
      elost = cnt > 1;
      @(posedge clk); #1;
      checks++;
      if (hit_valid != ev || hit_lost != elost) begin
        failures++; $display("pattern %b: valid %b lost %b expected %b %b", s, hit_valid, hit_lost, ev, elost);
      end else if (ev) begin
        checks++;
        if (hit.t != et || hit.leading != el) begin
          failures++; $display("pattern %b: t %0d lead %b expected %0d %b", s, hit.t, hit.leading, et, el);
        end
        if (el) n_lead++; else n_trail++;
      end
    end
    checks++;
    if (n_lead == 0 || n_trail == 0 || n_border == 0) failures++;
    $display("leading %0d trailing %0d at partition borders %0d", n_lead, n_trail, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
