// tb_partition_sync: drives the input with a random level per 160 ps bin, samples it with
// a tdc_register and checks that after clock-0 edge n+2 partition p holds bins 4p..4p+4
// of period n (bin 16 being bin 0 of period n+1).
`timescale 1ps/1ps
module tb_partition_sync;
  import tdc_pkg::*;
  localparam int P = 2560, NPER = 400;
  logic [7:0] clk_ph, q_rise, q_fall;
  logic din = 0;
  logic [PART_W-1:0] part [N_PART];
  logic [15:0] pat [NPER + 4];
  int checks = 0, failures = 0;
  phase_clock_gen #(.PERIOD_PS(P)) u_clk (.clk_ph);
  tdc_register u_reg (.clk_ph, .din, .q_rise, .q_fall);
  partition_sync dut (.clk_ph0(clk_ph[0]), .clk_ph2(clk_ph[2]), .clk_ph4(clk_ph[4]), .q_rise, .q_fall, .part);
  initial begin
    #(P * 2000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // bin b of period n is sampled at n*P + b*160; its level is held from 80 ps before to
  // 80 ps after that instant
  initial begin
    for (int n = 0; n < NPER + 4; n++) pat[n] = 16'($urandom);
    din = pat[0][0];
    for (int n = 0; n < NPER + 4; n++)
      for (int b = 0; b < 16; b++) begin
        if (n == 0 && b == 0) #80;
        else begin din = pat[n][b]; #160; end
        if (n == 0 && b == 0) ;
      end
  end
  initial begin
    // period n starts at clk_ph[0] rising edge n; edge 0 is at time 0
    @(posedge clk_ph[0]);            // edge 0 (time 0)
    for (int e = 1; e < NPER; e++) begin
      @(posedge clk_ph[0]);          // edge e
      #10;
      if (e >= 3) begin
        automatic int n = e - 2;
        for (int p = 0; p < 4; p++)
          for (int j = 0; j < 5; j++) begin
            automatic int b = 4 * p + j;
            automatic logic exp = (b == 16) ? pat[n + 1][0] : pat[n][b];
            checks++;
            if (part[p][j] != exp) begin
              failures++;
              if (failures < 10) $display("period %0d partition %0d bit %0d: %b expected %b", n, p, j, part[p][j], exp);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
