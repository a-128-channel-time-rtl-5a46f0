// tb_tdc_register: a random input that changes in the middle of the 160 ps bins is
// sampled by the 16 flip-flops; after every clock edge the matching output must equal
// the input level at that instant.
`timescale 1ps/1ps
module tb_tdc_register;
  localparam int P = 2560;
  logic [7:0] clk_ph, q_rise, q_fall;
  logic din = 0;
  int checks = 0, failures = 0;
  phase_clock_gen #(.PERIOD_PS(P)) u_clk (.clk_ph);
  tdc_register dut (.clk_ph, .din, .q_rise, .q_fall);
  initial begin
    #(P * 2000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // input changes at 80 ps + n*160 ps, i.e. between sampling instants
  initial begin
    #80;
    forever begin
      din = ($urandom % 3 == 0) ? ~din : din;
      #160;
    end
  end
  for (genvar k = 0; k < 8; k++) begin : g_chk
    always @(posedge clk_ph[k]) begin
      automatic logic v = din;
      #20;
      checks++;
      if (q_rise[k] != v) begin failures++; $display("%t rise %0d: %b expected %b", $time, k, q_rise[k], v); end
    end
    always @(negedge clk_ph[k]) begin
      automatic logic v = din;
      #20;
      checks++;
      if (q_fall[k] != v) begin failures++; $display("%t fall %0d: %b expected %b", $time, k, q_fall[k], v); end
    end
  end
  initial begin
    #(P * 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
