// Testbench for the abc_strobe_delay_line model: for every 6-bit setting the
// strobe's rising and falling edges must appear delay x 1.1 ns after the
// input edges (a 69.3 ns range over 63 steps), within 1 ps.
`include "tb_util.svh"
module tb_abc_strobe_delay_line;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic strobein, strobeout;
  logic [5:0] delay;
  realtime t_in, t_out;

  abc_strobe_delay_line dut (.strobein, .delay, .strobeout);

  initial begin
    strobein = 0; delay = 0;
    #100;
    for (int d = 0; d < 64; d++) begin
      delay = 6'(d);
      #10;
      strobein = 1; t_in = $realtime;
      @(posedge strobeout); t_out = $realtime;
      `CHECK(t_out - t_in > d * 1.1 - 0.002 && t_out - t_in < d * 1.1 + 0.002,
             $sformatf("rise delay %0d: %f ns", d, t_out - t_in))
      #125;
      strobein = 0; t_in = $realtime;
      @(negedge strobeout); t_out = $realtime;
      `CHECK(t_out - t_in > d * 1.1 - 0.002 && t_out - t_in < d * 1.1 + 0.002,
             $sformatf("fall delay %0d: %f ns", d, t_out - t_in))
    end
    `FINISH
  end
endmodule
