// Testbench for the abc_dacs model: compares the three DAC currents with the
// transfer functions (ith = IDAR/256 x code, cali = -IDAR/256 x code,
// ivi1 = -1.2 IDAR/16 x code), worked in real arithmetic, over random codes
// and reference currents, plus the full-scale points at IDAR = -300 uA.
`include "tb_util.svh"
module tb_abc_dacs;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic [7:0] threshold, calamp;
  logic [3:0] biasamp;
  logic signed [31:0] iref_na, ith_na, cali_na, ivi1_na;

  abc_dacs dut (.threshold, .calamp, .biasamp, .iref_na, .ith_na, .cali_na, .ivi1_na);

  function automatic bit near(int got, real want);
    return (real'(got) - want) <= 1.0 && (want - real'(got)) <= 1.0;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      threshold = 8'($urandom); calamp = 8'($urandom); biasamp = 4'($urandom);
      iref_na = (n == 0) ? -300000 : -int'($urandom_range(100000, 500000));
      if (n == 0) begin threshold = 255; calamp = 255; biasamp = 15; end
      #1;
      `CHECK(near(ith_na, iref_na / 256.0 * threshold), $sformatf("ith %0d", ith_na))
      `CHECK(near(cali_na, -iref_na / 256.0 * calamp), $sformatf("cali %0d", cali_na))
      `CHECK(near(ivi1_na, -iref_na * 1.2 / 16.0 * biasamp), $sformatf("ivi1 %0d", ivi1_na))
      if (n == 0) begin
        // full scale at IDAR = -300 uA: ith -298.8 uA, cali 298.8 uA, ivi1 337.5 uA
        `CHECK(ith_na == -298828 && cali_na == 298828 && ivi1_na == 337500, "full scale")
      end
    end
    `FINISH
  end
endmodule
