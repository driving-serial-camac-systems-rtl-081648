// tb_sdvme_clkgen: checks the line clock period at each of the four rates
// (40, 20, 8 and 4 system clocks at 20 MHz for 0.5, 1, 2.5 and 5 MHz) and that
// the edge strobes come exactly one cycle before each edge.
module tb_sdvme_clkgen;
  import sdvme_pkg::*;
  logic clk = 0, rst = 1;
  speed_e speed;
  logic line_clk, tick_fall, tick_rise;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_clkgen #(.CLK_HZ(20_000_000)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // edge strobes must predict the edges
  logic prev_clk, prev_fall, prev_rise;
  always @(posedge clk) begin
    prev_clk <= line_clk; prev_fall <= tick_fall; prev_rise <= tick_rise;
    if (!rst && prev_clk !== line_clk) begin
      if (line_clk) check(prev_rise, "rising edge announced by tick_rise");
      else          check(prev_fall, "falling edge announced by tick_fall");
    end
  end

  initial begin
    #2_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expect_p [4] = '{40, 20, 8, 4};
    int t_last, per;
    speed = SPD_5M;
    repeat (3) @(posedge clk); rst = 0;
    for (int s = 0; s < 4; s++) begin
      speed = speed_e'(s);
      repeat (100) @(posedge clk);
      @(posedge line_clk); t_last = $time;
      for (int k = 0; k < 5; k++) begin
        int hi;
        @(posedge line_clk);
        per = ($time - t_last) / 50; t_last = $time;
        check(per == expect_p[s], $sformatf("speed %0d period %0d expected %0d", s, per, expect_p[s]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
