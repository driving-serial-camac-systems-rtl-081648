// sdvme_clkgen: Serial Highway line clock generator.
//
// Divides the system clock down to the selected Serial Highway rate, 0.5, 1,
// 2.5 or 5 MHz (the four rates the driver offers). The line clock is a square
// wave; one-cycle strobes mark its falling edge (where the transmitter puts the
// next bit or byte on the line) and its rising edge (the middle of the data
// window, where a receiver samples).
// The system clock rate CLK_HZ is this design's choice (20 MHz): it must be a
// multiple of 10 MHz so that every rate is an even number of system clocks.
// A change of speed takes effect at the next half period.
module sdvme_clkgen
  import sdvme_pkg::*;
#(
  parameter int unsigned CLK_HZ = 20_000_000
) (
  input  logic   clk,
  input  logic   rst,
  input  speed_e speed,
  output logic   line_clk,
  output logic   tick_fall,   // line_clk goes 1 -> 0 after this cycle
  output logic   tick_rise    // line_clk goes 0 -> 1 after this cycle
);
  localparam int unsigned HP0 = half_period(CLK_HZ, SPD_0M5);
  localparam int unsigned HP1 = half_period(CLK_HZ, SPD_1M);
  localparam int unsigned HP2 = half_period(CLK_HZ, SPD_2M5);
  localparam int unsigned HP3 = half_period(CLK_HZ, SPD_5M);
  localparam int unsigned CW  = $clog2(HP0 + 1);

  initial begin
    assert (HP3 >= 1 && CLK_HZ % 10_000_000 == 0)
      else $error("sdvme_clkgen: CLK_HZ must be a multiple of 10 MHz");
  end

  logic [CW-1:0] cnt, hp;

  always_comb begin
    case (speed)
      SPD_0M5: hp = CW'(HP0);
      SPD_1M:  hp = CW'(HP1);
      SPD_2M5: hp = CW'(HP2);
      default: hp = CW'(HP3);
    endcase
  end

  wire last = (cnt >= hp - 1'b1);
  assign tick_fall = last &  line_clk;
  assign tick_rise = last & ~line_clk;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      line_clk <= 1'b0;
    end else if (last) begin
      cnt      <= '0;
      line_clk <= ~line_clk;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
