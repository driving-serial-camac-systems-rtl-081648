// sdvme_rx: Serial Highway line receiver (Reply input).
//
// Brings the incoming line clock and data into the system clock domain through
// two-stage synchronizers and samples the data at each rising edge of the line
// clock (the sender changes it at the falling edge). In byte-serial mode every
// rising edge yields one byte. In bit-serial mode the receiver waits for a 0
// start bit, shifts in 8 data bits LSB first and then expects a 1 stop bit; a
// missing stop bit is reported with the byte in framing_err.
// All bytes are passed on, space bytes included; the message receiver skips them.
// nosync rises when no rising edge of the line clock has been seen for
// NOSYNC_CYCLES system clocks (the driver's NOSYNC condition: the clock is no
// longer detected at the input) and falls at the next edge. The threshold is this
// design's choice and must exceed the longest line clock period (40 system
// clocks at 0.5 MHz and 20 MHz).
// The line clock must be at most a quarter of the system clock.
module sdvme_rx
  import sdvme_pkg::*;
#(
  parameter int unsigned NOSYNC_CYCLES = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_mode,
  input  logic       rx_clk,
  input  logic [7:0] rx_data,
  input  logic       rx_bit,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       framing_err,
  output logic       nosync
);
  logic [2:0] clk_s;
  logic [7:0] data_s1, data_s2;
  logic [1:0] bit_s;
  logic [3:0] bitcnt;
  logic [7:0] shreg;
  logic [$clog2(NOSYNC_CYCLES+1)-1:0] idle;

  wire rise = clk_s[1] & ~clk_s[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s   <= '0;
      data_s1 <= '0;
      data_s2 <= '0;
      bit_s   <= '1;
    end else begin
      clk_s   <= {clk_s[1:0], rx_clk};
      data_s1 <= rx_data;
      data_s2 <= data_s1;
      bit_s   <= {bit_s[0], rx_bit};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bitcnt      <= '0;
      shreg       <= '0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      framing_err <= 1'b0;
      idle        <= '0;
      nosync      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (rise) begin
        idle   <= '0;
        nosync <= 1'b0;
      end else if (idle == $bits(idle)'(NOSYNC_CYCLES)) begin
        nosync <= 1'b1;
      end else begin
        idle <= idle + 1'b1;
      end

      if (rise) begin
        if (!bit_mode) begin
          bitcnt      <= '0;
          out_valid   <= 1'b1;
          out_data    <= data_s2;
          framing_err <= 1'b0;
        end else if (bitcnt == 4'd0) begin
          if (!bit_s[1]) bitcnt <= 4'd1;            // start bit
        end else if (bitcnt <= 4'd8) begin
          shreg  <= {bit_s[1], shreg[7:1]};
          bitcnt <= bitcnt + 4'd1;
        end else begin                              // stop bit
          bitcnt      <= '0;
          out_valid   <= 1'b1;
          out_data    <= shreg;
          framing_err <= ~bit_s[1];
        end
      end
    end
  end
endmodule
