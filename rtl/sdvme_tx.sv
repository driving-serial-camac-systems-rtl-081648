// sdvme_tx: Serial Highway line transmitter (Command output).
//
// Takes message bytes over a valid/ready handshake and puts them on the line,
// byte serial (all 8 bits on a parallel output, one byte per line clock) or bit
// serial (one bit per line clock), as selected by bit_mode. The output changes
// at the falling edge of the line clock so a receiver can sample at the rising
// edge. When no byte is offered, byte-serial mode sends space bytes (8'h00) and
// bit-serial mode holds the line at 1 (idle).
// Bit-serial framing (a 0 start bit, 8 data bits LSB first, a 1 stop bit) is this
// design's choice; the driver description names the two modes without giving
// their line coding.
// in_ready is a one-cycle strobe; a byte is taken when in_valid and in_ready are
// both high. byte_tick pulses once per byte time, message byte or not, and is
// the time base of the reply timeout.
module sdvme_tx
  import sdvme_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_mode,
  input  logic       tick_fall,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic [7:0] tx_data,    // byte-serial output
  output logic       tx_bit,     // bit-serial output
  output logic       byte_tick
);
  logic [3:0] bitcnt;            // position in the 10-bit frame
  logic [9:0] shreg;

  wire frame_start = bit_mode ? (bitcnt == 4'd0) : 1'b1;
  assign in_ready  = tick_fall & frame_start;
  assign byte_tick = tick_fall & frame_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      bitcnt  <= '0;
      shreg   <= '1;
      tx_data <= SPACE_BYTE;
      tx_bit  <= 1'b1;
    end else if (tick_fall) begin
      if (!bit_mode) begin
        bitcnt  <= '0;
        tx_bit  <= 1'b1;
        tx_data <= in_valid ? in_data : SPACE_BYTE;
      end else begin
        tx_data <= SPACE_BYTE;
        if (bitcnt == 4'd0) begin
          // load a frame: stop bit, data, start bit (sent from bit 0 upwards)
          shreg  <= in_valid ? {1'b1, in_data, 1'b0} : 10'h3FF;
          tx_bit <= in_valid ? 1'b0 : 1'b1;
        end else begin
          shreg  <= {1'b1, shreg[9:1]};
          tx_bit <= shreg[1];
        end
        bitcnt <= (bitcnt == 4'(BIT_FRAME - 1)) ? 4'd0 : bitcnt + 4'd1;
      end
    end
  end
endmodule
