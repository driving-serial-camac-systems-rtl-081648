// sdvme_txn: Command/Reply transaction control.
//
// Runs one CAMAC access at a time (the driver works the highway in
// conservative mode: one Command message, then its Reply). A start pulse
// clears NBUSY and the error bits, has the command generator send the Command
// message and waits for the Reply. The Reply status (ERR, SX, SQ, DERR), the
// read data and the receiver's error checks are then latched, NBUSY is set and
// reply_irq pulses. If the Reply has not arrived TIMEOUT_BYTES byte times after
// the start (320 in the driver), NBUSY is set and reply_irq pulses all the
// same, with the "Reply not complete" error set. A start while busy is ignored.
// Which error bit a timeout sets, and that a new start clears the old error
// bits, are this design's choices. NOSYNC is reported live by the line receiver
// and is not latched here.
module sdvme_txn
  import sdvme_pkg::*;
#(
  parameter int unsigned TIMEOUT_BYTES = 320
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        byte_tick,
  output logic        gen_start,
  input  logic        reply_done,
  input  reply_stat_t reply_stat,
  input  logic [23:0] reply_data,
  input  rx_err_t     reply_err,
  output logic        busy,
  output logic        nbusy,
  output reply_stat_t stat,
  output rx_err_t     err,
  output logic [23:0] rdata,
  output logic        timeout,
  output logic        reply_irq
);
  logic [$clog2(TIMEOUT_BYTES+1)-1:0] bytes;

  assign nbusy     = ~busy;
  assign gen_start = start & ~busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      stat      <= '0;
      err       <= '0;
      rdata     <= '0;
      bytes     <= '0;
      timeout   <= 1'b0;
      reply_irq <= 1'b0;
    end else begin
      reply_irq <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          bytes   <= '0;
          stat    <= '0;
          err     <= '0;
          timeout <= 1'b0;
        end
      end else if (reply_done) begin
        busy      <= 1'b0;
        stat      <= reply_stat;
        err       <= reply_err;
        rdata     <= reply_data;
        reply_irq <= 1'b1;
      end else if (byte_tick) begin
        if (bytes == $bits(bytes)'(TIMEOUT_BYTES - 1)) begin
          busy      <= 1'b0;
          err.cpl   <= 1'b1;
          timeout   <= 1'b1;
          reply_irq <= 1'b1;
        end
        bytes <= bytes + 1'b1;
      end
    end
  end
endmodule
