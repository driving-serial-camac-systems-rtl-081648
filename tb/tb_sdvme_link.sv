// tb_sdvme_link: line transmitter and line receiver back to back. Random bytes,
// with gaps, are sent in byte-serial and bit-serial mode at 5 and 0.5 MHz; the
// receiver must deliver exactly the offered bytes in order (space bytes
// skipped), the transmitter must give one byte_tick per byte time (1 line
// clock per byte in byte mode, 10 in bit mode), and stopping the line clock
// must raise nosync, which must fall again when the clock returns.
module tb_sdvme_link;
  import sdvme_pkg::*;
  logic clk = 0, rst = 1;
  logic bit_mode;
  speed_e speed;
  logic line_clk, tick_fall, tick_rise, stop_clk;
  logic in_valid, in_ready, byte_tick;
  logic [7:0] in_data, tx_data;
  logic tx_bit;
  logic out_valid, framing_err, nosync;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_clkgen u_clk (.clk, .rst, .speed, .line_clk, .tick_fall, .tick_rise);
  sdvme_tx u_tx (.clk, .rst, .bit_mode, .tick_fall, .in_valid, .in_data, .in_ready,
                 .tx_data, .tx_bit, .byte_tick);
  sdvme_rx #(.NOSYNC_CYCLES(256)) u_rx (.clk, .rst, .bit_mode, .rx_clk(line_clk & ~stop_clk),
                 .rx_data(tx_data), .rx_bit(tx_bit), .out_valid, .out_data, .framing_err, .nosync);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] sent [$];
  int n_rx, n_ticks, n_clk_rise;
  always @(posedge clk) begin
    if (byte_tick) n_ticks++;
    if (tick_rise) n_clk_rise++;
    if (!rst && out_valid && out_data != SPACE_BYTE) begin
      n_rx++;
      if (sent.size() == 0) check(0, $sformatf("byte %h received that was never sent (mode %0d)", out_data, bit_mode));
      else begin
        logic [7:0] e;
        e = sent.pop_front();
        check(out_data == e && !framing_err, $sformatf("received %h expected %h", out_data, e));
      end
    end
  end

  initial begin
    #20_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input bit bm, input speed_e sp, input int nbytes);
    int t0, c0;
    bit_mode = bm; speed = sp;
    repeat (200) @(posedge clk);
    n_rx = 0; n_ticks = 0; n_clk_rise = 0;
    for (int i = 0; i < nbytes; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      do in_data = 8'($urandom); while (in_data == SPACE_BYTE);
      while (!in_ready) @(negedge clk);   // taken at the next rising edge
      sent.push_back(in_data);
      @(negedge clk);
      in_valid = 1'b0;
      repeat ($urandom_range(0, 100)) @(posedge clk);
    end
    repeat (1000) @(posedge clk);
    check(n_rx == nbytes, $sformatf("mode %0d speed %0d: %0d of %0d bytes", bm, sp, n_rx, nbytes));
    check(sent.size() == 0, "all sent bytes received");
    check(n_ticks * (bm ? 10 : 1) >= n_clk_rise - (bm ? 10 : 1) &&
          n_ticks * (bm ? 10 : 1) <= n_clk_rise + (bm ? 10 : 1),
          $sformatf("byte_tick rate: %0d ticks for %0d line clocks", n_ticks, n_clk_rise));
  endtask

  initial begin
    in_valid = 0; in_data = 0; stop_clk = 0; bit_mode = 0; speed = SPD_5M;
    repeat (5) @(posedge clk); rst = 0;
    run(1'b0, SPD_5M, 40);
    run(1'b0, SPD_0M5, 10);
    run(1'b1, SPD_5M, 30);
    run(1'b1, SPD_0M5, 5);
    check(!nosync, "no NOSYNC while the clock runs");
    stop_clk = 1;
    repeat (300) @(posedge clk);
    check(nosync, "NOSYNC after the clock stops");
    stop_clk = 0;
    repeat (100) @(posedge clk);
    check(!nosync, "NOSYNC clears when the clock returns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
