// tb_sdvme_txn: transaction control. A start must clear NBUSY and pass a
// single start to the generator (a second start while busy is ignored); a
// Reply must set NBUSY, latch status, data and errors and pulse reply_irq; with
// no Reply, NBUSY, the length error and reply_irq must come after exactly
// TIMEOUT_BYTES byte ticks.
module tb_sdvme_txn;
  import sdvme_pkg::*;
  localparam int TO = 320;
  logic clk = 0, rst = 1;
  logic start, byte_tick, gen_start, reply_done, busy, nbusy, timeout, reply_irq;
  reply_stat_t reply_stat, stat;
  logic [23:0] reply_data, rdata;
  rx_err_t reply_err, err;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_txn #(.TIMEOUT_BYTES(TO)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_gen, n_irq, n_ticks;
  always @(posedge clk) begin
    if (gen_start) n_gen++;
    if (reply_irq) n_irq++;
    if (byte_tick) n_ticks++;
  end

  initial begin
    #10_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; byte_tick = 0; reply_done = 0; reply_stat = '0; reply_data = '0; reply_err = '0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    check(nbusy, "idle after reset");
    for (int t = 0; t < 20; t++) begin
      int g0, i0;
      g0 = n_gen; i0 = n_irq;
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      check(!nbusy && n_gen == g0 + 1, "start clears NBUSY and starts the generator");
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      check(n_gen == g0 + 1, "second start while busy ignored");
      repeat ($urandom_range(1, 50)) begin @(negedge clk) byte_tick = 1; @(negedge clk) byte_tick = 0; end
      reply_stat = reply_stat_t'($urandom); reply_data = 24'($urandom); reply_err = rx_err_t'($urandom);
      @(negedge clk) reply_done = 1; @(negedge clk) reply_done = 0;
      @(negedge clk);
      check(nbusy && n_irq == i0 + 1, "Reply sets NBUSY and interrupts");
      check(stat == reply_stat && rdata == reply_data && err == reply_err, "Reply latched");
    end
    begin
      int t0, i0;
      i0 = n_irq;
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      check(err == '0, "start clears the error bits");
      t0 = n_ticks;
      while (!nbusy && n_ticks - t0 < TO + 10) begin
        @(negedge clk) byte_tick = 1; @(negedge clk) byte_tick = 0;
      end
      @(negedge clk);
      check(n_ticks - t0 == TO, $sformatf("timeout after %0d byte times", n_ticks - t0));
      check(nbusy && err.cpl && timeout && n_irq == i0 + 1, "timeout sets NBUSY, length error, interrupt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
