// tb_sdvme_top: end-to-end test of the Serial Highway driver at its default
// parameters, with a VME master written as tasks and one Serial Crate
// Controller model (crate 3) closing the loop.
// It covers CAMAC write, read and control accesses, byte- and bit-serial
// modes at all four rates with their space-byte counts, the Reply interrupt
// and its acknowledge, Demand messages through the FIFO and the Demand
// interrupt, each receive error, the 320-byte timeout, loss of the line clock,
// the reset at $20, address-modifier and base-address decoding, and the
// Command/Reply time against the figures quoted for the driver (about 55 us at
// 2.5 Mbit/s bit serial; well under 5 us at 5 Mbyte/s byte serial).
module tb_sdvme_top;
  import sdvme_pkg::*;

  localparam logic [4:0]  BASE = 5'h15;
  localparam logic [15:0] B    = {BASE, 11'h000};

  logic        clk = 1'b0;
  logic        sysreset_n;
  logic        as_n, write_n, iack_n, iackin_n;
  logic [1:0]  ds_n;
  logic [5:0]  am;
  logic [15:1] addr;
  logic [15:0] data_i, data_o;
  logic        data_oe, dtack_n, iackout_n;
  logic [7:1]  irq_n;
  logic        sw_user, sw_bit_mode;
  logic [1:0]  sw_speed;
  logic        cmd_clk, cmd_bit, rep_clk, rep_bit;
  logic [7:0]  cmd_data, rep_data;
  logic [2:0]  fault;
  logic        demand_req;
  logic [4:0]  demand_sgl;
  int          n_cmd, last_spaces;

  always #25 clk = ~clk;   // 20 MHz

  sdvme_top dut (
    .clk, .vme_sysreset_n(sysreset_n), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_am(am), .vme_addr(addr), .vme_data_i(data_i),
    .vme_data_o(data_o), .vme_data_oe(data_oe), .vme_dtack_n(dtack_n),
    .vme_iack_n(iack_n), .vme_iackin_n(iackin_n), .vme_iackout_n(iackout_n),
    .vme_irq_n(irq_n), .sw_base(BASE), .sw_user, .sw_speed, .sw_bit_mode,
    .cmd_clk, .cmd_data, .cmd_bit, .rep_clk, .rep_data, .rep_bit
  );

  scc_model #(.MY_SC(5'd3)) scc (
    .clk, .rst(!sysreset_n), .speed(sw_speed), .bit_mode(sw_bit_mode),
    .cmd_clk, .cmd_data, .cmd_bit, .rep_clk, .rep_data, .rep_bit,
    .fault, .demand_req, .demand_sgl, .n_cmd, .last_spaces
  );

  int checks = 0, failures = 0;
  int mech [string];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- VME master ----
  task automatic vme_cycle(input logic [15:0] a, input logic wr, input logic [15:0] d,
                           input logic [5:0] amod, output logic [15:0] q, output bit acked);
    int n;
    @(negedge clk);
    addr = a[15:1]; am = amod; write_n = ~wr; data_i = d; iack_n = 1'b1;
    @(negedge clk); as_n = 1'b0;
    @(negedge clk); ds_n = 2'b00;
    n = 0;
    while (dtack_n && n < 40) begin @(negedge clk); n++; end
    acked = !dtack_n;
    q = data_o;
    ds_n = 2'b11; as_n = 1'b1;
    n = 0;
    while (!dtack_n && n < 40) begin @(negedge clk); n++; end
    @(negedge clk);
  endtask

  task automatic wr(input logic [7:0] ra, input logic [15:0] d);
    logic [15:0] q; bit ack;
    vme_cycle(B | 16'(ra), 1'b1, d, 6'h2D, q, ack);
    check(ack, $sformatf("write $%02h acknowledged", ra));
  endtask

  task automatic rd(input logic [7:0] ra, output logic [15:0] q);
    bit ack;
    vme_cycle(B | 16'(ra), 1'b0, 16'h0, 6'h2D, q, ack);
    check(ack, $sformatf("read $%02h acknowledged", ra));
  endtask

  // IACK cycle at a level; returns the vector and whether the board answered
  task automatic iack(input logic [2:0] lvl, output logic [7:0] vec, output bit acked,
                      output bit passed);
    int n;
    @(negedge clk);
    addr = {12'h000, lvl}; iack_n = 1'b0; write_n = 1'b1;
    @(negedge clk); as_n = 1'b0;
    @(negedge clk); ds_n = 2'b00; iackin_n = 1'b0;
    n = 0; passed = 0;
    while (dtack_n && n < 30) begin @(negedge clk); n++; if (!iackout_n) passed = 1; end
    acked = !dtack_n;
    vec = data_o[7:0];
    ds_n = 2'b11; as_n = 1'b1; iackin_n = 1'b1;
    n = 0;
    while (!dtack_n && n < 30) begin @(negedge clk); n++; end
    @(negedge clk); iack_n = 1'b1;
  endtask

  // wait for NBUSY by polling the status register; returns status and cycles
  task automatic wait_nbusy(output logic [15:0] st, output int cycles, input int limit);
    int t0;
    t0 = cyc;
    do rd(8'h0C, st); while (!st[15] && (cyc - t0) < limit);
    cycles = cyc - t0;
  endtask

  int cyc = 0;
  int irq_cycles;
  always @(posedge clk) cyc++;

  // CAMAC access: returns status, read data and the cycles from start to NBUSY
  task automatic camac(input logic [4:0] n, input logic [3:0] a, input logic [4:0] f,
                       input logic [23:0] w, output logic [15:0] st, output logic [23:0] r,
                       output int cycles);
    logic [15:0] hi, lo;
    int t0;
    wr(8'h02, 16'(5'd3));
    if (is_write(f)) begin
      wr(8'h00, {a, 1'b0, f, 1'b0, n});
      wr(8'h04, {8'h00, w[23:16]});
      t0 = cyc;
      wr(8'h06, w[15:0]);
    end else begin
      t0 = cyc;
      wr(8'h00, {a, 1'b0, f, 1'b0, n});
    end
    fork
      begin
        // Reply interrupt (level 3) marks the arrival of the Reply
        int k = 0;
        while (irq_n[3] && k < 300000) begin @(negedge clk); k++; end
        irq_cycles = cyc - t0;
      end
      wait_nbusy(st, cycles, 300000);
    join
    cycles = cyc - t0;
    rd(8'h08, hi); rd(8'h0A, lo);
    r = {hi[7:0], lo};
  endtask

  function automatic bit clean(input logic [15:0] st);
    return st[15] && st[14:8] == 7'b0 && st[3:0] == 4'b0110;
  endfunction

  logic [15:0] st, q;
  logic [23:0] r;
  int          cycles;
  logic [7:0]  vec;
  bit          ack, passed;

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sysreset_n = 1'b0; as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1; iack_n = 1'b1;
    iackin_n = 1'b1; am = 6'h2D; addr = '0; data_i = '0; sw_user = 1'b0;
    sw_bit_mode = 1'b0; sw_speed = 2'd3; fault = 3'd0; demand_req = 1'b0; demand_sgl = '0;
    repeat (10) @(negedge clk);
    sysreset_n = 1'b1;
    repeat (10) @(negedge clk);

    // interrupter: Reply INT0 at level 3 vector $40, Demand INT1 at level 5 vector $41
    wr(8'h10, 16'h0013); wr(8'h12, 16'h0015); wr(8'h18, 16'h0040); wr(8'h1A, 16'h0041);
    rd(8'h10, q); check(q[6:0] == 7'h13, "interrupter control register read back");

    // ---- byte serial 5 MHz: write, read, control ----
    camac(5'd5, 4'd2, 5'd16, 24'h123456, st, r, cycles);
    check(clean(st), $sformatf("write status %h", st));
    check(irq_cycles < 100, $sformatf("5 Mbyte/s write takes %0d cycles (< 5 us)", irq_cycles));
    $display("5 MHz byte-serial write: %0d system clocks from the start to the Reply interrupt", irq_cycles);
    check(last_spaces == 5, $sformatf("5 MHz byte serial: %0d space bytes", last_spaces));
    mech["write"]++; mech["space_bytes"]++; mech["byte_serial"]++;
    check(!irq_n[3] && irq_n[5], "Reply interrupt on level 3");
    iack(3'd3, vec, ack, passed);
    check(ack && vec == 8'h40, $sformatf("IACK level 3 vector %h", vec));
    check(irq_n[3], "IRQ3 released after acknowledge");
    mech["reply_irq"]++;
    iack(3'd4, vec, ack, passed);
    check(!ack && passed, "IACK at another level passed on");
    mech["iack_pass"]++;

    camac(5'd5, 4'd2, 5'd0, 24'h0, st, r, cycles);
    check(clean(st) && r == 24'h123456, $sformatf("read back %h status %h", r, st));
    check(irq_cycles < 100, $sformatf("5 Mbyte/s read takes %0d cycles", irq_cycles));
    $display("5 MHz byte-serial read: %0d system clocks from the start to the Reply interrupt", irq_cycles);
    mech["read"]++;
    iack(3'd3, vec, ack, passed);
    camac(5'd5, 4'd2, 5'd26, 24'h0, st, r, cycles);
    check(clean(st), "control function status");
    mech["control"]++;
    iack(3'd3, vec, ack, passed);
    check(scc.n_cmd == 3, $sformatf("crate saw %0d commands", scc.n_cmd));

    // ---- space bytes at the other byte-serial rates ----
    sw_speed = 2'd2;
    camac(5'd7, 4'd1, 5'd17, 24'hABCDEF, st, r, cycles);
    check(clean(st) && last_spaces == 3, $sformatf("2.5 MHz byte: %0d spaces", last_spaces));
    sw_speed = 2'd1;
    camac(5'd7, 4'd1, 5'd1, 24'h0, st, r, cycles);
    check(clean(st) && r == 24'hABCDEF && last_spaces == 1, "1 MHz byte read");
    sw_speed = 2'd0;
    camac(5'd7, 4'd1, 5'd1, 24'h0, st, r, cycles);
    check(clean(st) && r == 24'hABCDEF && last_spaces == 1, "0.5 MHz byte read");
    mech["speed_switch"]++;

    // ---- bit serial 2.5 MHz: about 55 us per access ----
    sw_bit_mode = 1'b1; sw_speed = 2'd2;
    repeat (200) @(negedge clk);
    iack(3'd3, vec, ack, passed);
    camac(5'd9, 4'd0, 5'd16, 24'h00F00D, st, r, cycles);
    check(clean(st) && last_spaces == 1, $sformatf("bit-serial write status %h", st));
    check(irq_cycles > 45 * 20 && irq_cycles < 65 * 20,
          $sformatf("2.5 Mbit/s write takes %0d cycles (about 55 us)", irq_cycles));
    $display("2.5 MHz bit-serial write: %0d system clocks from the start to the Reply interrupt", irq_cycles);
    iack(3'd3, vec, ack, passed);
    camac(5'd9, 4'd0, 5'd0, 24'h0, st, r, cycles);
    check(clean(st) && r == 24'h00F00D, $sformatf("bit-serial read %h", r));
    check(irq_cycles > 45 * 20 && irq_cycles < 65 * 20,
          $sformatf("2.5 Mbit/s read takes %0d cycles (about 55 us)", irq_cycles));
    $display("2.5 MHz bit-serial read: %0d system clocks from the start to the Reply interrupt", irq_cycles);
    mech["bit_serial"]++;
    sw_speed = 2'd3;
    camac(5'd9, 4'd0, 5'd0, 24'h0, st, r, cycles);
    check(clean(st) && r == 24'h00F00D, "bit-serial 5 MHz read");
    sw_bit_mode = 1'b0;
    repeat (200) @(negedge clk);
    iack(3'd3, vec, ack, passed);

    // ---- Demand messages ----
    rd(8'h0C, st);
    check(!st[13], "FIFO empty before Demand");
    demand_sgl = 5'd7;
    @(negedge clk) demand_req = 1'b1; @(negedge clk) demand_req = 1'b0;
    repeat (200) @(negedge clk);
    demand_sgl = 5'd19;
    @(negedge clk) demand_req = 1'b1; @(negedge clk) demand_req = 1'b0;
    repeat (200) @(negedge clk);
    rd(8'h0C, st);
    check(st[13], "FNE after Demand");
    check(!irq_n[5], "Demand interrupt on level 5");
    iack(3'd5, vec, ack, passed);
    check(ack && vec == 8'h41, $sformatf("IACK level 5 vector %h", vec));
    rd(8'h0E, q);
    check(q == {1'b0, 2'b0, 5'd3, 3'b0, 5'd7}, $sformatf("first Demand %h", q));
    rd(8'h0E, q);
    check(q == {1'b0, 2'b0, 5'd3, 3'b0, 5'd19}, $sformatf("second Demand %h", q));
    rd(8'h0C, st);
    check(!st[13], "FIFO empty after reading");
    mech["demand_fifo"]++; mech["demand_irq"]++;

    // ---- receive errors ----
    fault = 3'd1;
    camac(5'd5, 4'd2, 5'd26, 24'h0, st, r, cycles);
    check(st[15] && st[14] && st[9], $sformatf("byte parity error status %h", st));
    mech["err_pb"] += int'(st[9]);
    fault = 3'd2;
    camac(5'd5, 4'd2, 5'd26, 24'h0, st, r, cycles);
    check(st[15] && st[14] && st[10] && !st[9], $sformatf("column parity error status %h", st));
    mech["err_cp"] += int'(st[10]);
    fault = 3'd3;
    camac(5'd5, 4'd2, 5'd26, 24'h0, st, r, cycles);
    check(st[15] && st[14] && st[11], $sformatf("header error status %h", st));
    mech["err_hed"] += int'(st[11]);
    fault = 3'd4;
    camac(5'd5, 4'd2, 5'd0, 24'h0, st, r, cycles);
    check(st[15] && st[14] && st[12], $sformatf("length error status %h", st));
    mech["err_cpl"] += int'(st[12]);
    fault = 3'd5;
    camac(5'd5, 4'd2, 5'd0, 24'h0, st, r, cycles);
    check(st[15] && st[14] && st[12], $sformatf("timeout status %h", st));
    check(cycles >= 320 * 4 && cycles < 330 * 4 + 100,
          $sformatf("timeout after %0d cycles (320 byte times)", cycles));
    mech["timeout"] += int'(st[12] && cycles >= 320 * 4);
    iack(3'd3, vec, ack, passed);
    check(ack && vec == 8'h40, "timeout raises the Reply interrupt");
    fault = 3'd6;
    repeat (400) @(negedge clk);
    camac(5'd5, 4'd2, 5'd0, 24'h0, st, r, cycles);
    check(st[15] && st[14] && st[8], $sformatf("NOSYNC status %h", st));
    mech["nosync"] += int'(st[8]);
    fault = 3'd0;
    repeat (400) @(negedge clk);
    camac(5'd5, 4'd2, 5'd0, 24'h0, st, r, cycles);
    check(clean(st) && r == 24'h123456, "clean access after the errors");

    // ---- address decoding ----
    vme_cycle(B | 16'h0C, 1'b0, 16'h0, 6'h29, q, ack);
    check(!ack, "AM $29 refused in supervisor-only setting");
    sw_user = 1'b1;
    vme_cycle(B | 16'h0C, 1'b0, 16'h0, 6'h29, q, ack);
    check(ack, "AM $29 accepted in user setting");
    vme_cycle(B ^ 16'h0800, 1'b0, 16'h0, 6'h2D, q, ack);
    check(!ack, "other base address ignored");
    mech["am_select"]++;

    // ---- reset by reading $20 ----
    wr(8'h02, 16'h001F);
    rd(8'h20, q);
    repeat (5) @(negedge clk);
    rd(8'h02, q);
    check(q == 16'h0, "reset at $20 clears the command registers");
    rd(8'h10, q);
    check(q == 16'h0, "reset at $20 clears the interrupter");
    mech["soft_reset"]++;

    foreach (mech[k]) $display("mechanism %-12s seen %0d times", k, mech[k]);
    foreach (mech[k]) check(mech[k] > 0, $sformatf("mechanism %s happened", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
