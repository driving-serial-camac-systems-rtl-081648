// tb_sdvme_loop: the standard configuration, one driver and a loop of NCR
// crates (crate addresses 1..NCR) in series, at 2.5 MHz bit serial, plus block
// transfers at 5 MHz byte serial. Each crate model passes on what is not
// addressed to it, so Commands and Replies travel through every crate.
// Checks: a write and read-back in every crate; Demand messages from all crates
// at once queued in the FIFO and read out, each crate once; a Command for an
// absent crate comes back round the loop and is flagged as an error; and a
// block transfer of NBLK writes and NBLK reads to crate 1 at 5 Mbyte/s, with the
// time per word measured from the start to the Reply interrupt.
module tb_sdvme_loop;
  import sdvme_pkg::*;

  localparam int NCR  = 10;
  localparam int NBLK = 32;
  localparam logic [4:0]  BASE = 5'h03;
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
  logic        lclk [NCR+1];
  logic [7:0]  ldata [NCR+1];
  logic        lbit [NCR+1];
  logic [NCR-1:0] demand_req;
  int          n_cmd [NCR], last_spaces [NCR];

  always #25 clk = ~clk;   // 20 MHz

  sdvme_top dut (
    .clk, .vme_sysreset_n(sysreset_n), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_am(am), .vme_addr(addr), .vme_data_i(data_i),
    .vme_data_o(data_o), .vme_data_oe(data_oe), .vme_dtack_n(dtack_n),
    .vme_iack_n(iack_n), .vme_iackin_n(iackin_n), .vme_iackout_n(iackout_n),
    .vme_irq_n(irq_n), .sw_base(BASE), .sw_user, .sw_speed, .sw_bit_mode,
    .cmd_clk(lclk[0]), .cmd_data(ldata[0]), .cmd_bit(lbit[0]),
    .rep_clk(lclk[NCR]), .rep_data(ldata[NCR]), .rep_bit(lbit[NCR])
  );

  for (genvar i = 0; i < NCR; i++) begin : g_crate
    scc_model #(.MY_SC(5'(i + 1))) scc (
      .clk, .rst(!sysreset_n), .speed(sw_speed), .bit_mode(sw_bit_mode),
      .cmd_clk(lclk[i]), .cmd_data(ldata[i]), .cmd_bit(lbit[i]),
      .rep_clk(lclk[i+1]), .rep_data(ldata[i+1]), .rep_bit(lbit[i+1]),
      .fault(3'd0), .demand_req(demand_req[i]), .demand_sgl(5'(i + 11)),
      .n_cmd(n_cmd[i]), .last_spaces(last_spaces[i])
    );
  end

  int checks = 0, failures = 0;

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
  task automatic camac(input logic [4:0] crate, input logic [4:0] n, input logic [3:0] a, input logic [4:0] f,
                       input logic [23:0] w, output logic [15:0] st, output logic [23:0] r,
                       output int cycles);
    logic [15:0] hi, lo;
    int t0;
    wr(8'h02, 16'(crate));
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


  logic [15:0] st, q;
  logic [23:0] r;
  int          cycles;
  logic [7:0]  vec;
  bit          ack, passed;

  initial begin
    #60_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [int];
    longint total;
    sysreset_n = 1'b0; as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1; iack_n = 1'b1;
    iackin_n = 1'b1; am = 6'h2D; addr = '0; data_i = '0; sw_user = 1'b0;
    sw_bit_mode = 1'b1; sw_speed = 2'd2; demand_req = '0;
    repeat (10) @(negedge clk);
    sysreset_n = 1'b1;
    repeat (200) @(negedge clk);
    wr(8'h10, 16'h0013); wr(8'h12, 16'h0015); wr(8'h18, 16'h0040); wr(8'h1A, 16'h0041);

    // write and read back in every crate of the loop, 2.5 MHz bit serial
    for (int c = 1; c <= NCR; c++) begin
      iack(3'd3, vec, ack, passed);
      camac(5'(c), 5'(c), 4'd1, 5'd16, 24'hA00000 + 24'(c * 4099), st, r, cycles);
      check(st[15] && st[14:8] == 0 && st[3:0] == 4'b0110, $sformatf("crate %0d write status %h", c, st));
    end
    for (int c = 1; c <= NCR; c++) begin
      iack(3'd3, vec, ack, passed);
      camac(5'(c), 5'(c), 4'd1, 5'd0, 24'h0, st, r, cycles);
      check(st[15] && st[14:8] == 0 && r == 24'hA00000 + 24'(c * 4099),
            $sformatf("crate %0d read %h status %h", c, r, st));
      $display("crate %0d: read through a loop of %0d crates, %0d clocks to the Reply interrupt", c, NCR, irq_cycles);
    end
    for (int c = 0; c < NCR; c++) check(n_cmd[c] == 2, $sformatf("crate %0d saw %0d commands", c + 1, n_cmd[c]));

    // Demand messages from every crate at once
    @(negedge clk) demand_req = '1; @(negedge clk) demand_req = '0;
    repeat (20000) @(negedge clk);
    check(!irq_n[5], "Demand interrupt");
    for (int k = 0; k < NCR; k++) begin
      rd(8'h0E, q);
      check(q[15] == 0 && q[4:0] == 5'(q[12:8] + 10), $sformatf("Demand entry %h", q));
      seen[int'(q[12:8])]++;
    end
    rd(8'h0C, st);
    check(!st[13], "FIFO empty after all Demands read");
    for (int c = 1; c <= NCR; c++) check(seen.exists(c) && seen[c] == 1, $sformatf("Demand of crate %0d", c));

    // a Command for a crate that is not in the loop comes back as a bad Reply
    iack(3'd3, vec, ack, passed);
    camac(5'd25, 5'd1, 4'd0, 5'd0, 24'h0, st, r, cycles);
    check(st[15] && st[14], $sformatf("absent crate flagged, status %h", st));

    // block transfer at 5 Mbyte/s byte serial to crate 1
    sw_bit_mode = 1'b0; sw_speed = 2'd3;
    repeat (400) @(negedge clk);
    total = 0;
    for (int k = 0; k < NBLK; k++) begin
      iack(3'd3, vec, ack, passed);
      camac(5'd1, 5'd2, 4'(k % 16), 5'd16, 24'(k * 777), st, r, cycles);
      check(st[15] && st[14:8] == 0, "block write status");
      total += irq_cycles;
    end
    for (int k = 0; k < NBLK; k++) begin
      iack(3'd3, vec, ack, passed);
      camac(5'd1, 5'd2, 4'(k % 16), 5'd0, 24'h0, st, r, cycles);
      check(st[15] && st[14:8] == 0 && r == 24'(((k % 16) + 16) * 777),
            $sformatf("block read %0d = %h", k, r));
      total += irq_cycles;
    end
    $display("block transfer through %0d crates: %0d words, mean %0d clocks per word (%0d ns)",
             NCR, 2 * NBLK, total / (2 * NBLK), total * 50 / (2 * NBLK));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
