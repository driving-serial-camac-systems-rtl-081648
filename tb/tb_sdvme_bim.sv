// tb_sdvme_bim: interrupter. Register write and read back, no request while
// masked (IRE clear) or at level 0, requests at the programmed levels, both channels
// at once on their two lines, vector returned on acknowledge at the right level only,
// pending cleared by the acknowledge, and IRE cleared by it when IRAC is set.
module tb_sdvme_bim;
  logic clk = 0, rst = 1;
  logic [1:0] src;
  logic reg_wr, iack_hit, iack_done;
  logic [2:0] reg_idx, iack_level;
  logic [7:1] irq_req;
  logic [7:0] reg_wdata, reg_rdata, iack_vector;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_bim dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic w(input logic [2:0] i, input logic [7:0] d);
    @(negedge clk); reg_wr = 1; reg_idx = i; reg_wdata = d; @(negedge clk); reg_wr = 0;
  endtask
  task automatic r(input logic [2:0] i, output logic [7:0] d);
    @(negedge clk); reg_idx = i; #1 d = reg_rdata;
  endtask
  task automatic pulse(input int ch);
    @(negedge clk); src[ch] = 1; @(negedge clk); src = 0;
  endtask
  task automatic ack(input logic [2:0] l, output bit hit, output logic [7:0] v);
    @(negedge clk); iack_level = l; #1 hit = iack_hit; v = iack_vector;
    iack_done = 1; @(negedge clk); iack_done = 0;
  endtask

  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] d; bit hit;
    src = 0; reg_wr = 0; reg_idx = 0; reg_wdata = 0; iack_level = 0; iack_done = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 8; i++) w(3'(i), 8'h20 + 8'(i));
    for (int i = 0; i < 8; i++) begin r(3'(i), d); check(d == 8'h20 + 8'(i), $sformatf("reg %0d = %h", i, d)); end
    w(0, 8'h02); w(1, 8'h04); w(4, 8'h40); w(5, 8'h41);   // levels set, IRE clear
    pulse(0); pulse(1);
    @(negedge clk); check(irq_req == 0, "masked: no request");
    r(0, d); check(d[7], "pending visible in control register");
    w(0, 8'h12); w(1, 8'h1C);                               // IRE set; channel 1 with IRAC
    @(negedge clk); check(irq_req == 7'b0001010, $sformatf("both levels requested: %b", irq_req));
    ack(3'd4, hit, d); check(hit && d == 8'h41, "ack level 4 answers channel 1");
    @(negedge clk); check(irq_req == 7'b0000010, "channel 0 still pending");
    r(1, d); check(!d[4], "IRAC cleared IRE of channel 1");
    ack(3'd3, hit, d); check(!hit, "no answer at level 3");
    ack(3'd2, hit, d); check(hit && d == 8'h40, "ack level 2 answers channel 0");
    @(negedge clk); check(irq_req == 0, "no request left");
    r(0, d); check(d[4] && !d[7], "channel 0 keeps IRE without IRAC, pending cleared");
    w(0, 8'h10); pulse(0);
    @(negedge clk); check(irq_req == 0, "level 0 never requests");
    // same level on both channels: channel 0 is acknowledged first
    w(0, 8'h12); w(1, 8'h12); pulse(0); pulse(1);
    ack(3'd2, hit, d); check(hit && d == 8'h40, "same level: channel 0 first");
    ack(3'd2, hit, d); check(hit && d == 8'h41, "same level: then channel 1");
    @(negedge clk); check(irq_req == 0, "both served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
