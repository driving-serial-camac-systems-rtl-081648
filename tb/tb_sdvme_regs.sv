// tb_sdvme_regs: register block. Write and read back of $00..$06 with byte
// lanes; start rules (a write of $06 starts a write function, a write of $00
// starts any other function, nothing else starts); status bit positions; read
// data registers; Demand register contents and FIFO pop on read.
module tb_sdvme_regs;
  import sdvme_pkg::*;
  logic clk = 0, rst = 1;
  logic reg_wr, reg_rd, start, nbusy, nosync, fifo_empty, fifo_pop;
  logic [2:0] idx;
  logic [1:0] be;
  logic [15:0] wdata, rdata;
  camac_cmd_t cmd;
  logic [23:0] wdata24, rdata24;
  reply_stat_t stat;
  rx_err_t err;
  demand_t fifo_head;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_regs dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_start, n_pop;
  always @(posedge clk) begin
    if (start) n_start++;
    if (fifo_pop) n_pop++;
  end

  task automatic w(input logic [2:0] i, input logic [15:0] d, input logic [1:0] lanes = 2'b11);
    @(negedge clk); reg_wr = 1; idx = i; wdata = d; be = lanes; @(negedge clk); reg_wr = 0;
    @(negedge clk);
  endtask
  task automatic r(input logic [2:0] i, output logic [15:0] d);
    @(negedge clk); idx = i; reg_rd = 1; #1 d = rdata; @(negedge clk); reg_rd = 0;
  endtask

  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d; int s0;
    reg_wr = 0; reg_rd = 0; idx = 0; be = 0; wdata = 0; nbusy = 1; nosync = 0;
    fifo_empty = 1; fifo_head = '0; stat = '0; err = '0; rdata24 = '0;
    repeat (3) @(negedge clk); rst = 0;
    // write function F16: loading $00 must not start, $06 must
    s0 = n_start;
    w(1, 16'h0013);
    w(0, {4'hA, 1'b0, 5'd16, 1'b0, 5'd7});
    check(n_start == s0, "no start on $00 with a write function");
    check(cmd.sa == 4'hA && cmd.sf == 5'd16 && cmd.sn == 5'd7 && cmd.sc == 5'd19, "command fields");
    w(2, 16'h00C3);
    check(n_start == s0, "no start on $04");
    w(3, 16'h5AA5);
    check(n_start == s0 + 1, "start on $06");
    check(wdata24 == 24'hC35AA5, $sformatf("write data %h", wdata24));
    r(0, d); check(d == {4'hA, 1'b0, 5'd16, 1'b0, 5'd7}, $sformatf("$00 read back %h", d));
    r(1, d); check(d == 16'h0013, "$02 read back");
    r(2, d); check(d == 16'h00C3, "$04 read back");
    r(3, d); check(d == 16'h5AA5, "$06 read back");
    // byte lanes
    w(3, 16'hFFFF, 2'b01);
    r(3, d); check(d == 16'h5AFF, $sformatf("low lane only: %h", d));
    // read function F0 starts on $00, control F25 too, and $06 then does not
    s0 = n_start;
    w(0, {4'h1, 1'b0, 5'd0, 1'b0, 5'd2});
    check(n_start == s0 + 1, "start on $00 with a read function");
    w(0, {4'h1, 1'b0, 5'd25, 1'b0, 5'd2});
    check(n_start == s0 + 2, "start on $00 with a control function");
    w(3, 16'h1234);
    check(n_start == s0 + 2, "no start on $06 with a control function");
    // status and read data
    nbusy = 1; err = '{cpl: 1, hed: 0, cp: 1, pb: 0}; nosync = 0;
    stat = '{derr: 1, sq: 0, sx: 1, err: 0}; fifo_empty = 0;
    r(6, d); check(d == 16'b1111_0100_0000_1010, $sformatf("status %b", d));
    err = '0; nosync = 1; stat = '{derr: 0, sq: 1, sx: 0, err: 1}; fifo_empty = 1; nbusy = 0;
    r(6, d); check(d == 16'b0100_0001_0000_0101, $sformatf("status %b", d));
    rdata24 = 24'h9ABCDE;
    r(4, d); check(d == 16'h009A, "R24..R17");
    r(5, d); check(d == 16'hBCDE, "R16..R1");
    // Demand register
    s0 = n_pop;
    r(7, d); check(d == 16'h0 && n_pop == s0, "empty Demand register reads 0, no pop");
    fifo_empty = 0; fifo_head = '{err: 1, sc: 5'd21, sgl: 5'd9};
    r(7, d); check(d == {1'b1, 2'b0, 5'd21, 3'b0, 5'd9} && n_pop == s0 + 1, $sformatf("Demand %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
