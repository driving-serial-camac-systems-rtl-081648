// tb_sdvme_vme_slave: VME slave decoding and handshake against a simple
// register array standing in for the registers. Checks word writes and reads,
// byte-lane enables, address modifier $2D always and $29 only with sw_user,
// the base address compare, no answer above $20, the reset pulse after a read
// of $20, and interrupt acknowledge: vector on a hit, IACKOUT on a miss.
module tb_sdvme_vme_slave;
  logic clk = 0, rst = 1;
  logic as_n, write_n, iack_n, iackin_n, data_oe, dtack_n, iackout_n, sw_user;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [15:1] addr;
  logic [15:0] data_i, data_o;
  logic [4:0] sw_base;
  logic reg_wr, reg_rd, iack_hit, iack_done, soft_reset;
  logic [4:0] reg_idx;
  logic [1:0] reg_be;
  logic [15:0] reg_wdata, reg_rdata;
  logic [2:0] iack_level;
  logic [7:0] iack_vector;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_vme_slave dut (.*);

  logic [15:0] regs [17];
  assign reg_rdata = regs[reg_idx];
  assign iack_hit = (iack_level == 3'd6);
  assign iack_vector = 8'h5C;
  int n_wr, n_rd, n_reset, n_iack;
  always @(posedge clk) begin
    if (reg_wr) begin
      n_wr++;
      if (reg_be[1]) regs[reg_idx][15:8] <= reg_wdata[15:8];
      if (reg_be[0]) regs[reg_idx][7:0]  <= reg_wdata[7:0];
    end
    if (reg_rd) n_rd++;
    if (soft_reset) n_reset++;
    if (iack_done) n_iack++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cyc(input logic [15:0] a, input bit wr, input logic [15:0] d, input logic [5:0] m,
                     input logic [1:0] ds, output logic [15:0] q, output bit acked);
    int n;
    @(negedge clk); addr = a[15:1]; am = m; write_n = ~wr; data_i = d;
    @(negedge clk); as_n = 0;
    @(negedge clk); ds_n = ~ds;
    n = 0;
    while (dtack_n && n < 30) begin @(negedge clk); n++; end
    acked = !dtack_n; q = data_oe ? data_o : 16'hXXXX;
    if (acked) check(data_oe == !wr, "data driven on reads only");
    ds_n = 2'b11; as_n = 1;
    n = 0;
    while (!dtack_n && n < 30) begin @(negedge clk); n++; end
    check(dtack_n, "DTACK released after the strobes");
    @(negedge clk);
  endtask

  initial begin
    #2_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] q; bit ack; int n0; bit passed;
    as_n = 1; ds_n = 2'b11; write_n = 1; iack_n = 1; iackin_n = 1; am = 6'h2D; addr = 0;
    data_i = 0; sw_base = 5'h0A; sw_user = 0;
    for (int i = 0; i < 17; i++) regs[i] = 16'h1000 + 16'(i);
    repeat (3) @(negedge clk); rst = 0;
    // word write and read at each register address
    for (int i = 0; i < 16; i++) begin
      cyc({5'h0A, 5'd0, 5'(i), 1'b0}, 1, 16'hA500 + 16'(i), 6'h2D, 2'b11, q, ack);
      check(ack, $sformatf("write $%02h acknowledged", 2 * i));
      cyc({5'h0A, 5'd0, 5'(i), 1'b0}, 0, 0, 6'h2D, 2'b11, q, ack);
      check(ack && q == 16'hA500 + 16'(i), $sformatf("read $%02h = %h", 2 * i, q));
    end
    // byte lanes
    cyc({5'h0A, 11'h002}, 1, 16'h7777, 6'h2D, 2'b10, q, ack);
    cyc({5'h0A, 11'h002}, 0, 0, 6'h2D, 2'b11, q, ack);
    check(q == 16'h7701, $sformatf("upper lane only: %h", q));
    // address modifier
    n0 = n_wr;
    cyc({5'h0A, 11'h004}, 1, 16'h1, 6'h29, 2'b11, q, ack);
    check(!ack && n_wr == n0, "AM $29 refused without sw_user");
    cyc({5'h0A, 11'h004}, 1, 16'h1, 6'h39, 2'b11, q, ack);
    check(!ack && n_wr == n0, "AM $39 refused");
    sw_user = 1;
    cyc({5'h0A, 11'h004}, 1, 16'h1, 6'h29, 2'b11, q, ack);
    check(ack && n_wr == n0 + 1, "AM $29 accepted with sw_user");
    // base address and range
    cyc({5'h0B, 11'h004}, 0, 0, 6'h2D, 2'b11, q, ack);
    check(!ack, "other base address ignored");
    cyc({5'h0A, 11'h022}, 0, 0, 6'h2D, 2'b11, q, ack);
    check(!ack, "$22 is outside the board");
    cyc({5'h0A, 11'h044}, 0, 0, 6'h2D, 2'b11, q, ack);
    check(!ack, "A6 set is outside the board");
    // reset at $20
    n0 = n_reset;
    cyc({5'h0A, 11'h020}, 0, 0, 6'h2D, 2'b11, q, ack);
    repeat (3) @(negedge clk);
    check(ack && q == 0 && n_reset == n0 + 1, "read of $20 answers and resets");
    // interrupt acknowledge
    n0 = n_iack;
    @(negedge clk); addr = 15'd6; iack_n = 0; write_n = 1;
    @(negedge clk); as_n = 0; @(negedge clk); ds_n = 0; iackin_n = 0;
    repeat (10) @(negedge clk);
    check(!dtack_n && data_o[7:0] == 8'h5C && iackout_n && n_iack == n0 + 1, "IACK hit returns vector");
    ds_n = 2'b11; as_n = 1; iackin_n = 1; repeat (6) @(negedge clk); iack_n = 1;
    @(negedge clk); addr = 15'd2; iack_n = 0;
    @(negedge clk); as_n = 0; @(negedge clk); ds_n = 0; iackin_n = 0;
    passed = 0;
    repeat (10) begin @(negedge clk); if (!iackout_n) passed = 1; end
    check(dtack_n && passed && n_iack == n0 + 1, "IACK miss is passed on");
    ds_n = 2'b11; as_n = 1; iackin_n = 1; repeat (6) @(negedge clk); iack_n = 1;
    check(iackout_n, "IACKOUT released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
