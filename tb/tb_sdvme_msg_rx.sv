// tb_sdvme_msg_rx: feeds Reply and Demand messages, with space bytes between
// bytes, into the message receiver and checks the decoded status, read data
// and Demand fields and each error check: byte parity, column parity, wrong
// header, wrong length and a missing stop bit. Reply and Demand messages
// follow the message format of sdvme_pkg, built here bit by bit.
module tb_sdvme_msg_rx;
  import sdvme_pkg::*;
  logic clk = 0, rst = 1;
  logic drop, in_valid, in_framing_err;
  logic [7:0] in_data;
  logic [4:0] exp_sc;
  logic [3:0] exp_len;
  logic reply_done, demand_valid;
  reply_stat_t reply_stat;
  logic [23:0] reply_data;
  rx_err_t reply_err;
  demand_t demand;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_msg_rx dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] b(input logic [1:0] k, input logic [4:0] i);
    logic [7:0] x;
    x = {1'b0, k, i};
    x[7] = ~(^x[6:0]);
    return x;
  endfunction

  int n_reply, n_demand;
  reply_stat_t got_stat; logic [23:0] got_data; rx_err_t got_err; demand_t got_dem;
  always @(posedge clk) begin
    if (reply_done)   begin n_reply++;  got_stat <= reply_stat; got_data <= reply_data; got_err <= reply_err; end
    if (demand_valid) begin n_demand++; got_dem <= demand; end
  end

  task automatic send(input logic [7:0] m [$], input int ferr_at = -1);
    foreach (m[i]) begin
      @(negedge clk); in_valid = 1; in_data = m[i]; in_framing_err = (i == ferr_at);
      @(negedge clk); in_valid = 1; in_data = 8'h00; in_framing_err = 0;
      @(negedge clk); in_valid = 0;
    end
    repeat (3) @(negedge clk);
  endtask

  // build a Reply: fault 1 parity, 2 column parity, 3 wrong header SC, 4 byte dropped
  function automatic void mk_reply(input logic [4:0] sc, input logic [3:0] st, input bit rd,
                                   input logic [23:0] r, input int fault, output logic [7:0] m [$]);
    logic [4:0] col;
    m = {};
    m.push_back(b(2'b10, fault == 3 ? sc + 5'd1 : sc));
    m.push_back(b(2'b00, {1'b0, st}));
    if (rd) begin
      m.push_back(b(2'b00, {1'b0, r[23:20]}));
      for (int k = 3; k >= 0; k--) m.push_back(b(2'b00, r[k*5 +: 5]));
    end
    col = 0;
    foreach (m[i]) col ^= m[i][4:0];
    m.push_back(b(2'b01, fault == 2 ? col ^ 5'd8 : col));
    if (fault == 1) m[1][7] = ~m[1][7];
    if (fault == 4) m.delete(1);
  endfunction

  initial begin
    #5_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] m [$];
    drop = 0; in_valid = 0; in_data = 0; in_framing_err = 0; exp_sc = 0; exp_len = 3;
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 60; t++) begin
      logic [4:0] sc; logic [3:0] st; logic [23:0] r; bit rd; int fault, nr;
      sc = 5'($urandom_range(1, 31)); st = 4'($urandom); r = 24'($urandom);
      rd = $urandom_range(0, 1); fault = (t < 20) ? 0 : $urandom_range(0, 5);
      exp_sc = sc; exp_len = rd ? 4'd8 : 4'd3;
      mk_reply(sc, st, rd, r, fault == 5 ? 0 : fault, m);
      nr = n_reply;
      send(m, fault == 5 ? 1 : -1);
      check(n_reply == nr + 1, $sformatf("reply %0d reported", t));
      check(got_stat == st || fault == 4, $sformatf("status %b expected %b", got_stat, st));
      if (rd && fault == 0) check(got_data == r, $sformatf("read data %h expected %h", got_data, r));
      check(got_err.pb  == (fault == 1 || fault == 5), $sformatf("t%0d pb flag, fault %0d", t, fault));
      begin
        logic [4:0] c; c = 0;
        foreach (m[i]) c ^= m[i][4:0];
        check(got_err.cp == (c != 0), $sformatf("t%0d cp flag, fault %0d", t, fault));
        if (fault == 2) check(c != 0, "column parity fault present");
      end
      check(got_err.hed == (fault == 3), $sformatf("t%0d hed flag, fault %0d", t, fault));
      check(got_err.cpl == (fault == 4), $sformatf("t%0d cpl flag, fault %0d", t, fault));
    end
    // Demand messages, good and with a parity error
    for (int t = 0; t < 10; t++) begin
      logic [4:0] sc, sgl; int nd;
      sc = 5'($urandom_range(1, 31)); sgl = 5'($urandom);
      m = {b(2'b11, sc), b(2'b00, sgl), b(2'b01, sc ^ sgl)};
      if (t >= 5) m[1][7] = ~m[1][7];
      nd = n_demand;
      send(m);
      check(n_demand == nd + 1, "demand reported");
      check(got_dem.sc == sc && got_dem.sgl == sgl && got_dem.err == (t >= 5),
            $sformatf("demand %p expected sc %0d sgl %0d", got_dem, sc, sgl));
    end
    // drop abandons a partial message
    m = {b(2'b10, 5'd4), b(2'b00, 5'd6)};
    send(m);
    @(negedge clk) drop = 1; @(negedge clk) drop = 0;
    exp_sc = 5'd9; exp_len = 3;
    mk_reply(5'd9, 4'b0110, 0, 0, 0, m);
    send(m);
    check(got_err == '0 && got_stat == 4'b0110, "clean reply after drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
