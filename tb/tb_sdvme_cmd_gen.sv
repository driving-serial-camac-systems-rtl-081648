// tb_sdvme_cmd_gen: random CAMAC commands with random write data and space
// counts; the byte stream taken with a randomly stalling ready must equal the
// Command message built here from the message format: header SC, SN, SF, SA,
// five data bytes for write functions, the space bytes, and the end-sum byte
// with the column parity; every byte but the spaces must have odd parity.
module tb_sdvme_cmd_gen;
  import sdvme_pkg::*;
  logic clk = 0, rst = 1;
  logic start, busy, out_valid, out_ready;
  camac_cmd_t cmd;
  logic [23:0] wdata;
  logic [3:0] n_space;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_cmd_gen dut (.*);

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

  initial begin
    #5_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] exp_q [$];
    logic [7:0] got [$];
    logic [4:0] col;
    start = 0; out_ready = 0; cmd = '0; wdata = '0; n_space = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 200; t++) begin
      cmd = camac_cmd_t'($urandom);
      if (t % 3 == 0) cmd.sf = 5'd16 + 5'($urandom_range(0, 7));
      wdata = 24'($urandom);
      n_space = 4'($urandom_range(1, 6));
      // expected message
      exp_q = {};
      exp_q.push_back(b(2'b10, cmd.sc));
      exp_q.push_back(b(2'b00, cmd.sn));
      exp_q.push_back(b(2'b00, cmd.sf));
      exp_q.push_back(b(2'b00, {1'b0, cmd.sa}));
      if (cmd.sf[4:3] == 2'b10) begin
        exp_q.push_back(b(2'b00, {1'b0, wdata[23:20]}));
        for (int k = 3; k >= 0; k--) exp_q.push_back(b(2'b00, wdata[k*5 +: 5]));
      end
      col = 0;
      foreach (exp_q[i]) col ^= exp_q[i][4:0];
      for (int i = 0; i < n_space; i++) exp_q.push_back(8'h00);
      exp_q.push_back(b(2'b01, col));
      // run
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      got = {};
      while (busy) begin
        out_ready = ($urandom_range(0, 2) == 0);
        @(posedge clk);
        if (out_valid && out_ready) got.push_back(out_data);
        @(negedge clk);
      end
      out_ready = 0;
      check(got.size() == exp_q.size(), $sformatf("length %0d expected %0d", got.size(), exp_q.size()));
      foreach (exp_q[i]) if (i < got.size())
        check(got[i] == exp_q[i], $sformatf("cmd %0d byte %0d: %h expected %h", t, i, got[i], exp_q[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
