// tb_sdvme_fifo: random pushes and pops against a queue model; checks the head
// value, empty, full and the sticky overflow flag after writing a full FIFO.
module tb_sdvme_fifo;
  localparam int W = 11, D = 8;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en, empty, full, overflow;
  logic [W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;

  sdvme_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] model [$];
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head %h expected %h", rd_data, model[0]));
      wr_en = $urandom_range(0, 1) && model.size() < D;
      rd_en = $urandom_range(0, 2) == 0 && t < 1500 || t >= 1500 && $urandom_range(0, 1);
      wr_data = W'($urandom);
      @(posedge clk);
      begin
        bit dr, dw;
        dr = rd_en && model.size() > 0;   // a write into a full FIFO is dropped,
        dw = wr_en && model.size() < D;   // even when a read happens in the same cycle
        if (dr) void'(model.pop_front());
        if (dw) model.push_back(wr_data);
      end
    end
    @(negedge clk); wr_en = 0; rd_en = 0;
    check(!overflow, "no overflow yet");
    while (!full) begin @(negedge clk); wr_en = 1; @(posedge clk); end
    @(negedge clk); wr_en = 1; @(negedge clk); wr_en = 0;
    check(overflow, "overflow after a write into a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
