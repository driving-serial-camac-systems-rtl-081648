// sdvme_top: VME Serial CAMAC Highway Driver.
//
// A VME slave board that drives one Serial CAMAC loop. The processor performs
// a CAMAC access by programmed I/O on a few A16/D16 registers: it loads the
// command (crate SC, station SN, subaddress SA, function SF) and, for a write,
// the 24-bit data; the board then sends a Command message around the loop,
// waits for the addressed crate controller's Reply message, and sets NBUSY and
// the Reply interrupt. The status register holds the crate's X, Q and error
// bits and the board's own checks of the Reply. Demand messages (LAMs) that
// crates send on their own are queued in a FIFO and raise the Demand interrupt.
//
// Blocks: VME slave (sdvme_vme_slave), registers (sdvme_regs), interrupter
// (sdvme_bim), transaction control with the reply timeout (sdvme_txn), Command
// message generator (sdvme_cmd_gen), line clock (sdvme_clkgen), line
// transmitter (sdvme_tx), line receiver (sdvme_rx), message receiver
// (sdvme_msg_rx) and Demand FIFO (sdvme_fifo).
//
// Line interface: the Command output is a line clock plus either 8 parallel
// data bits (byte serial) or one data bit (bit serial); the Reply input has the
// same form. Data change at the falling clock edge. The differential line
// drivers and receivers are outside this module. Rate (0.5/1/2.5/5 MHz) and
// mode are set by the sw_speed and sw_bit_mode switches, like the base address
// (sw_base) and the user-mode access switch (sw_user); that rate and mode come
// from switches is this design's choice.
// The system clock is CLK_HZ (20 MHz assumed). vme_sysreset_n is synchronised;
// a read of relative address $20 resets everything except the VME slave itself.
module sdvme_top
  import sdvme_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 20_000_000,
  parameter int unsigned TIMEOUT_BYTES = 320,
  parameter int unsigned FIFO_DEPTH    = 32,
  parameter int unsigned NOSYNC_CYCLES = 256,
  parameter int unsigned DW_NS         = 1000
) (
  input  logic        clk,
  input  logic        vme_sysreset_n,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [15:1] vme_addr,
  input  logic [15:0] vme_data_i,
  output logic [15:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  input  logic        vme_iack_n,
  input  logic        vme_iackin_n,
  output logic        vme_iackout_n,
  output logic [7:1]  vme_irq_n,
  input  logic [4:0]  sw_base,
  input  logic        sw_user,
  input  logic [1:0]  sw_speed,
  input  logic        sw_bit_mode,
  output logic        cmd_clk,
  output logic [7:0]  cmd_data,
  output logic        cmd_bit,
  input  logic        rep_clk,
  input  logic [7:0]  rep_data,
  input  logic        rep_bit
);
  // ---- reset ----
  logic [1:0] rst_s;
  logic       rst_vme, soft_reset, rst;
  always_ff @(posedge clk) rst_s <= {rst_s[0], ~vme_sysreset_n};
  assign rst_vme = rst_s[1];
  assign rst     = rst_s[1] | soft_reset;

  // ---- space bytes for each line setting ----
  localparam int unsigned SPB0 = space_bytes(CLK_HZ, SPD_0M5, 1'b0, DW_NS);
  localparam int unsigned SPB1 = space_bytes(CLK_HZ, SPD_1M,  1'b0, DW_NS);
  localparam int unsigned SPB2 = space_bytes(CLK_HZ, SPD_2M5, 1'b0, DW_NS);
  localparam int unsigned SPB3 = space_bytes(CLK_HZ, SPD_5M,  1'b0, DW_NS);
  localparam int unsigned SPS0 = space_bytes(CLK_HZ, SPD_0M5, 1'b1, DW_NS);
  localparam int unsigned SPS1 = space_bytes(CLK_HZ, SPD_1M,  1'b1, DW_NS);
  localparam int unsigned SPS2 = space_bytes(CLK_HZ, SPD_2M5, 1'b1, DW_NS);
  localparam int unsigned SPS3 = space_bytes(CLK_HZ, SPD_5M,  1'b1, DW_NS);

  speed_e     speed;
  logic [3:0] n_space;
  assign speed = speed_e'(sw_speed);
  always_comb begin
    unique case ({sw_bit_mode, speed})
      {1'b0, SPD_0M5}: n_space = 4'(SPB0);
      {1'b0, SPD_1M}:  n_space = 4'(SPB1);
      {1'b0, SPD_2M5}: n_space = 4'(SPB2);
      {1'b0, SPD_5M}:  n_space = 4'(SPB3);
      {1'b1, SPD_0M5}: n_space = 4'(SPS0);
      {1'b1, SPD_1M}:  n_space = 4'(SPS1);
      {1'b1, SPD_2M5}: n_space = 4'(SPS2);
      default:         n_space = 4'(SPS3);
    endcase
  end

  // ---- VME slave ----
  logic        reg_wr, reg_rd, iack_hit, iack_done;
  logic [4:0]  reg_idx;
  logic [1:0]  reg_be;
  logic [15:0] reg_wdata, reg_rdata, regs_rdata;
  logic [7:0]  bim_rdata, iack_vector;
  logic [2:0]  iack_level;
  logic [7:1]  irq_req;

  sdvme_vme_slave u_vme (
    .clk, .rst(rst_vme),
    .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .am(vme_am),
    .addr(vme_addr), .data_i(vme_data_i), .iack_n(vme_iack_n), .iackin_n(vme_iackin_n),
    .data_o(vme_data_o), .data_oe(vme_data_oe), .dtack_n(vme_dtack_n),
    .iackout_n(vme_iackout_n), .sw_base, .sw_user,
    .reg_wr, .reg_rd, .reg_idx, .reg_be, .reg_wdata, .reg_rdata,
    .iack_level, .iack_hit, .iack_vector, .iack_done, .soft_reset
  );

  assign reg_rdata = reg_idx[3] ? {8'h00, bim_rdata} : regs_rdata;

  // ---- registers ----
  camac_cmd_t  cmd;
  logic [23:0] wdata24, rdata24, reply_data;
  logic        start, nbusy, busy, fifo_empty, fifo_full, fifo_ovf, fifo_pop, nosync;
  reply_stat_t stat, reply_stat;
  rx_err_t     err, reply_err;
  demand_t     fifo_head, demand;
  logic        reply_done, demand_valid, reply_irq, timeout, gen_start;

  sdvme_regs u_regs (
    .clk, .rst,
    .reg_wr(reg_wr && !reg_idx[3]), .reg_rd(reg_rd && !reg_idx[3]), .idx(reg_idx[2:0]),
    .be(reg_be), .wdata(reg_wdata), .rdata(regs_rdata),
    .cmd, .wdata24, .start, .nbusy, .stat, .err, .nosync, .rdata24,
    .fifo_empty, .fifo_head, .fifo_pop
  );

  // ---- interrupter: INT0 = Reply, INT1 = Demand ----
  sdvme_bim u_bim (
    .clk, .rst,
    .src({demand_valid, reply_irq}),
    .reg_wr(reg_wr && reg_idx[3]), .reg_idx(reg_idx[2:0]), .reg_wdata(reg_wdata[7:0]),
    .reg_rdata(bim_rdata), .irq_req,
    .iack_level, .iack_hit, .iack_vector, .iack_done
  );

  assign vme_irq_n = ~irq_req;

  // ---- transaction control ----
  logic byte_tick;
  sdvme_txn #(.TIMEOUT_BYTES(TIMEOUT_BYTES)) u_txn (
    .clk, .rst, .start, .byte_tick, .gen_start,
    .reply_done, .reply_stat, .reply_data, .reply_err,
    .busy, .nbusy, .stat, .err, .rdata(rdata24), .timeout, .reply_irq
  );

  // ---- Command path ----
  logic       gen_valid, gen_ready, gen_busy;
  logic [7:0] gen_data;
  logic       tick_fall, tick_rise;

  sdvme_cmd_gen u_gen (
    .clk, .rst, .start(gen_start), .cmd, .wdata(wdata24), .n_space,
    .busy(gen_busy), .out_valid(gen_valid), .out_data(gen_data), .out_ready(gen_ready)
  );

  sdvme_clkgen #(.CLK_HZ(CLK_HZ)) u_clk (
    .clk, .rst, .speed, .line_clk(cmd_clk), .tick_fall, .tick_rise
  );

  sdvme_tx u_tx (
    .clk, .rst, .bit_mode(sw_bit_mode), .tick_fall,
    .in_valid(gen_valid), .in_data(gen_data), .in_ready(gen_ready),
    .tx_data(cmd_data), .tx_bit(cmd_bit), .byte_tick
  );

  // ---- Reply path ----
  logic       rx_valid, rx_ferr;
  logic [7:0] rx_data;

  sdvme_rx #(.NOSYNC_CYCLES(NOSYNC_CYCLES)) u_rx (
    .clk, .rst, .bit_mode(sw_bit_mode), .rx_clk(rep_clk), .rx_data(rep_data), .rx_bit(rep_bit),
    .out_valid(rx_valid), .out_data(rx_data), .framing_err(rx_ferr), .nosync
  );

  sdvme_msg_rx u_mrx (
    .clk, .rst, .drop(gen_start),
    .in_valid(rx_valid), .in_data(rx_data), .in_framing_err(rx_ferr),
    .exp_sc(cmd.sc), .exp_len(4'(reply_len(cmd.sf))),
    .reply_done, .reply_stat, .reply_data, .reply_err, .demand_valid, .demand
  );

  sdvme_fifo #(.WIDTH($bits(demand_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(demand_valid), .wr_data(demand), .rd_en(fifo_pop),
    .rd_data(fifo_head), .empty(fifo_empty), .full(fifo_full), .overflow(fifo_ovf)
  );

endmodule
