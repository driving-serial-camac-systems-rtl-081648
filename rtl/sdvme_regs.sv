// sdvme_regs: the driver's CAMAC register block (relative addresses $00..$0E).
//
//   $00 R/W  SA (D15..D12), SF (D10..D6), SN (D4..D0)
//   $02 R/W  SC (D4..D0)
//   $04 R/W  W24..W17 (D7..D0)
//   $06 R/W  W16..W1
//   $08 R    R24..R17 (D7..D0)
//   $0A R    R16..R1
//   $0C R    status: NBUSY CERR FNE ERR-CPL ERR-HED ERR-CP ERR-PB NOSYNC (D15..D8),
//            DERR SQ SX ERR (D3..D0)
//   $0E R    Demand FIFO head: ERR-DM (D15), SC (D12..D8), SGL (D4..D0); reading
//            removes the entry
// Register and status bit positions follow the driver's address allocation;
// where that allocation leaves a field's exact bits open, the positions above
// are this design's reading. CERR is the OR of the four receive errors and NOSYNC.
// A CAMAC write is started by writing $06 while SF holds a write function
// (F16..F23); a read or control access is started by writing $00 with any
// other function. SC must therefore be loaded before $00. Which write starts
// the message is this design's choice.
// reg_wr/reg_rd are one-cycle strobes with the word index idx = address[3:1];
// be[1] enables D15..D8 and be[0] D7..D0 on writes. rdata is combinational.
// start pulses one cycle after the write that starts an access.
module sdvme_regs
  import sdvme_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [2:0]  idx,
  input  logic [1:0]  be,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  // to the transaction control and command generator
  output camac_cmd_t  cmd,
  output logic [23:0] wdata24,
  output logic        start,
  // from the transaction control and line receiver
  input  logic        nbusy,
  input  reply_stat_t stat,
  input  rx_err_t     err,
  input  logic        nosync,
  input  logic [23:0] rdata24,
  // Demand FIFO
  input  logic        fifo_empty,
  input  demand_t     fifo_head,
  output logic        fifo_pop
);
  logic [15:0] status;
  wire         cerr = (|err) | nosync;

  assign status = {nbusy, cerr, ~fifo_empty, err.cpl, err.hed, err.cp, err.pb, nosync,
                   4'b0, stat.derr, stat.sq, stat.sx, stat.err};

  // SF after this cycle's write to $00, to decide on a start
  logic [4:0] sf_next;
  assign sf_next = {(be[1] ? wdata[10:8] : cmd.sf[4:2]), (be[0] ? wdata[7:6] : cmd.sf[1:0])};

  // start one cycle after the write, when the registers hold the new command
  always_ff @(posedge clk) begin
    if (rst) start <= 1'b0;
    else     start <= reg_wr && ((idx == 3'd0 && !is_write(sf_next)) ||
                                 (idx == 3'd3 && is_write(cmd.sf)));
  end
  assign fifo_pop = reg_rd && (idx == 3'd7) && !fifo_empty;

  always_comb begin
    unique case (idx)
      3'd0: rdata = {cmd.sa, 1'b0, cmd.sf, 1'b0, cmd.sn};
      3'd1: rdata = {11'b0, cmd.sc};
      3'd2: rdata = {8'b0, wdata24[23:16]};
      3'd3: rdata = wdata24[15:0];
      3'd4: rdata = {8'b0, rdata24[23:16]};
      3'd5: rdata = rdata24[15:0];
      3'd6: rdata = status;
      default: rdata = fifo_empty ? 16'h0
                     : {fifo_head.err, 2'b0, fifo_head.sc, 3'b0, fifo_head.sgl};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd     <= '0;
      wdata24 <= '0;
    end else if (reg_wr) begin
      unique case (idx)
        3'd0: begin
          if (be[1]) begin cmd.sa <= wdata[15:12]; cmd.sf[4:2] <= wdata[10:8]; end
          if (be[0]) begin cmd.sf[1:0] <= wdata[7:6]; cmd.sn <= wdata[4:0]; end
        end
        3'd1: if (be[0]) cmd.sc <= wdata[4:0];
        3'd2: if (be[0]) wdata24[23:16] <= wdata[7:0];
        3'd3: begin
          if (be[1]) wdata24[15:8] <= wdata[15:8];
          if (be[0]) wdata24[7:0]  <= wdata[7:0];
        end
        default: ;
      endcase
    end
  end
endmodule
