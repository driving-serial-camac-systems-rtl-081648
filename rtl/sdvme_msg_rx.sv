// sdvme_msg_rx: Reply and Demand message receiver.
//
// Reads the byte stream of the line receiver, skips space bytes and splits it
// into messages. A message starts with a header byte and ends with an end-sum
// byte. A Demand header starts a Demand message (header SC, SGL, end-sum); any
// other first byte starts a Reply message
//   header(SC)  status(DERR SQ SX ERR)  [R24..R21 R20..R16 R15..R11 R10..R6 R5..R1]  end-sum
// The checks are those of the driver's status register:
//   pb   a byte with even parity, or a bit-serial byte without its stop bit
//   cp   the column parity of the information bits is not zero
//   hed  the first byte is not a header carrying the crate address of the command
//   cpl  the number of bytes is not the one expected for the command
// A Reply is reported by a one-cycle reply_done with its status, data and
// errors. A Demand is reported by demand_valid; its err bit is set on a parity
// or length error. A message that reaches MAX_BYTES bytes without end-sum is
// closed with a length error. drop drops a partly received message.
// The message layout is this design's choice (see sdvme_pkg).
module sdvme_msg_rx
  import sdvme_pkg::*;
#(
  parameter int unsigned MAX_BYTES = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        drop,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_framing_err,
  input  logic [4:0]  exp_sc,      // crate address of the pending command
  input  logic [3:0]  exp_len,     // expected Reply length, header and end-sum included
  output logic        reply_done,
  output reply_stat_t reply_stat,
  output logic [23:0] reply_data,
  output rx_err_t     reply_err,
  output logic        demand_valid,
  output demand_t     demand
);
  typedef enum logic [1:0] {S_IDLE, S_REPLY, S_DEMAND} state_e;
  state_e      state;
  logic [3:0]  cnt;
  logic [4:0]  col;
  logic        pb, hed;
  reply_stat_t stat_q;
  logic [4:0]  sc_q, sgl_q;
  logic [23:0] data_q;

  wire        par_bad = ~(^in_data) | in_framing_err;
  kind_e kind;
  assign kind = kind_e'(in_data[6:5]);
  wire [4:0]  info    = in_data[4:0];
  wire        take    = in_valid && (in_data != SPACE_BYTE);
  wire [3:0]  cnt_n   = cnt + 4'd1;
  wire        closing = (kind == K_END) || (cnt_n == 4'(MAX_BYTES));

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      cnt          <= '0;
      col          <= '0;
      pb           <= 1'b0;
      hed          <= 1'b0;
      stat_q       <= '0;
      sc_q         <= '0;
      sgl_q        <= '0;
      data_q       <= '0;
      reply_done   <= 1'b0;
      reply_stat   <= '0;
      reply_data   <= '0;
      reply_err    <= '0;
      demand_valid <= 1'b0;
      demand       <= '0;
    end else begin
      reply_done   <= 1'b0;
      demand_valid <= 1'b0;
      if (drop) begin
        state <= S_IDLE;
      end else if (take) begin
        unique case (state)
          S_IDLE: begin
            cnt    <= 4'd1;
            col    <= info;
            pb     <= par_bad;
            sc_q   <= info;
            data_q <= '0;
            stat_q <= '0;
            if (!par_bad && kind == K_DHDR) begin
              state <= S_DEMAND;
              hed   <= 1'b0;
            end else begin
              state <= S_REPLY;
              hed   <= par_bad || (kind != K_HDR) || (info != exp_sc);
            end
          end
          default: begin
            cnt <= cnt_n;
            col <= col ^ info;
            pb  <= pb | par_bad;
            if (kind == K_HDR || kind == K_DHDR) hed <= 1'b1;
            if (cnt == 4'd1) begin
              stat_q <= reply_stat_t'(info[3:0]);
              sgl_q  <= info;
            end else if (kind == K_BODY) begin
              data_q <= {data_q[18:0], info};
            end
            if (closing) begin
              state <= S_IDLE;
              if (state == S_REPLY) begin
                reply_done     <= 1'b1;
                reply_stat     <= stat_q;
                reply_data     <= data_q;
                reply_err.pb   <= pb | par_bad;
                reply_err.cp   <= (col ^ info) != 5'd0 || kind != K_END;
                reply_err.hed  <= hed;
                reply_err.cpl  <= cnt_n != exp_len;
              end else begin
                demand_valid <= 1'b1;
                demand.sc    <= sc_q;
                demand.sgl   <= sgl_q;
                demand.err   <= pb | par_bad | ((col ^ info) != 5'd0) | (cnt_n != 4'd3)
                                | (kind != K_END);
              end
            end
          end
        endcase
      end
    end
  end
endmodule
