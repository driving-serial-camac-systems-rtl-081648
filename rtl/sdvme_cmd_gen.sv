// sdvme_cmd_gen: Command message generator.
//
// On start it captures the CAMAC command (SC, SN, SF, SA), the 24-bit write data
// and the number of space bytes, and then offers the Command message to the
// line transmitter one byte at a time over a valid/ready handshake:
//   header(SC)  SN  SF  SA  [W24..W21  W20..W16  W15..W11  W10..W6  W5..W1]
//   space bytes  end-sum(column parity)
// The five data bytes are sent only for write functions (F16..F23). Each byte
// gets its odd parity bit, and the end-sum byte carries the column parity of
// the information bits. The space bytes give the crate controller time to
// complete the Dataway cycle before the message ends, as the driver
// specification requires; their number comes from the caller. The order of the
// bytes and their layout are this design's choice.
// busy is high from start until the end-sum byte has been taken; a start while
// busy is ignored.
module sdvme_cmd_gen
  import sdvme_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  camac_cmd_t  cmd,
  input  logic [23:0] wdata,
  input  logic [3:0]  n_space,
  output logic        busy,
  output logic        out_valid,
  output logic [7:0]  out_data,
  input  logic        out_ready
);
  camac_cmd_t  cmd_q;
  logic [23:0] wd_q;
  logic [3:0]  nsp_q;
  logic [3:0]  idx;      // byte position among header, address and data bytes
  logic [3:0]  sp_cnt;   // space bytes sent
  logic [4:0]  col;      // running column parity
  logic        in_space;
  logic [4:0]  info;
  kind_e       kind;
  logic        last_hdr_byte;

  // information bits of byte idx of the header/address/data part
  always_comb begin
    kind = K_BODY;
    unique case (idx)
      4'd0: begin info = cmd_q.sc; kind = K_HDR; end
      4'd1: info = cmd_q.sn;
      4'd2: info = cmd_q.sf;
      4'd3: info = {1'b0, cmd_q.sa};
      4'd4: info = {1'b0, wd_q[23:20]};
      4'd5: info = wd_q[19:15];
      4'd6: info = wd_q[14:10];
      4'd7: info = wd_q[9:5];
      4'd8: info = wd_q[4:0];
      default: info = '0;
    endcase
  end

  assign last_hdr_byte = is_write(cmd_q.sf) ? (idx == 4'd8) : (idx == 4'd3);

  always_comb begin
    out_valid = busy;
    if (!in_space)                   out_data = mk_byte(kind, info);
    else if (sp_cnt != nsp_q)        out_data = SPACE_BYTE;
    else                             out_data = mk_byte(K_END, col);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      cmd_q    <= '0;
      wd_q     <= '0;
      nsp_q    <= '0;
      idx      <= '0;
      sp_cnt   <= '0;
      col      <= '0;
      in_space <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        cmd_q    <= cmd;
        wd_q     <= wdata;
        nsp_q    <= n_space;
        idx      <= '0;
        sp_cnt   <= '0;
        col      <= '0;
        in_space <= 1'b0;
      end
    end else if (out_ready) begin
      if (!in_space) begin
        col <= col ^ info;
        idx <= idx + 4'd1;
        if (last_hdr_byte) in_space <= 1'b1;
      end else if (sp_cnt != nsp_q) begin
        sp_cnt <= sp_cnt + 4'd1;
      end else begin
        busy <= 1'b0;
      end
    end
  end
endmodule
