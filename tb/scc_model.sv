// scc_model: behavioural model of a Serial Crate Controller, for testbenches only.
//
// Sits in the loop between an upstream Command input and a downstream output.
// A Command message addressed to crate MY_SC is taken off the loop and answered
// with a Reply message in the driver's message format (see sdvme_pkg); every
// other message (Commands for other crates, Replies and Demands of upstream
// crates) is passed on unchanged, space bytes inside it included.
// The model's CAMAC Dataway is a register array: a write function (F16..F23)
// stores the data at station N, subaddress A; a read function (F0..F7)
// returns it; control functions only answer. X and Q are 1; ERR is set if the
// Command message had a parity or length error. It uses the driver's own line
// receiver and transmitter and a line clock of the same rate.
// fault selects a damaged Reply: 1 byte parity, 2 column parity, 3 wrong crate
// address in the header, 4 a byte missing, 5 no Reply, 6 line clock stopped.
// A pulse on demand_req sends a Demand message with SGL pattern demand_sgl
// when the loop is free. n_cmd counts Command messages for this crate;
// last_spaces is the number of space bytes in the last one.
// The model works on the falling edge of the system clock so that its outputs
// to the transmitter are stable at the rising edge.
module scc_model
  import sdvme_pkg::*;
#(
  parameter logic [4:0] MY_SC  = 5'd3,
  parameter int unsigned CLK_HZ = 20_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] speed,
  input  logic       bit_mode,
  input  logic       cmd_clk,
  input  logic [7:0] cmd_data,
  input  logic       cmd_bit,
  output logic       rep_clk,
  output logic [7:0] rep_data,
  output logic       rep_bit,
  input  logic [2:0] fault,
  input  logic       demand_req,
  input  logic [4:0] demand_sgl,
  output int         n_cmd,
  output int         last_spaces
);
  logic       rx_valid, rx_ferr, nosync_unused;
  logic [7:0] rx_data;
  logic       line_clk, tick_fall, tick_rise;

  sdvme_rx u_rx (.clk, .rst, .bit_mode, .rx_clk(cmd_clk), .rx_data(cmd_data), .rx_bit(cmd_bit),
                 .out_valid(rx_valid), .out_data(rx_data), .framing_err(rx_ferr),
                 .nosync(nosync_unused));
  sdvme_clkgen #(.CLK_HZ(CLK_HZ)) u_clk (.clk, .rst, .speed(speed_e'(speed)), .line_clk,
                                         .tick_fall, .tick_rise);

  logic       tx_valid, tx_ready, byte_tick;
  logic [7:0] tx_byte;
  sdvme_tx u_tx (.clk, .rst, .bit_mode, .tick_fall, .in_valid(tx_valid), .in_data(tx_byte),
                 .in_ready(tx_ready), .tx_data(rep_data), .tx_bit(rep_bit), .byte_tick);
  assign rep_clk = (fault == 3'd6) ? 1'b0 : line_clk;

  logic [23:0] dataway [32][16];
  logic [7:0]  msg [16];
  logic [7:0]  txq [$];
  int          m_len, spaces;
  bit          in_msg, fwd, taken;
  int          dem_req, dem_done;
  logic [4:0]  dem_sgl;

  always @(posedge clk) begin
    if (rst) dem_req <= 0;
    else if (demand_req) begin dem_req <= dem_req + 1; dem_sgl <= demand_sgl; end
  end

  task automatic queue_reply();
    logic [4:0] sc, sn, sf, col;
    logic [3:0] sa;
    logic       bad;
    logic [23:0] w, r;
    logic [7:0] b [16];
    int n;
    bad = 1'b0; col = '0;
    for (int i = 0; i < m_len; i++) begin
      if (!(^msg[i])) bad = 1'b1;
      col ^= msg[i][4:0];
    end
    if (col != 0) bad = 1'b1;
    sc = msg[0][4:0]; sn = msg[1][4:0]; sf = msg[2][4:0]; sa = msg[3][3:0];
    n_cmd = n_cmd + 1;
    last_spaces = spaces;
    w = {msg[4][3:0], msg[5][4:0], msg[6][4:0], msg[7][4:0], msg[8][4:0]};
    if (m_len != (is_write(sf) ? 10 : 5)) bad = 1'b1;
    if (!bad && is_write(sf)) dataway[sn][sa] = w;
    r = dataway[sn][sa];
    if (fault == 3'd5) return;
    n = 0;
    b[n++] = mk_byte(K_HDR, (fault == 3'd3) ? sc ^ 5'd1 : sc);
    b[n++] = mk_byte(K_BODY, {1'b0, 1'b0, 1'b1, 1'b1, bad});   // DERR=0 SQ=1 SX=1 ERR
    if (is_read(sf)) begin
      b[n++] = mk_byte(K_BODY, {1'b0, r[23:20]});
      b[n++] = mk_byte(K_BODY, r[19:15]);
      b[n++] = mk_byte(K_BODY, r[14:10]);
      b[n++] = mk_byte(K_BODY, r[9:5]);
      b[n++] = mk_byte(K_BODY, r[4:0]);
    end
    col = '0;
    for (int i = 0; i < n; i++) col ^= b[i][4:0];
    if (fault == 3'd2) col ^= 5'd4;
    b[n++] = mk_byte(K_END, col);
    if (fault == 3'd1) b[1][7] = ~b[1][7];
    if (fault == 3'd4) begin b[1] = b[2]; b[2] = b[3]; n--; end
    for (int i = 0; i < n; i++) txq.push_back(b[i]);
  endtask

  always @(negedge clk) begin
    if (rst) begin
      txq = {}; in_msg = 0; fwd = 0; m_len = 0; spaces = 0; taken = 0; dem_done = 0;
      n_cmd = 0; last_spaces = 0; tx_valid = 0; tx_byte = 0;
      for (int n = 0; n < 32; n++) for (int a = 0; a < 16; a++) dataway[n][a] = '0;
    end else begin
      // the byte offered at the last rising edge was taken
      if (taken) void'(txq.pop_front());
      if (rx_valid) begin
        if (rx_data == SPACE_BYTE) begin
          if (in_msg && fwd) txq.push_back(rx_data);
          else if (in_msg) spaces++;
        end else if (!in_msg) begin
          in_msg = 1;
          if (rx_data[6:5] == K_HDR && rx_data[4:0] == MY_SC) begin
            fwd = 0; msg[0] = rx_data; m_len = 1; spaces = 0;
          end else begin
            fwd = 1; txq.push_back(rx_data);
          end
          if (rx_data[6:5] == K_END) in_msg = 0;
        end else if (fwd) begin
          txq.push_back(rx_data);
          if (rx_data[6:5] == K_END) in_msg = 0;
        end else begin
          msg[m_len[3:0]] = rx_data;
          m_len++;
          if (rx_data[6:5] == K_END || m_len == 16) begin
            in_msg = 0;
            queue_reply();
          end
        end
      end
      if (dem_done != dem_req && !in_msg && txq.size() == 0) begin
        dem_done++;
        txq.push_back(mk_byte(K_DHDR, MY_SC));
        txq.push_back(mk_byte(K_BODY, dem_sgl));
        txq.push_back(mk_byte(K_END, MY_SC ^ dem_sgl));
      end
      tx_valid = txq.size() > 0;
      tx_byte  = tx_valid ? txq[0] : 8'h00;
      taken    = tx_valid && tx_ready;
    end
  end
endmodule
