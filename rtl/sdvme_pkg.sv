// sdvme_pkg: types and constants shared by the VME Serial CAMAC Highway Driver.
//
// The driver talks to Serial Crate Controllers over a Serial Highway loop.
// Every message byte used on the loop carries:
//   bit 7     odd byte parity over the whole byte (the byte holds an odd number of ones)
//   bits 6:5  byte kind: body, end-sum, Command/Reply header, Demand header
//   bits 4:0  five information bits
// The end-sum byte closes a message; its information bits are the column
// parity (XOR) of the information bits of every earlier byte of the message.
// The all-zero byte is a space/wait byte: it has even parity, so it can never be a
// message byte, and every receiver skips it.
// The byte layout, the message contents and the space-byte rule below are this
// design's own choices: the driver description only says that parity patterns
// and space bytes are generated and checked.
package sdvme_pkg;

  // ---- byte kinds ----
  typedef enum logic [1:0] {
    K_BODY = 2'b00,
    K_END  = 2'b01,
    K_HDR  = 2'b10,  // Command or Reply header, information = crate address SC
    K_DHDR = 2'b11   // Demand header, information = crate address SC
  } kind_e;

  localparam logic [7:0] SPACE_BYTE = 8'h00;

  // ---- line speed selection (0.5, 1, 2.5 and 5 MHz) ----
  typedef enum logic [1:0] {
    SPD_0M5 = 2'd0,
    SPD_1M  = 2'd1,
    SPD_2M5 = 2'd2,
    SPD_5M  = 2'd3
  } speed_e;

  // Bits per byte in bit-serial mode: start bit, 8 data bits, stop bit.
  localparam int unsigned BIT_FRAME = 10;

  // ---- CAMAC command fields ----
  typedef struct packed {
    logic [4:0] sc;   // serial crate address
    logic [4:0] sn;   // station number
    logic [3:0] sa;   // subaddress
    logic [4:0] sf;   // function code
  } camac_cmd_t;

  // Reply status bits that the crate controller inserts (status register D3..D0)
  typedef struct packed {
    logic derr;
    logic sq;
    logic sx;
    logic err;
  } reply_stat_t;

  // Errors found by the driver when checking an incoming message
  typedef struct packed {
    logic cpl;   // wrong number of bytes
    logic hed;   // wrong header
    logic cp;    // column parity
    logic pb;    // byte parity
  } rx_err_t;

  // One entry of the Demand FIFO
  typedef struct packed {
    logic       err;  // parity error in the Demand message
    logic [4:0] sc;
    logic [4:0] sgl;  // serial graded LAM pattern
  } demand_t;

  // F0..F7 read, F16..F23 write, the rest are control functions.
  function automatic logic is_read(input logic [4:0] f);
    return f[4:3] == 2'b00;
  endfunction

  function automatic logic is_write(input logic [4:0] f);
    return f[4:3] == 2'b10;
  endfunction

  // Build a message byte: kind and information, parity added.
  function automatic logic [7:0] mk_byte(input kind_e k, input logic [4:0] info);
    logic [6:0] b;
    b = {k, info};
    return {~(^b), b};
  endfunction

  // Number of reply bytes, header and end-sum included.
  function automatic int unsigned reply_len(input logic [4:0] f);
    return is_read(f) ? 8 : 3;
  endfunction

  // Half period of the line clock in system clocks for a system clock of clk_hz.
  function automatic int unsigned half_period(input int unsigned clk_hz, input speed_e s);
    int unsigned f_khz;
    case (s)
      SPD_0M5: f_khz = 500;
      SPD_1M:  f_khz = 1000;
      SPD_2M5: f_khz = 2500;
      default: f_khz = 5000;
    endcase
    return (clk_hz / 1000) / (2 * f_khz);
  endfunction

  // Space bytes so that the bytes after the last command byte last at least one
  // CAMAC Dataway cycle (dw_ns nanoseconds); at least one space byte.
  function automatic int unsigned space_bytes(input int unsigned clk_hz, input speed_e s,
                                              input logic bit_mode, input int unsigned dw_ns);
    int unsigned byte_clk, dw_clk, n;
    byte_clk = 2 * half_period(clk_hz, s) * (bit_mode ? BIT_FRAME : 1);
    dw_clk   = (dw_ns * (clk_hz / 1000)) / 1_000_000;
    n = (dw_clk + byte_clk - 1) / byte_clk;
    return (n == 0) ? 1 : n;
  endfunction

endpackage
