// sdvme_vme_slave: VME A16/D16 slave interface of the driver.
//
// Synchronises the VME strobes to the system clock and answers data transfer
// cycles addressed to the board:
//   * short addressing: the board occupies $XX00..$XX20 (17 word addresses);
//     A15..A11 must equal the base address switch sw_base (steps of $800,
//     32 settings) and A10..A6 must be zero;
//   * address modifier $2D (short supervisory) is always accepted, $29 (short
//     non-privileged) only when sw_user is set, as the two switch settings of
//     the driver allow;
//   * D16 transfers; DS1 enables D15..D8 and DS0 D7..D0 on writes.
// Each accepted cycle gives one reg_wr or reg_rd strobe with the word index
// (A5..A1), then DTACK is held low (with the read data driven) until the
// master releases the data strobes. A read of $20 answers 0 and, when the
// cycle ends, pulses soft_reset, which resets the board like SYSRESET.
// Interrupt acknowledge cycles (IACK low) are answered with the interrupter's
// vector on D7..D0 when IACKIN is low and the interrupter requests at the
// level on A3..A1; otherwise IACKOUT is driven low to pass the acknowledge on.
// The synchronous implementation and its timing (about four system clocks from
// the data strobe to DTACK) are this design's choices.
module sdvme_vme_slave (
  input  logic        clk,
  input  logic        rst,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [15:1] addr,
  input  logic [15:0] data_i,
  input  logic        iack_n,
  input  logic        iackin_n,
  output logic [15:0] data_o,
  output logic        data_oe,
  output logic        dtack_n,
  output logic        iackout_n,
  input  logic [4:0]  sw_base,
  input  logic        sw_user,
  // register side
  output logic        reg_wr,
  output logic        reg_rd,
  output logic [4:0]  reg_idx,
  output logic [1:0]  reg_be,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,
  // interrupter side
  output logic [2:0]  iack_level,
  input  logic        iack_hit,
  input  logic [7:0]  iack_vector,
  output logic        iack_done,
  output logic        soft_reset
);
  typedef enum logic [1:0] {S_IDLE, S_ACK, S_PASS, S_WAIT} state_e;
  state_e state;

  logic [1:0] as_s, iack_s, iackin_s;
  logic [1:0] ds0_s, ds1_s;
  logic       reset_pending;

  wire as_a     = as_s[1];
  wire ds_a     = ds0_s[1] | ds1_s[1];
  wire iack_a   = iack_s[1];
  wire iackin_a = iackin_s[1];

  wire am_ok  = (am == 6'h2D) || (sw_user && am == 6'h29);
  wire hit    = am_ok && addr[15:11] == sw_base && addr[10:6] == 5'd0 && addr[5:1] <= 5'd16;

  assign iack_level = addr[3:1];
  assign reg_idx    = addr[5:1];
  assign reg_be     = {ds1_s[1], ds0_s[1]};
  assign reg_wdata  = data_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s     <= '0;
      ds0_s    <= '0;
      ds1_s    <= '0;
      iack_s   <= '0;
      iackin_s <= '0;
    end else begin
      as_s     <= {as_s[0], ~as_n};
      ds0_s    <= {ds0_s[0], ~ds_n[0]};
      ds1_s    <= {ds1_s[0], ~ds_n[1]};
      iack_s   <= {iack_s[0], ~iack_n};
      iackin_s <= {iackin_s[0], ~iackin_n};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      reg_wr        <= 1'b0;
      reg_rd        <= 1'b0;
      iack_done     <= 1'b0;
      data_o        <= '0;
      data_oe       <= 1'b0;
      dtack_n       <= 1'b1;
      iackout_n     <= 1'b1;
      reset_pending <= 1'b0;
      soft_reset    <= 1'b0;
    end else begin
      reg_wr     <= 1'b0;
      reg_rd     <= 1'b0;
      iack_done  <= 1'b0;
      soft_reset <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (as_a && ds_a && !iack_a) begin
            if (hit) begin
              state <= S_ACK;
              if (!write_n) begin
                if (addr[5:1] != 5'd16) reg_wr <= 1'b1;
              end else begin
                if (addr[5:1] == 5'd16) reset_pending <= 1'b1;
                else                    reg_rd        <= 1'b1;
              end
            end else begin
              state <= S_WAIT;
            end
          end else if (as_a && ds_a && iack_a && iackin_a) begin
            if (iack_hit) begin
              state     <= S_ACK;
              iack_done <= 1'b1;
              data_o    <= {8'h00, iack_vector};
              data_oe   <= 1'b1;
              dtack_n   <= 1'b0;
            end else begin
              state     <= S_PASS;
              iackout_n <= 1'b0;
            end
          end
        end
        S_ACK: begin
          // one cycle after the strobe the register read data is valid
          if (!dtack_n) begin
            if (!ds_a) begin
              dtack_n <= 1'b1;
              data_oe <= 1'b0;
              state   <= S_IDLE;
              if (reset_pending) begin
                reset_pending <= 1'b0;
                soft_reset    <= 1'b1;
              end
            end
          end else begin
            dtack_n <= 1'b0;
            data_oe <= write_n;
            data_o  <= (addr[5:1] == 5'd16) ? 16'h0 : reg_rdata;
          end
        end
        S_PASS: begin
          if (!iackin_a || !as_a) begin
            iackout_n <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: begin
          if (!ds_a) state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
