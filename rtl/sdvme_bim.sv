// sdvme_bim: VME interrupter for the driver's two interrupt sources.
//
// Works like the bus interrupter chip the driver uses, reduced to what the
// driver needs: four channels, each with a control register and a vector
// register (register index 0..3 = control of channel 0..3, 4..7 = vector of
// channel 0..3). Channel 0 is the Reply interrupt (INT0), channel 1 the
// Demand interrupt (INT1); channels 2 and 3 have registers but no source.
// Control register bits (taken from that chip's layout):
//   [2:0] interrupt level, 0 = no interrupt   [3] IRAC: clear IRE on acknowledge
//   [4]   IRE: interrupt enable (the mask)    [7] read only: request pending
// A pulse on src[i] sets channel i pending. A pending, enabled channel with a
// non-zero level requests an interrupt on the IRQ line of its level; both
// channels may request at once. When both use the same level, channel 0 answers
// the acknowledge first. During an acknowledge cycle at level iack_level, iack_hit tells
// whether this interrupter answers and iack_vector is the vector; iack_done
// clears the pending request of that channel. Bits 6:5 are stored and unused.
// Only the behaviour listed here is modelled; the chip's external-vector mode
// and flag bits are left out.
module sdvme_bim (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] src,
  input  logic       reg_wr,
  input  logic [2:0] reg_idx,
  input  logic [7:0] reg_wdata,
  output logic [7:0] reg_rdata,
  output logic [7:1] irq_req,      // request on IRQ1..IRQ7
  input  logic [2:0] iack_level,
  output logic       iack_hit,
  output logic [7:0] iack_vector,
  input  logic       iack_done
);
  logic [6:0] ctrl [4];
  logic [7:0] vec  [4];
  logic [1:0] pend;
  logic [1:0] act;
  logic       sel;                 // channel that answers an acknowledge

  always_comb begin
    for (int i = 0; i < 2; i++)
      act[i] = pend[i] && ctrl[i][4] && (ctrl[i][2:0] != 3'd0);
    irq_req = '0;
    for (int i = 0; i < 2; i++)
      for (int l = 1; l <= 7; l++)
        if (act[i] && ctrl[i][2:0] == 3'(l)) irq_req[l] = 1'b1;
    if (act[0] && ctrl[0][2:0] == iack_level) begin
      sel = 1'b0; iack_hit = 1'b1;
    end else if (act[1] && ctrl[1][2:0] == iack_level) begin
      sel = 1'b1; iack_hit = 1'b1;
    end else begin
      sel = 1'b0; iack_hit = 1'b0;
    end
    iack_vector = vec[{1'b0, sel}];
    reg_rdata = reg_idx[2] ? vec[reg_idx[1:0]]
              : {(reg_idx[1] == 1'b0) && pend[reg_idx[0]], ctrl[reg_idx[1:0]]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin
        ctrl[i] <= '0;
        vec[i]  <= 8'h0F;          // uninitialised-vector default
      end
      pend <= '0;
    end else begin
      if (reg_wr) begin
        if (reg_idx[2]) vec[reg_idx[1:0]]  <= reg_wdata;
        else            ctrl[reg_idx[1:0]] <= reg_wdata[6:0];
      end
      if (iack_done && iack_hit) begin
        pend[sel] <= 1'b0;
        if (ctrl[{1'b0, sel}][3]) ctrl[{1'b0, sel}][4] <= 1'b0;
      end
      for (int i = 0; i < 2; i++)
        if (src[i]) pend[i] <= 1'b1;
    end
  end
endmodule
