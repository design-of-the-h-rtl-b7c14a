// hnet_hbus_clock: HBUS clock module, the packet data clock HBUS-DCLK.
//
// A free-running oscillator (here a divider of `clk`, high for HALF cycles
// and low for HALF cycles) is gated by
//     enable = !/XMT && !EOT && HBUS-DECIS
// i.e. this station is sole master, the packet has not ended, and every
// station has permitted the transfer. Only whole oscillator periods are let
// through: the enable is looked at when a period begins and held for the
// whole period, so an enable arriving during a high phase keeps the output
// low until the next period.
//
// Each falling edge of the gated clock is the FIFO shift-out strobe (`so`),
// and the EOT flip-flop samples the EOP bit of the word being shifted out.
// Once the word with EOP has gone, EOT is set and the oscillator stops.
// /XTCLR clears EOT. `dclk` goes to the bus; the bus model lets it through
// only while /XMT is low.
//
// Timing: `dclk` is high for HALF clk cycles per word and a word takes
// 2*HALF cycles. Following the design: the enable equation, whole-cycle
// gating, falling-edge shift-out, EOT latched from EOP and cleared by
// transmit clear. The oscillator frequency is not fixed by the design.
module hnet_hbus_clock #(
  parameter int unsigned HALF = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic xmt_n,
  input  logic xtclr_n,
  input  logic decis,       // HBUS-DECIS (permit)
  input  logic eop_bit,     // EOP bit of the output FIFO head word
  output logic dclk,
  output logic so,          // shift-out strobe (falling edge of dclk)
  output logic eot
);
  localparam int unsigned CW = $clog2(2*HALF);

  logic [CW-1:0] cnt;
  logic          osc_high, period_start, enable, gate_q, gate, dclk_q;

  assign osc_high     = (cnt < CW'(HALF));
  assign period_start = (cnt == '0);
  assign enable       = !xmt_n && !eot && decis;
  assign gate         = period_start ? enable : gate_q;
  assign dclk         = osc_high && gate;
  assign so           = dclk_q && !dclk;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      gate_q <= 1'b0;
      dclk_q <= 1'b0;
      eot    <= 1'b0;
    end else begin
      cnt    <= (cnt == CW'(2*HALF-1)) ? '0 : cnt + 1'b1;
      gate_q <= gate;
      dclk_q <= dclk;
      if (!xtclr_n) eot <= 1'b0;
      else if (so)  eot <= eop_bit;
    end
  end

endmodule
