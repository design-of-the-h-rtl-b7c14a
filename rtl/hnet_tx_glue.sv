// hnet_tx_glue: shift-in glue logic and checksum generator of the
// transmit section.
//
// Two sources write the output FIFO: the host, one word per cycle with
// `host_si` high, and the microcontroller, whose CHCLK line rises once after
// the host has asked to send. Every host word is added into a running 16-bit
// sum. On the CHCLK rising edge the glue logic closes the host data buffer
// and writes the final word: EOP set, data = two's complement of the sum, so
// that the sum of all words of the packet, checksum included, is zero at the
// receiver. /XTCLR (active low) clears the sum with the FIFO.
//
// The host must not write in the cycle CHCLK rises; if it does, the checksum
// word wins and the host word is dropped.
//
// Following the design: the H-Station appends a checksum word carrying the
// EOP bit, CHCLK shifts it in, and the receiver's total over the packet is
// zero for an intact packet. The checksum being a modulo-2^16 sum is this
// implementation's choice.
module hnet_tx_glue #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              xtclr_n,
  input  logic              host_si,
  input  logic [DATA_W-1:0] host_d,
  input  logic              chclk,
  output logic              fifo_si,
  output logic [DATA_W:0]   fifo_d
);
  logic [DATA_W-1:0] sum;
  logic              chclk_q, ck_wr;

  assign ck_wr   = chclk && !chclk_q;
  assign fifo_si = (ck_wr || host_si) && xtclr_n;
  assign fifo_d  = ck_wr ? {1'b1, (~sum) + 1'b1} : {1'b0, host_d};

  always_ff @(posedge clk) begin
    if (rst) begin
      sum     <= '0;
      chclk_q <= 1'b0;
    end else begin
      chclk_q <= chclk;
      if (!xtclr_n)                sum <= '0;
      else if (host_si && !ck_wr)  sum <= sum + host_d;
    end
  end

endmodule
