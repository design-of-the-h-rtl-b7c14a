// hnet_rx_checksum: checksum check of the receive section.
//
// Adds every word shifted into the input FIFO into a 16-bit sum. The packet
// ends with the checksum word (EOP bit set), which the transmitter chose so
// that the total is zero. When the EOP word arrives `done` is set and
// `err` tells whether the total was non-zero, i.e. the packet is garbled and
// must be discarded by the host. Receive clear resets the check.
//
// Following the design: the receiver recomputes the checksum including the
// transmitted one, zero means intact, and only reports the result to the
// host. The modulo-2^16 sum is this implementation's choice (matching the
// transmit side).
module hnet_rx_checksum #(
  parameter int unsigned DATA_W = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clr,
  input  logic            shift_in,
  input  logic [DATA_W:0] word,      // {EOP, data}
  output logic            done,
  output logic            err
);
  logic [DATA_W-1:0] sum, total;

  assign total = sum + word[DATA_W-1:0];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      sum  <= '0;
      done <= 1'b0;
      err  <= 1'b0;
    end else if (shift_in && !done) begin
      sum <= total;
      if (word[DATA_W]) begin
        done <= 1'b1;
        err  <= (total != '0);
      end
    end
  end

endmodule
