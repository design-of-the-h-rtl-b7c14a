// hnet_ucode_rom: 32 x 16 microcode ROM of the transmit microcontroller.
//
// Holds the transmit network-access algorithm. Each word is one
// microinstruction: bits 15..8 the control lines (/XTCLR, CHCLK, /XMT,
// TST&SET, /RELEASE, COLLIS, DEST, IDEN), bits 7..5 the conditional-branch
// select, bits 4..0 the next address. The read is combinational, as from a
// fast bipolar PROM; the microcontroller's register latches the result.
//
// The contents are the design's transmit microcode. Unused locations
// (06, 13, 19, 1E, 1F) are never reached and hold zero.
//
// Program outline (address: action):
//   00      leave transmit clear, go wait for SEND
//   03      loop while /SENDA is high
//   02      CHCLK rises: checksum word with EOP enters the FIFO
//   04/05   TST&SET rises, branch on /MASTER
//   07      TST&SET low; won -> 08, lost -> 09 (09 retries the test and set)
//   08,0A   drive node ID, branch on IDOK -> 0D sole master, 0C several
//   0D,12   branch on HCOLLIS -> 14 continue, 15 abort
//   14      remove node ID
//   16      /XMT low (first FIFO word = destination on the bus), DEST pulse
//   17      DEST low, branch on HCOLLIS -> 1A transmit, 1B abort
//   1A,1C   wait for EOT, then 1D clears the FIFO and releases the network
//   0C/0F/15/1B  release, assert COLLIS, loop while the network is active
//   0E,10/11     drop COLLIS and ID, retry the test and set
module hnet_ucode_rom (
  input  logic [4:0]  addr,
  output logic [15:0] data
);
  always_comb begin
    unique case (addr)
      5'h00: data = 16'hA023;
      5'h01: data = 16'hA023;
      5'h02: data = 16'hE804;
      5'h03: data = 16'hA022;
      5'h04: data = 16'hB887;
      5'h05: data = 16'hB887;
      5'h07: data = 16'hA808;
      5'h08: data = 16'hA90A;
      5'h09: data = 16'hB887;
      5'h0A: data = 16'hA9EB;
      5'h0B: data = 16'hA90C;
      5'h0C: data = 16'hA5AF;
      5'h0D: data = 16'hA9D2;
      5'h0E: data = 16'hA810;
      5'h0F: data = 16'hA5AE;
      5'h10: data = 16'hB887;
      5'h11: data = 16'hB887;
      5'h12: data = 16'hA914;
      5'h14: data = 16'hA816;
      5'h15: data = 16'hA5AF;
      5'h16: data = 16'h8A17;
      5'h17: data = 16'h88D8;
      5'h18: data = 16'h881A;
      5'h1A: data = 16'h887C;
      5'h1B: data = 16'hA5AF;
      5'h1C: data = 16'h887C;
      5'h1D: data = 16'h2000;
      default: data = 16'h0000;
    endcase
  end
endmodule
