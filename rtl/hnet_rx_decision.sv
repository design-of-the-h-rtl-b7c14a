// hnet_rx_decision: receive decision logic of an H-Station.
//
// Decides, for every packet on the network, whether this station lets it be
// sent, takes it, or blocks it:
//   not for this node            -> permit (release HBUS-DECIS)
//   for this node, FIFO free     -> permit and receive
//   for this node, FIFO not free -> hold HBUS-DECIS low, assert /HBUS-COLLIS
// A packet is for this node when the destination field (low ID_W bits of the
// first word) equals the node ID, is zero (broadcast), or is a group address
// the host has entered in the destination ID compare (`hnet_rx_idcmp`).
//
// A 3-bit latch holds COLLIS, DECIS and Receive Enable. It loads once, in
// the first clock in which /HBUS-DEST is asserted (the rising edge of DEST),
// so the decision cannot change while the packet is coming in, however long
// the master holds DEST. It is cleared while the network is idle (COLLIS
// released, DECIS held low, receive disabled).
// The FIFO-free flag is set by the first word shifted in and cleared by the
// host's receive clear. While Receive Enable is set, every rising edge of
// HBUS-DCLK gives one shift-in strobe (`shift_in`) to the input FIFO.
//
// Following the design: latch contents and the three cases, clear by
// /HBUS-ACTV, flag set by shift-in and cleared by /RCVCLR, DCLK gated by
// Receive Enable. Broadcast on address zero follows the packet format; the
// position of the destination field is this implementation's choice.
module hnet_rx_decision
  import hnet_pkg::*;
#(
  parameter int unsigned DATA_W = HNET_DATA_W,
  parameter int unsigned ID_W   = HNET_ID_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rcvclr,      // host receive clear (active high here)
  input  logic [ID_W-1:0]   node_id,
  input  hbus_ctl_t         bus,
  input  logic [DATA_W-1:0] bus_data,
  input  logic              bus_dclk,
  input  logic              grp_we,      // host write to the group table
  input  logic [ID_W-1:0]   grp_addr,
  input  logic              grp_set,
  output logic              collis_drv,
  output logic              decis_hold,  // holds HBUS-DECIS low
  output logic              rx_en,
  output logic              shift_in,
  output logic              used         // FIFO-free flag, high = not free
);
  logic match, dclk_q, dest_q;
  logic l_collis, l_decis, l_rxen;
  logic [ID_W-1:0] dest_id;

  assign dest_id  = bus_data[ID_W-1:0];
  hnet_rx_idcmp #(.ID_W(ID_W)) u_idcmp (
    .clk, .rst, .node_id, .dest_id, .grp_we, .grp_addr, .grp_set, .match
  );
  assign shift_in = l_rxen && bus_dclk && !dclk_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      l_collis <= 1'b0;
      l_decis  <= 1'b0;
      l_rxen   <= 1'b0;
      dclk_q   <= 1'b0;
      dest_q   <= 1'b0;
      used     <= 1'b0;
    end else begin
      dclk_q <= bus_dclk;
      dest_q <= bus.dest;
      if (!bus.actv) begin
        l_collis <= 1'b0;
        l_decis  <= 1'b0;
        l_rxen   <= 1'b0;
      end else if (bus.dest && !dest_q) begin
        l_collis <= match && used;
        l_decis  <= !(match && used);
        l_rxen   <= match && !used;
      end
      if (rcvclr)        used <= 1'b0;
      else if (shift_in) used <= 1'b1;
    end
  end

  assign collis_drv = l_collis;
  assign decis_hold = !l_decis;
  assign rx_en      = l_rxen;

endmodule
