// hnet_rx_idcmp: destination ID compare of the receive decision logic.
//
// MATCH is high when this station is a destination of the packet whose
// first word is on HBUS-DATA. Three kinds of destination address are
// recognised:
//   - the station's own node number (fixed comparator),
//   - zero, the broadcast address (all stations),
//   - any group address the host has entered in the group table.
// The group table is a one-bit-per-address lookup (2**ID_W entries). The
// host sets or clears entry `grp_addr` by pulsing `grp_we` with `grp_set`.
// Reset empties it, so after reset a station answers only to its own
// number and to broadcast. One packet sent to a group address reaches every
// station that has that address in its table.
//
// Timing: `match` is combinational from `dest_id` and the table; a table
// write takes effect in the next cycle.
//
// Following the design: comparator with a fixed node ID, broadcast on zero,
// a RAM lookup giving a node more than one destination address for group
// transfers, and host access to it. The one-bit-per-address organisation,
// the write port and the empty table after reset are this implementation's
// choices.
module hnet_rx_idcmp
  import hnet_pkg::*;
#(
  parameter int unsigned ID_W = HNET_ID_W
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [ID_W-1:0] node_id,
  input  logic [ID_W-1:0] dest_id,
  // host access to the group table
  input  logic            grp_we,
  input  logic [ID_W-1:0] grp_addr,
  input  logic            grp_set,
  output logic            match
);
  logic [2**ID_W-1:0] grp;

  always_ff @(posedge clk) begin
    if (rst)         grp <= '0;
    else if (grp_we) grp[grp_addr] <= grp_set;
  end

  assign match = (dest_id == node_id) || (dest_id == '0) || grp[dest_id];

endmodule
