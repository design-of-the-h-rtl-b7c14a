// hnet_bus: the H-Network bus lines, resolved for N stations.
//
// The physical bus is passive: /HBUS-ACTV, /HBUS-COLLIS, /HBUS-DEST and
// HBUS-DECIS are open-collector wired-OR lines with pull-ups; HBUS-DATA,
// HBUS-EOP and HBUS-DCLK are tri-state, driven only by the network master
// (while its /XMT is low). During the ID check the node IDs are also put
// on HBUS-DATA through open-collector drivers and combine as a wired OR.
//
// In positive logic that becomes: a control line is asserted when any
// station asserts it; HBUS-DECIS (permit) is high only when no station holds
// it low; the data lines are the OR of the enabled tri-state drivers and the
// ID drivers; an undriven line reads zero. An assertion checks the bus rule
// that at most one station enables its tri-state drivers.
// Purely combinational.
module hnet_bus
  import hnet_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned DATA_W = HNET_DATA_W
) (
  input  logic [N-1:0]             actv_drv,
  input  logic [N-1:0]             collis_drv,
  input  logic [N-1:0]             dest_drv,
  input  logic [N-1:0]             decis_hold,
  input  logic [N-1:0]             xmt_en,
  input  logic [N-1:0][DATA_W-1:0] data_drv,
  input  logic [N-1:0]             eop_drv,
  input  logic [N-1:0]             dclk_drv,
  input  logic [N-1:0][DATA_W-1:0] id_drv,
  output hbus_ctl_t                bus,
  output logic [DATA_W-1:0]        bus_data,
  output logic                     bus_eop,
  output logic                     bus_dclk
);
  always_comb begin
    bus.actv   = |actv_drv;
    bus.collis = |collis_drv;
    bus.dest   = |dest_drv;
    bus.decis  = ~|decis_hold;
    bus_data   = '0;
    bus_eop    = 1'b0;
    bus_dclk   = 1'b0;
    for (int i = 0; i < N; i++) begin
      bus_data = bus_data | id_drv[i] | (xmt_en[i] ? data_drv[i] : '0);
      bus_eop  = bus_eop  | (xmt_en[i] & eop_drv[i]);
      bus_dclk = bus_dclk | (xmt_en[i] & dclk_drv[i]);
    end
  end

  // Tri-state rule: only the network master drives data, EOP and DCLK.
  always_comb begin
    a_one_driver: assert ($countones(xmt_en) <= 1)
      else $error("hnet_bus: %0d stations enable their tri-state drivers", $countones(xmt_en));
  end

endmodule
