// hnet_system: an H-Network of N H-Stations on one shared bus.
//
// This is the packet network of the Homogeneous Multiprocessor: every node
// has an H-Station, and all stations hang on one passive bus with separate
// data and control lines. A station that has a packet wins the bus with a
// test-and-set on /HBUS-ACTV, proves it is the only master by reading back
// its node ID (several would-be masters garble each other's IDs and one of
// them forces a collision), announces the destination with /HBUS-DEST, and
// sends the packet only if every destination has a free receive FIFO (all
// stations release HBUS-DECIS). Packet data therefore never collides.
//
// Ports: per station i, the host interface of the transmit and receive
// sections (arrays indexed by station) and the station's node ID (hard-wired
// or switch-set, so an input). The resolved bus lines are brought out for
// observation. `uc_tick[i]` is the clock enable of station i's transmit
// controller; each controller has its own free-running clock in the design.
module hnet_system
  import hnet_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned DATA_W     = HNET_DATA_W,
  parameter int unsigned FIFO_DEPTH = HNET_FIFO_DEPTH,
  parameter int unsigned ID_W       = HNET_ID_W,
  parameter int unsigned DCLK_HALF  = 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [N-1:0][ID_W-1:0]   node_id,
  input  logic [N-1:0]             tx_reset,
  input  logic [N-1:0]             uc_tick,
  input  logic [N-1:0]             host_si,
  input  logic [N-1:0][DATA_W-1:0] host_d,
  input  logic [N-1:0]             send,
  output logic [N-1:0]             tx_empty,
  output logic [N-1:0]             eot,
  output logic [N-1:0][UPC_W-1:0]  uc_state,
  input  logic [N-1:0]             rcvclr,
  input  logic [N-1:0]             grp_we,
  input  logic [N-1:0][ID_W-1:0]   grp_addr,
  input  logic [N-1:0]             grp_set,
  input  logic [N-1:0]             host_so,
  input  logic [N-1:0]             rcvdata_n,
  output logic [N-1:0][DATA_W-1:0] rx_data,
  output logic [N-1:0]             rx_empty,
  output logic [N-1:0]             rx_avail,
  output logic [N-1:0]             rx_eop,
  output logic [N-1:0]             ck_done,
  output logic [N-1:0]             ck_err,
  output hbus_ctl_t                bus,
  output logic [DATA_W-1:0]        bus_data,
  output logic                     bus_eop,
  output logic                     bus_dclk
);
  logic [N-1:0]             actv_drv, collis_drv, dest_drv, decis_hold;
  logic [N-1:0]             xmt_en, eop_drv, dclk_drv;
  logic [N-1:0][DATA_W-1:0] data_drv, id_drv;

  for (genvar i = 0; i < N; i++) begin : g_st
    hnet_station #(.DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH), .ID_W(ID_W),
                   .DCLK_HALF(DCLK_HALF)) u_st (
      .clk, .rst, .node_id(node_id[i]),
      .tx_reset(tx_reset[i]), .uc_tick(uc_tick[i]), .host_si(host_si[i]),
      .host_d(host_d[i]), .send(send[i]), .tx_empty(tx_empty[i]), .eot(eot[i]),
      .uc_state(uc_state[i]),
      .rcvclr(rcvclr[i]), .grp_we(grp_we[i]), .grp_addr(grp_addr[i]), .grp_set(grp_set[i]),
      .host_so(host_so[i]), .rcvdata_n(rcvdata_n[i]),
      .rx_data(rx_data[i]), .rx_empty(rx_empty[i]), .rx_avail(rx_avail[i]),
      .rx_eop(rx_eop[i]), .ck_done(ck_done[i]), .ck_err(ck_err[i]),
      .bus, .bus_data, .bus_eop, .bus_dclk,
      .actv_drv(actv_drv[i]), .collis_drv(collis_drv[i]), .dest_drv(dest_drv[i]),
      .decis_hold(decis_hold[i]), .xmt_en(xmt_en[i]), .data_drv(data_drv[i]),
      .eop_drv(eop_drv[i]), .dclk_drv(dclk_drv[i]), .id_drv(id_drv[i])
    );
  end

  hnet_bus #(.N(N), .DATA_W(DATA_W)) u_bus (
    .actv_drv, .collis_drv, .dest_drv, .decis_hold, .xmt_en, .data_drv,
    .eop_drv, .dclk_drv, .id_drv, .bus, .bus_data, .bus_eop, .bus_dclk
  );

endmodule
