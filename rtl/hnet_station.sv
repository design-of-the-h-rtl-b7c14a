// hnet_station: one H-Station, the network interface of a node.
//
// Joins the transmit section and the receive section. The two run
// independently; they share only the node ID and the bus. The station's own
// receiver takes part in every decision like any other, so a station also
// receives its own broadcast packets.
//
// Bus side: inputs are the resolved bus lines; outputs are what this station
// drives. Wired-OR lines are ORed by the bus model; `xmt_en` marks when the
// tri-state data, EOP and DCLK outputs are enabled.
module hnet_station
  import hnet_pkg::*;
#(
  parameter int unsigned DATA_W     = HNET_DATA_W,
  parameter int unsigned FIFO_DEPTH = HNET_FIFO_DEPTH,
  parameter int unsigned ID_W       = HNET_ID_W,
  parameter int unsigned DCLK_HALF  = 2
) (
  input  logic              clk,
  input  logic              rst,       // power-on reset of the station
  input  logic [ID_W-1:0]   node_id,
  // host, transmit
  input  logic              tx_reset,  // host transmit reset
  input  logic              uc_tick,
  input  logic              host_si,
  input  logic [DATA_W-1:0] host_d,
  input  logic              send,
  output logic              tx_empty,
  output logic              eot,
  output logic [UPC_W-1:0]  uc_state,
  // host, receive
  input  logic              rcvclr,
  input  logic              grp_we,
  input  logic [ID_W-1:0]   grp_addr,
  input  logic              grp_set,
  input  logic              host_so,
  input  logic              rcvdata_n,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_empty,
  output logic              rx_avail,
  output logic              rx_eop,
  output logic              ck_done,
  output logic              ck_err,
  // resolved bus
  input  hbus_ctl_t         bus,
  input  logic [DATA_W-1:0] bus_data,
  input  logic              bus_eop,
  input  logic              bus_dclk,
  // drives
  output logic              actv_drv,
  output logic              collis_drv,
  output logic              dest_drv,
  output logic              decis_hold,
  output logic              xmt_en,
  output logic [DATA_W-1:0] data_drv,
  output logic              eop_drv,
  output logic              dclk_drv,
  output logic [DATA_W-1:0] id_drv
);
  logic tx_collis, rx_collis;

  hnet_tx_module #(.DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH), .ID_W(ID_W),
                   .DCLK_HALF(DCLK_HALF)) u_tx (
    .clk, .rst(rst || tx_reset), .uc_tick, .node_id, .host_si, .host_d, .send,
    .tx_empty, .eot, .bus, .bus_data, .actv_drv, .collis_drv(tx_collis),
    .dest_drv, .xmt_en, .data_drv, .eop_drv, .dclk_drv, .id_drv, .uc_state
  );

  hnet_rx_module #(.DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH), .ID_W(ID_W)) u_rx (
    .clk, .rst, .node_id, .rcvclr, .grp_we, .grp_addr, .grp_set, .host_so, .rcvdata_n, .rx_data, .rx_empty,
    .rx_avail, .rx_eop, .ck_done, .ck_err, .bus, .bus_data, .bus_eop,
    .bus_dclk, .collis_drv(rx_collis), .decis_hold
  );

  assign collis_drv = tx_collis || rx_collis;

endmodule
