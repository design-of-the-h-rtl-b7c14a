// hnet_tx_idcmp: transmit ID compare, the sole-master check.
//
// After winning the test and set, the station drives its node ID onto
// HBUS-DATA through open-collector drivers (`iden` high). With several
// would-be masters the IDs combine as a wired OR, so at least one of them
// reads back a value different from its own ID. `idok` reports whether the
// low ID_W bits of the bus equal this node's ID.
//
// The bus is modelled in positive logic: the value a station contributes is
// ORed with the others by the bus model, which is what the inverted
// open-collector drive and the inverted comparison of the design amount to.
// `id_drv` is combinational; `idok` is combinational from the bus.
module hnet_tx_idcmp #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ID_W   = 8
) (
  input  logic [ID_W-1:0]   node_id,
  input  logic              iden,
  input  logic [DATA_W-1:0] bus_data,
  output logic [DATA_W-1:0] id_drv,
  output logic              idok
);
  assign id_drv = iden ? DATA_W'(node_id) : '0;
  assign idok   = (bus_data[ID_W-1:0] == node_id);
endmodule
