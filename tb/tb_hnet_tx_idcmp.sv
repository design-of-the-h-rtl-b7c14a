// tb_hnet_tx_idcmp: ID drive and read-back compare. Random node IDs are put
// on a modelled wired-OR bus alone or together with another station's ID;
// IDOK must be high exactly when the OR equals this node's ID (the worked
// example: IDs 3 and 7 give 7, so node 7 reads OK and node 3 does not).
module tb_hnet_tx_idcmp;
  logic [7:0]  node_id;
  logic        iden;
  logic [15:0] bus_data, id_drv;
  logic        idok;
  hnet_tx_idcmp dut (.node_id, .iden, .bus_data, .id_drv, .idok);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [7:0] other;
    // example from the design description
    node_id = 8'd3; iden = 1; #1; bus_data = id_drv | 16'd7; #1;
    check(!idok, "ID 3 with 7 on the bus: collision");
    node_id = 8'd7; #1; bus_data = id_drv | 16'd3; #1;
    check(idok, "ID 7 with 3 on the bus: reads back 7");
    for (int i = 0; i < 200; i++) begin
      node_id = 8'($urandom); other = 8'($urandom); iden = 1'($urandom);
      #1;
      check(id_drv == (iden ? {8'h00, node_id} : 16'h0), "ID drive");
      bus_data = id_drv | ((i % 3 == 0) ? 16'h0 : {8'h00, other});
      #1;
      check(idok == (bus_data[7:0] == node_id), $sformatf("IDOK id=%h bus=%h", node_id, bus_data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
