// tb_hnet_bus: bus resolution for four stations with random drives, compared
// with an independent per-bit model of wired-OR and tri-state lines.
module tb_hnet_bus;
  import hnet_pkg::*;
  localparam int N = 4;
  logic [N-1:0] actv_drv, collis_drv, dest_drv, decis_hold, xmt_en, eop_drv, dclk_drv;
  logic [N-1:0][15:0] data_drv, id_drv;
  hbus_ctl_t bus;
  logic [15:0] bus_data;
  logic bus_eop, bus_dclk;
  hnet_bus dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [15:0] ed; logic ea, ec, eds, edc, ee, ek; int m;
      actv_drv = N'($urandom); collis_drv = N'($urandom); dest_drv = N'($urandom);
      decis_hold = (t % 4 == 0) ? '0 : N'($urandom);
      m = $urandom_range(N);           // N: no master
      xmt_en = (m == N) ? '0 : N'(1 << m);
      eop_drv = N'($urandom); dclk_drv = N'($urandom);
      for (int i = 0; i < N; i++) begin
        data_drv[i] = 16'($urandom);
        id_drv[i] = ($urandom_range(3) == 0) ? {8'h0, 8'($urandom)} : '0;
      end
      #1;
      ea = 0; ec = 0; eds = 0; edc = 1; ed = 0; ee = 0; ek = 0;
      for (int i = 0; i < N; i++) begin
        if (actv_drv[i]) ea = 1;
        if (collis_drv[i]) ec = 1;
        if (dest_drv[i]) eds = 1;
        if (decis_hold[i]) edc = 0;
        ed = ed | id_drv[i];
      end
      if (m != N) begin ed = ed | data_drv[m]; ee = eop_drv[m]; ek = dclk_drv[m]; end
      check(bus.actv == ea && bus.collis == ec && bus.dest == eds, "wired-OR lines");
      check(bus.decis == edc, "HBUS-DECIS released only when no station holds it");
      check(bus_data == ed, $sformatf("data %h expected %h", bus_data, ed));
      check(bus_eop == ee && bus_dclk == ek, "EOP/DCLK from the master only");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
