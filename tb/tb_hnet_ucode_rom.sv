// tb_hnet_ucode_rom: checks every ROM location of the transmit microcode
// against the field-by-field form of the program (control bits from /XTCLR
// down to IDEN, branch select, next address) and decodes a few words by
// meaning: which input each conditional step branches on and where it goes.
module tb_hnet_ucode_rom;
  import hnet_pkg::*;
  logic [4:0] addr;
  logic [15:0] data;
  uinstr_t u;
  assign u = uinstr_t'(data);
  hnet_ucode_rom dut (.addr, .data);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // {xtclr_n chclk xmt_n tst_set release_n collis dest iden} , cb , pc
  function automatic logic [15:0] f(input logic [7:0] csd, input logic [2:0] cb, input logic [4:0] pc);
    return {csd, cb, pc};
  endfunction

  logic [15:0] exp_w [32];
  initial begin
    foreach (exp_w[i]) exp_w[i] = '0;
    exp_w[5'h00] = f(8'b1010_0000, 3'd1, 5'h03);
    exp_w[5'h01] = f(8'b1010_0000, 3'd1, 5'h03);
    exp_w[5'h02] = f(8'b1110_1000, 3'd0, 5'h04);
    exp_w[5'h03] = f(8'b1010_0000, 3'd1, 5'h02);
    exp_w[5'h04] = f(8'b1011_1000, 3'd4, 5'h07);
    exp_w[5'h05] = f(8'b1011_1000, 3'd4, 5'h07);
    exp_w[5'h07] = f(8'b1010_1000, 3'd0, 5'h08);
    exp_w[5'h08] = f(8'b1010_1001, 3'd0, 5'h0A);
    exp_w[5'h09] = f(8'b1011_1000, 3'd4, 5'h07);
    exp_w[5'h0A] = f(8'b1010_1001, 3'd7, 5'h0B);
    exp_w[5'h0B] = f(8'b1010_1001, 3'd0, 5'h0C);
    exp_w[5'h0C] = f(8'b1010_0101, 3'd5, 5'h0F);
    exp_w[5'h0D] = f(8'b1010_1001, 3'd6, 5'h12);
    exp_w[5'h0E] = f(8'b1010_1000, 3'd0, 5'h10);
    exp_w[5'h0F] = f(8'b1010_0101, 3'd5, 5'h0E);
    exp_w[5'h10] = f(8'b1011_1000, 3'd4, 5'h07);
    exp_w[5'h11] = f(8'b1011_1000, 3'd4, 5'h07);
    exp_w[5'h12] = f(8'b1010_1001, 3'd0, 5'h14);
    exp_w[5'h14] = f(8'b1010_1000, 3'd0, 5'h16);
    exp_w[5'h15] = f(8'b1010_0101, 3'd5, 5'h0F);
    exp_w[5'h16] = f(8'b1000_1010, 3'd0, 5'h17);
    exp_w[5'h17] = f(8'b1000_1000, 3'd6, 5'h18);
    exp_w[5'h18] = f(8'b1000_1000, 3'd0, 5'h1A);
    exp_w[5'h1A] = f(8'b1000_1000, 3'd3, 5'h1C);
    exp_w[5'h1B] = f(8'b1010_0101, 3'd5, 5'h0F);
    exp_w[5'h1C] = f(8'b1000_1000, 3'd3, 5'h1C);
    exp_w[5'h1D] = f(8'b0010_0000, 3'd0, 5'h00);
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a); #1;
      check(data == exp_w[a], $sformatf("ROM[%h] = %h, expected %h", a, data, exp_w[a]));
    end
    // meaning of a few words
    addr = 5'h04; #1;
    check(u.cb == CB_MASTER_N && u.csd.tst_set, "04 raises TST&SET, branches on /MASTER");
    addr = 5'h0A; #1;
    check(u.cb == CB_IDOK && u.csd.iden, "0A drives ID, branches on IDOK");
    addr = 5'h16; #1;
    check(!u.csd.xmt_n && u.csd.dest, "16 enables FIFO data and DEST");
    addr = 5'h1D; #1;
    check(!u.csd.xtclr_n && !u.csd.release_n && u.pc == 0,
          "1D clears FIFO, releases network, returns to 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
