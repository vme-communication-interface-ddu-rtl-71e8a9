// tb_vme_addr_decode: random and directed addresses against an independent
// reference of the address format (slot/type/device/command fields, the
// JTAG one-hot device lines and the read/write rules).
module tb_vme_addr_decode;
  logic [23:0] adr;
  logic [4:0]  ga;
  logic        write;
  logic slot_hit, bcast, jtag_sel, ser_sel, par_sel, access_ok;
  logic [13:0] jtag_dev;
  logic [9:0]  jtag_cmd;
  logic [3:0]  dev, ser_cmd;
  logic [7:0]  par_cmd;
  int checks = 0, failures = 0;

  vme_addr_decode dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s adr=%h w=%0d", msg, adr, write); end
  endtask

  function automatic bit ref_ok(input logic [23:0] a, input logic w);
    int t = a[18:16], d = a[15:12];
    if (t == 0) return 1;
    if (t == 4) begin
      if (d >= 8) return w;
      if (d == 4) return (a[5:2] >= 9) ? w : !w;
      return !w;
    end
    if (t == 3) begin
      if (d < 8) return !w;
      return a[9] ? w : !w;
    end
    return 0;
  endfunction

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      ga = 5'd7;
      adr = 24'($urandom);
      if (i % 4 == 0) adr[23:19] = ga;
      if (i % 9 == 0) adr[23:19] = 5'd28;
      write = $urandom;
      #1;
      check(slot_hit == (adr[23:19] == 5'd7 || adr[23:19] == 5'd28), "slot_hit");
      check(bcast == (adr[23:19] == 5'd28), "bcast");
      check(jtag_sel == (adr[18:16] == 3'b000), "jtag_sel");
      check(ser_sel == (adr[18:16] == 3'b100), "ser_sel");
      check(par_sel == (adr[18:16] == 3'b011), "par_sel");
      check(dev == adr[15:12], "dev");
      check(jtag_cmd == adr[11:2] && ser_cmd == adr[5:2] && par_cmd == adr[9:2], "commands");
      for (int k = 0; k < 14; k++)
        check(jtag_dev[k] == (adr[18:16] == 0 && adr[15:12] == k), $sformatf("jtag_dev[%0d]", k));
      check(access_ok == ref_ok(adr, write), "access_ok");
    end
    // directed: serial device 4, command 9 = program page 1 (write only)
    ga = 5'd3; adr = {5'd3, 3'b100, 4'h4, 6'b0, 4'h9, 2'b00}; write = 1; #1;
    check(slot_hit && ser_sel && dev == 4 && ser_cmd == 9 && access_ok, "directed serial program");
    write = 0; #1; check(!access_ok, "directed serial program read refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
