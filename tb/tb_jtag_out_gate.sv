// tb_jtag_out_gate: exhaustive check of both output-gate variants against
// the gate equations (FPGA chain: AND-OR with RESTORE_IDLE; PROM chain:
// 3-state enable from DVCENB).
module tb_jtag_out_gate;
  logic dvcenb, tck, tms, tdi, restore_idle, sclk;
  logic f_tck, f_tms, f_tdi, f_oe, p_tck, p_tms, p_tdi, p_oe;
  int checks = 0, failures = 0;

  jtag_out_gate #(.TRISTATE(1'b0)) u_f (.dvcenb, .tck, .tms, .tdi, .restore_idle, .sclk,
    .otck(f_tck), .otms(f_tms), .otdi(f_tdi), .oe(f_oe));
  jtag_out_gate #(.TRISTATE(1'b1)) u_p (.dvcenb, .tck, .tms, .tdi, .restore_idle, .sclk,
    .otck(p_tck), .otms(p_tms), .otdi(p_tdi), .oe(p_oe));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {dvcenb, tck, tms, tdi, restore_idle, sclk} = 6'(v);
      #1;
      check(f_tck == ((dvcenb && tck) || (restore_idle && sclk)), $sformatf("fpga tck v=%0d", v));
      check(f_tms == ((dvcenb && tms) || restore_idle), $sformatf("fpga tms v=%0d", v));
      check(f_tdi == (dvcenb && tdi), $sformatf("fpga tdi v=%0d", v));
      check(f_oe == 1'b1, "fpga oe");
      check(p_oe == dvcenb, "prom oe");
      check(p_tck == (dvcenb && tck) && p_tms == (dvcenb && tms) && p_tdi == (dvcenb && tdi),
            $sformatf("prom pins v=%0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
