// tb_diag_mux: every LED mode 0-15 with random debug words: LA1 shows diag1
// in modes 0/4 and the JTAG debug word in modes 1/5, LA0 shows diag2 in
// modes 1/5 and the (one FASTCLK late) ADC word in mode 14; mode switch
// bit 7 forces both headers high.
module tb_diag_mux;
  logic fastclk = 0;
  logic [7:0] mode_sw;
  logic [15:0] diag1, diag2, diagadc, la0, la1, exp0, exp1, d3;
  logic [3:1] dvcenb, tdo, tdi, tms, tck;
  int checks = 0, failures = 0;

  diag_mux dut (.*);
  always #6 fastclk = ~fastclk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge fastclk);
      mode_sw = 8'($urandom) & 8'h7F;
      if (i % 10 == 0) mode_sw[7] = 1;
      diag1 = 16'($urandom); diag2 = 16'($urandom); diagadc = 16'($urandom);
      {dvcenb, tdo, tdi, tms, tck} = 15'($urandom);
      @(negedge fastclk);
      d3 = {|dvcenb, tdo[3], tdi[3], tms[3], tck[3], dvcenb[3], tdo[2], tdi[2], tms[2], tck[2],
            dvcenb[2], tdo[1], tdi[1], tms[1], tck[1], dvcenb[1]};
      case (mode_sw[3:0])
        4'd0, 4'd4: begin exp1 = diag1; exp0 = 0; end
        4'd1, 4'd5: begin exp1 = d3; exp0 = diag2; end
        4'd14:      begin exp1 = 0; exp0 = diagadc; end
        default:    begin exp1 = 0; exp0 = 0; end
      endcase
      if (mode_sw[7]) begin exp0 = '1; exp1 = '1; end
      checks++;
      if (la0 !== exp0 || la1 !== exp1) begin
        failures++;
        $display("FAIL: mode=%h la0=%h/%h la1=%h/%h", mode_sw, la0, exp0, la1, exp1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
