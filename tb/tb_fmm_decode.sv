// tb_fmm_decode: the five FMM codes against the LED table (Ready green on;
// Warning green on + yellow blink; lost sync both blink; Busy yellow on;
// Error yellow blink), plus an exhaustive check of the set_* merge.
module tb_fmm_decode;
  logic [3:0] rl_fmm;
  logic fmm_warn, fmm_sync, fmm_busy, vme_not_ready;
  logic set_warn, set_sync, set_busy, set_rdy, ok2fmm, grn_flash, busy2fmm, blink_yel;
  int checks = 0, failures = 0;

  fmm_decode dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s code=%b", msg, rl_fmm); end
  endtask

  task automatic led(input logic [3:0] code, input bit g_on, g_bl, y_on, y_bl);
    rl_fmm = code; #1;
    check(ok2fmm == g_on, "green on");
    check(grn_flash == g_bl, "green blink");
    check(busy2fmm == y_on, "yellow on");
    check(blink_yel == y_bl, "yellow blink");
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {fmm_warn, fmm_sync, fmm_busy, vme_not_ready} = '0;
    led(4'b1000, 1, 0, 0, 0);
    led(4'b0001, 1, 0, 0, 1);
    led(4'b0010, 0, 1, 0, 1);
    led(4'b0100, 0, 0, 1, 0);
    led(4'b1100, 0, 0, 0, 1);
    for (int v = 0; v < 256; v++) begin
      {rl_fmm, fmm_warn, fmm_sync, fmm_busy, vme_not_ready} = 8'(v);
      #1;
      check(set_warn == (rl_fmm[0] | fmm_warn), "set_warn");
      check(set_sync == (rl_fmm[1] | fmm_sync), "set_sync");
      check(set_busy == (rl_fmm[2] | fmm_busy), "set_busy");
      check(set_rdy == !(rl_fmm[0] | fmm_warn | rl_fmm[1] | fmm_sync | rl_fmm[2] | fmm_busy | vme_not_ready), "set_rdy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
