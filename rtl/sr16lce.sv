// sr16lce: 16-bit serial-in parallel-out shift register, shifting right, with
// clock enable and asynchronous clear. On each enabled clock sri enters
// Q[15] and every bit moves one place towards Q[0]; after n shifts the last n
// serial bits sit in Q[15:16-n], the first of them lowest. Used to collect
// TDO. Function from the macro's title block; port names are this design's.
module sr16lce (
  input  logic        c,
  input  logic        ce,
  input  logic        clr,
  input  logic        sri,
  output logic [15:0] q
);
  always_ff @(posedge c or posedge clr)
    if (clr)     q <= '0;
    else if (ce) q <= {sri, q[15:1]};
endmodule
