// sr16clre: 16-bit loadable shift register, shifting right (towards Q[0]),
// with clock enable and asynchronous clear. When ce is high: l=1 loads d,
// otherwise the register shifts right and sri enters Q[15]. clr clears all
// bits at once. Used to serialise VME data LSB-first onto TDI (Q[0]).
// Function from the macro's title block; the port names are this design's.
module sr16clre (
  input  logic        c,
  input  logic        ce,
  input  logic        clr,
  input  logic        l,
  input  logic        sri,
  input  logic [15:0] d,
  output logic [15:0] q
);
  always_ff @(posedge c or posedge clr)
    if (clr)     q <= '0;
    else if (ce) q <= l ? d : {sri, q[15:1]};
endmodule
