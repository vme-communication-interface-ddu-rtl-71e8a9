// sr4re: 4-bit serial-in parallel-out shift register with clock enable whose
// synchronous reset loads a single one (Q = 0001). The reset acts on the
// clock edge regardless of ce, as the schematic wires it to the S/R pins of
// FDSE/FDRE cells. With ce high each clock shifts sli into Q[0] and Q[n]
// into Q[n+1]. Feeding Q[3] back into sli makes a one-hot step sequencer.
module sr4re (
  input  logic       c,
  input  logic       ce,
  input  logic       clr,
  input  logic       sli,
  output logic [3:0] q
);
  always_ff @(posedge c)
    if (clr)     q <= 4'b0001;
    else if (ce) q <= {q[2:0], sli};
endmodule
