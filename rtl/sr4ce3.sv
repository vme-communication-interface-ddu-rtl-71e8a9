// sr4ce3: 4-bit serial-in parallel-out shift register with clock enable.
// The asynchronous clr input presets Q[0] and clears Q[3:1] (pattern 0001);
// with ce high each clock shifts sli into Q[0] and Q[n] into Q[n+1].
// Follows the macro schematic (one FDPE then three FDCE).
module sr4ce3 (
  input  logic       c,
  input  logic       ce,
  input  logic       clr,
  input  logic       sli,
  output logic [3:0] q
);
  always_ff @(posedge c or posedge clr)
    if (clr)     q <= 4'b0001;
    else if (ce) q <= {q[2:0], sli};
endmodule
