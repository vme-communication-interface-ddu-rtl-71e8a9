// vme_irq: VME interrupt-acknowledge logic for interrupt level 1.
// During an IACK cycle the acknowledge daisy chain enters on iack_in_n. The
// board claims the cycle (my_irq) when it is requesting IRQ1 (irq1_n low),
// both data strobes are low and the acknowledged level on ADRS[3:1] is 001
// (MAY_BE_MINE); otherwise it passes the chain on through iack_out_n. The
// claim is captured on FASTCLK in the cycle after iack_in_n and as_n are both
// first seen low (EN_MY_IRQ), and my_irq is cleared as soon as a data strobe
// is released or rst is high. All gates and flip-flops follow the IRQ
// schematic; my_irq is then used by the top to answer the IACK cycle.
module vme_irq (
  input  logic       fastclk,
  input  logic       rst,
  input  logic       irq1_n,     // this board's IRQ1 request, active low
  input  logic       iack_in_n,
  input  logic       as_n,
  input  logic       ds0_n,
  input  logic       ds1_n,
  input  logic [3:1] adrs,
  output logic       iack_out_n,
  output logic       my_irq
);
  logic good_irq1, may_be_mine, en_my_irq_1, en_my_irq_0, en_my_irq, vme_irq_rst;

  assign good_irq1   = adrs[1] & ~adrs[2] & ~adrs[3];
  assign may_be_mine = ~(irq1_n | ds0_n | ds1_n | ~good_irq1);
  assign iack_out_n  = iack_in_n | as_n | may_be_mine;
  assign en_my_irq_1 = ~(iack_in_n | as_n);
  assign en_my_irq   = en_my_irq_0 & ~as_n;
  assign vme_irq_rst = ds0_n | ds1_n | rst;

  always_ff @(posedge fastclk or posedge vme_irq_rst)
    if (vme_irq_rst) en_my_irq_0 <= 1'b0;
    else             en_my_irq_0 <= en_my_irq_1;

  always_ff @(posedge fastclk or posedge vme_irq_rst)
    if (vme_irq_rst)    my_irq <= 1'b0;
    else if (en_my_irq) my_irq <= may_be_mine;
endmodule
