// dataflash_model: behavioural serial flash used by the testbenches.
// SPI mode 0, MSB first. Opcodes: D7h returns the status byte STATUS
// (bits 7-0: ready, compare, 0, 0, 1, 1, x, x);
// 82h + 24-bit address + data bits stores up to 48 data bits for the page
// in the address bits [19:9]; D2h + 24-bit address + 32 dummy bits then
// returns the stored bits of that page, the last-written bit last.
// Pages are kept as 48-bit words holding the bits right aligned together
// with the number of bits written. so_q changes on the falling clock.
module dataflash_model #(
  parameter logic [7:0] STATUS = 8'h8D
) (
  input  logic cs_n,
  input  logic sck,
  input  logic si,
  output logic so
);
  logic [7:0]  op;
  logic [23:0] adr;
  int unsigned nin;
  logic [47:0] pdata [8];
  int unsigned plen  [8];
  logic [47:0] outsr;
  logic [47:0] wbuf;
  int unsigned wlen;
  int unsigned n_prog = 0, n_read = 0, n_stat = 0;

  initial begin
    for (int i = 0; i < 8; i++) begin pdata[i] = '0; plen[i] = 0; end
    so = 1'b0;
  end

  always @(negedge cs_n) begin
    nin = 0; op = '0; adr = '0; wbuf = '0; wlen = 0; outsr = '0; so = 1'b0;
  end

  always @(posedge cs_n) begin
    if (op == 8'h82 && nin > 32) begin
      pdata[adr[11:9]] = wbuf;
      plen[adr[11:9]]  = wlen;
      n_prog++;
    end
  end

  always @(posedge sck) if (!cs_n) begin
    if (nin < 8) op = {op[6:0], si};
    else if (nin < 32) adr = {adr[22:0], si};
    else if (op == 8'h82) begin wbuf = {wbuf[46:0], si}; wlen++; end
    nin++;
    if (nin == 8 && op == 8'hD7) begin outsr = {STATUS, 40'b0}; n_stat++; end
    if (nin == 64 && op == 8'hD2) begin
      outsr = pdata[adr[11:9]] << (48 - plen[adr[11:9]]);
      n_read++;
    end
  end

  always @(negedge sck) if (!cs_n) begin
    if ((op == 8'hD7 && nin >= 8) || (op == 8'hD2 && nin >= 64)) begin
      so    = outsr[47];
      outsr = {outsr[46:0], 1'b0};
    end
  end
endmodule
