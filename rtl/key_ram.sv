// key_ram: round-key store, ROWS rows of one 128-bit round key each
// (15 rows hold the AES256 schedule, AES128 uses rows 0..10). The key
// expander writes one 32-bit word per clock (row waddr, column wword, column
// 0 in bits [127:96]); the transformer reads one whole round key through an
// asynchronous read port, which lets the control unit walk the rows forward
// for encryption and backward for decryption. The array has no reset: every
// row is written by key expansion before it is read.
module key_ram #(
  parameter int unsigned ROWS = 15,
  parameter int unsigned AW   = 4
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [1:0]    wword,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [127:0]  rdata
);
  logic [127:0] mem [ROWS];

  always_ff @(posedge clk)
    if (we && (waddr < AW'(ROWS)))
      mem[waddr][127 - 32*wword -: 32] <= wdata;

  assign rdata = (raddr < AW'(ROWS)) ? mem[raddr] : '0;
endmodule
