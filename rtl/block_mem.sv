// block_mem: the memory bank that holds the n x n matrix: the input, the
// blocks being worked on and the results, which overwrite the input in
// place (combined L and U, unit diagonal of L not stored). Word (r, c) is at
// address r*NMAX + c. The bank has NRD read ports with one clock of read
// latency and NWR write ports; the engine uses read ports for the LU array
// stream, lane B of the multiply array, the A22 operands and the host, and
// write ports for LU array results, subtraction results and host loads.
// On the FPGA of the source document the matrix lives in external memory;
// this array stands in for it and is this design's own organisation.
// Writes to the same address in the same cycle are resolved in favour of the
// higher-numbered port; the engine never issues such a pair.
module block_mem #(
  parameter int unsigned W     = 64,
  parameter int unsigned NMAX  = 1000,
  parameter int unsigned NRD   = 4,
  parameter int unsigned NWR   = 3,
  parameter int unsigned AW    = $clog2(NMAX * NMAX)
) (
  input  logic          clk,
  input  logic          rd_en   [NRD],
  input  logic [AW-1:0] rd_addr [NRD],
  output logic [W-1:0]  rd_dat  [NRD],
  input  logic          wr_en   [NWR],
  input  logic [AW-1:0] wr_addr [NWR],
  input  logic [W-1:0]  wr_dat  [NWR]
);
  localparam int unsigned DEPTH = NMAX * NMAX;

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++)
      if (wr_en[p] && int'(wr_addr[p]) < DEPTH) mem[wr_addr[p]] <= wr_dat[p];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NRD; p++)
      if (rd_en[p]) rd_dat[p] <= (int'(rd_addr[p]) < DEPTH) ? mem[rd_addr[p]] : '0;
  end
endmodule
