// ms_pe: the matrix subtraction PE of opMMS, A22' = A22 - C with C = L21*U12
// arriving from the matrix-multiply array. The A22 operand of each result is
// read from memory when its token enters the multiply array and waits here,
// together with the address the result goes back to, in a FIFO of DEPTH
// entries; each arriving C pops one entry. The difference leaves LAT_SUB
// cycles later with its write address, ready for the memory's write port.
// DEPTH must cover the multiply array's latency (default 512 > 10*31).
// The FIFO pairing is this design's choice; the document names the PE only.
module ms_pe
  import blu_pkg::*;
#(
  parameter int unsigned EXP_W   = 11,
  parameter int unsigned MAN_W   = 52,
  parameter int unsigned AW      = 20,
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned LAT_SUB = 19
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push_i,      // A22 operand and its address
  input  logic [AW-1:0]         push_addr_i,
  input  logic [EXP_W+MAN_W:0]  push_dat_i,
  input  logic                  c_valid_i,   // product from the multiply array
  input  logic [EXP_W+MAN_W:0]  c_dat_i,
  output logic                  wr_en_o,     // A22' result
  output logic [AW-1:0]         wr_addr_o,
  output logic [EXP_W+MAN_W:0]  wr_dat_o,
  output logic [$clog2(DEPTH):0] level_o
);
  localparam int unsigned W  = 1 + EXP_W + MAN_W;
  localparam int unsigned PW = $clog2(DEPTH);

  logic [AW+W-1:0] fifo [DEPTH];
  logic [PW-1:0]   wp, rp;
  logic [PW:0]     cnt;
  logic [AW+W-1:0] head;

  assign head    = fifo[rp];
  assign level_o = cnt;

  always_ff @(posedge clk) begin
    if (push_i) fifo[wp] <= {push_addr_i, push_dat_i};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push_i)    wp <= wp + 1'b1;
      if (c_valid_i) rp <= rp + 1'b1;
      cnt <= cnt + (PW+1)'(push_i) - (PW+1)'(c_valid_i);
    end
  end

  fp_sub #(.EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(LAT_SUB)) u_sub (
    .clk(clk), .a(head[W-1:0]), .b(c_dat_i), .y(wr_dat_o));
  delay_line #(.W(AW), .LAT(LAT_SUB)) u_daddr (.clk(clk), .d(head[AW+W-1:W]), .q(wr_addr_o));
  valid_delay #(.LAT(LAT_SUB)) u_dval (.clk(clk), .rst_n(rst_n), .d(c_valid_i), .q(wr_en_o));

  // a product must find its operand waiting, and the FIFO must not overflow
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   c_valid_i |-> (cnt != '0 || push_i));
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   push_i |-> (int'(cnt) < DEPTH || c_valid_i));
endmodule
