// block_lu_top: floating-point block LU decomposition engine (no pivoting).
// An n x n matrix A (n = nblk*B, at most NMAX) is factored in place into a
// unit lower triangular L and an upper triangular U by working on B x B
// blocks: per iteration the diagonal block is factored (opLU), the blocks
// below it become L21 (opL) and those to its right U12 (opU), and the
// trailing matrix is updated, A22 <- A22 - L21*U12 (opMMS).
//
// Parts: a circular LU array of B PEs (divider PE plus B-1 multiply and
// subtract PEs) that works on stacks of S blocks to hide the floating-point
// pipeline latencies, a linear matrix-multiply array of B PEs followed by a
// matrix subtraction PE, a memory bank holding the matrix, and the
// scheduling FSM. Defaults follow the double-precision design of the source
// document: 64-bit words, B = 10, pipeline depths 12 (multiplier),
// 19 (subtractor), 32 (divider), matrices up to NMAX = 1000. S = 32 is the
// smallest stack above the 31-cycle multiplier plus subtractor latency.
// For the source's single-precision engines set EXP_W = 8, MAN_W = 23 and
// USE_RECIP = 1: division is then done by a table reciprocator and a
// multiplier (fp_div_recip), LAT_DIV being their combined depth.
//
// Host interface: while idle, write matrix words through host_wr_* (address
// row*NMAX + col) and read results through host_rd_* (one cycle latency).
// Pulse start with nblk set; busy stays high until the one-cycle done pulse.
// A run with r = nblk-1 takes about
//   sum over iterations of  S*B*B*(1 + ceil(2r/S)) + r*(B*B + (r*B+1)*B)
// cycles plus pipeline drains (see README). stat_* count cycles, stacks,
// zero-matrix slots, opLU/opL/opU blocks, opMMS block updates and U12
// preloads of the last run.
module block_lu_top
  import blu_pkg::*;
#(
  parameter int unsigned EXP_W   = 11,
  parameter int unsigned MAN_W   = 52,
  parameter int unsigned B       = 10,
  parameter int unsigned S       = 32,
  parameter int unsigned NMAX    = 1000,
  parameter int unsigned LAT_MUL = 12,
  parameter int unsigned LAT_SUB = 19,
  parameter int unsigned LAT_DIV = 32,
  parameter bit          USE_RECIP = 1'b0,  // single-precision divider, see lu_pe1
  parameter int unsigned AW      = $clog2(NMAX * NMAX),
  parameter int unsigned NBW     = $clog2(NMAX / B + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NBW-1:0]        nblk,
  output logic                  busy,
  output logic                  done,
  input  logic                  host_wr_en,
  input  logic [AW-1:0]         host_wr_addr,
  input  logic [EXP_W+MAN_W:0]  host_wr_dat,
  input  logic                  host_rd_en,
  input  logic [AW-1:0]         host_rd_addr,
  output logic [EXP_W+MAN_W:0]  host_rd_dat,
  output logic [31:0]           stat_cycles,
  output logic [31:0]           stat_stacks,
  output logic [31:0]           stat_zero,
  output logic [31:0]           stat_oplu,
  output logic [31:0]           stat_opl,
  output logic [31:0]           stat_opu,
  output logic [31:0]           stat_opmms,
  output logic [31:0]           stat_preload
);
  localparam int unsigned W = 1 + EXP_W + MAN_W;

  // memory ports: read 0 LU stream, 1 lane B, 2 A22, 3 host;
  //               write 0 LU results, 1 subtraction results, 2 host
  logic          rd_en   [4];
  logic [AW-1:0] rd_addr [4];
  logic [W-1:0]  rd_dat  [4];
  logic          wr_en   [3];
  logic [AW-1:0] wr_addr [3];
  logic [W-1:0]  wr_dat  [3];

  lu_tag_t      lu_in_tag, lu_out_tag;
  logic [W-1:0] lu_in_dat, lu_out_dat;
  mm_atag_t     mm_a_tag, mm_c_tag;
  mm_btag_t     mm_b_tag;
  logic [W-1:0] mm_b_dat, mm_c_dat;
  logic         ms_push;
  logic [AW-1:0] ms_push_addr;
  logic [W-1:0] ms_push_dat;
  logic [$clog2(512):0] ms_level;

  block_lu_ctrl #(.EXP_W(EXP_W), .MAN_W(MAN_W), .B(B), .S(S), .NMAX(NMAX),
                  .LAT_MUL(LAT_MUL), .LAT_SUB(LAT_SUB), .LAT_DIV(LAT_DIV),
                  .AW(AW), .NBW(NBW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start_i(start), .nblk_i(nblk),
    .busy_o(busy), .done_o(done),
    .lu_rd_en_o(rd_en[0]), .lu_rd_addr_o(rd_addr[0]), .lu_rd_dat_i(rd_dat[0]),
    .lu_in_tag_o(lu_in_tag), .lu_in_dat_o(lu_in_dat),
    .lu_out_tag_i(lu_out_tag), .lu_out_dat_i(lu_out_dat),
    .lu_wr_en_o(wr_en[0]), .lu_wr_addr_o(wr_addr[0]), .lu_wr_dat_o(wr_dat[0]),
    .mb_rd_en_o(rd_en[1]), .mb_rd_addr_o(rd_addr[1]), .mb_rd_dat_i(rd_dat[1]),
    .mm_a_tag_o(mm_a_tag), .mm_b_tag_o(mm_b_tag), .mm_b_dat_o(mm_b_dat),
    .a22_rd_en_o(rd_en[2]), .a22_rd_addr_o(rd_addr[2]), .a22_rd_dat_i(rd_dat[2]),
    .ms_push_o(ms_push), .ms_push_addr_o(ms_push_addr), .ms_push_dat_o(ms_push_dat),
    .stat_cycles_o(stat_cycles), .stat_stacks_o(stat_stacks), .stat_zero_o(stat_zero),
    .stat_oplu_o(stat_oplu), .stat_opl_o(stat_opl), .stat_opu_o(stat_opu),
    .stat_opmms_o(stat_opmms), .stat_preload_o(stat_preload));

  lu_array #(.EXP_W(EXP_W), .MAN_W(MAN_W), .B(B), .S(S), .LAT_MUL(LAT_MUL),
             .LAT_SUB(LAT_SUB), .LAT_DIV(LAT_DIV), .USE_RECIP(USE_RECIP)) u_lu (
    .clk(clk), .rst_n(rst_n), .in_tag_i(lu_in_tag), .in_dat_i(lu_in_dat),
    .out_tag_o(lu_out_tag), .out_dat_o(lu_out_dat));

  mm_array #(.EXP_W(EXP_W), .MAN_W(MAN_W), .B(B), .LAT_MUL(LAT_MUL),
             .LAT_SUB(LAT_SUB)) u_mm (
    .clk(clk), .rst_n(rst_n), .a_tag_i(mm_a_tag), .b_tag_i(mm_b_tag), .b_dat_i(mm_b_dat),
    .c_tag_o(mm_c_tag), .c_dat_o(mm_c_dat));

  ms_pe #(.EXP_W(EXP_W), .MAN_W(MAN_W), .AW(AW), .DEPTH(512), .LAT_SUB(LAT_SUB)) u_ms (
    .clk(clk), .rst_n(rst_n),
    .push_i(ms_push), .push_addr_i(ms_push_addr), .push_dat_i(ms_push_dat),
    .c_valid_i(mm_c_tag.valid), .c_dat_i(mm_c_dat),
    .wr_en_o(wr_en[1]), .wr_addr_o(wr_addr[1]), .wr_dat_o(wr_dat[1]),
    .level_o(ms_level));

  assign rd_en[3]   = host_rd_en;
  assign rd_addr[3] = host_rd_addr;
  assign host_rd_dat = rd_dat[3];
  assign wr_en[2]   = host_wr_en;
  assign wr_addr[2] = host_wr_addr;
  assign wr_dat[2]  = host_wr_dat;

  block_mem #(.W(W), .NMAX(NMAX), .NRD(4), .NWR(3), .AW(AW)) u_mem (
    .clk(clk), .rd_en(rd_en), .rd_addr(rd_addr), .rd_dat(rd_dat),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_dat(wr_dat));
endmodule
