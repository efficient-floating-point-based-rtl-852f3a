// block_lu_ctrl: the FSM that schedules block LU decomposition of an n x n
// matrix (n = nblk*B) held in block_mem, using the LU array for opLU, opL,
// opU and the multiply array plus subtraction PE for opMMS.
//
// For each iteration kb = 0 .. nblk-1, with r = nblk-1-kb blocks left:
//   LU     one stack: slot 0 = diagonal block (kb,kb) as opLU, slots 1..S-1
//          zero matrices (the diagonal block has no partner to stack with)
//   LUS    the r opL blocks (p,kb) and r opU blocks (kb,q), interleaved
//          L,U,L,U,..., packed S per stack; the last stack is padded with
//          zero matrices. Stacks follow each other with no gap.
//   DRAIN1 wait until the LU array has delivered its last result
//   MM_PRE / MM_SWEEP, for each block column q > kb: preload U12 = block
//          (kb,q) into the multiply array, then sweep all r*B rows of L21
//          (blocks (kb+1..,kb)) so that every block (p,q) gets
//          A(p,q) <- A(p,q) - L(p,kb) * U(kb,q)
//   DRAIN2 wait until the last subtraction result is written back
// Every stream word is issued one per clock: the read address goes to the
// memory, the tag is registered for one cycle and meets the read data.
// Results of the LU array are written back in place using a table of the
// block each (stack parity, slot) pair belongs to.
//
// Followed from the source document: the four operations, stacking with
// zero padding, pipelining opL with opU, and the order of the iterations.
// This design's own choices: phases run one after the other (opMMS of an
// iteration does not overlap the next iteration's opLU/opL/opU), the U12
// preload per block column, and the memory addressing.
module block_lu_ctrl
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
  parameter int unsigned AW      = $clog2(NMAX * NMAX),
  parameter int unsigned NBW     = $clog2(NMAX / B + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_i,
  input  logic [NBW-1:0]        nblk_i,
  output logic                  busy_o,
  output logic                  done_o,
  // memory read port for the LU stream
  output logic                  lu_rd_en_o,
  output logic [AW-1:0]         lu_rd_addr_o,
  input  logic [EXP_W+MAN_W:0]  lu_rd_dat_i,
  // LU array input and output
  output lu_tag_t               lu_in_tag_o,
  output logic [EXP_W+MAN_W:0]  lu_in_dat_o,
  input  lu_tag_t               lu_out_tag_i,
  input  logic [EXP_W+MAN_W:0]  lu_out_dat_i,
  // memory write port for LU results
  output logic                  lu_wr_en_o,
  output logic [AW-1:0]         lu_wr_addr_o,
  output logic [EXP_W+MAN_W:0]  lu_wr_dat_o,
  // memory read port for lane B (U12 preload and L21 rows)
  output logic                  mb_rd_en_o,
  output logic [AW-1:0]         mb_rd_addr_o,
  input  logic [EXP_W+MAN_W:0]  mb_rd_dat_i,
  // multiply array inputs
  output mm_atag_t              mm_a_tag_o,
  output mm_btag_t              mm_b_tag_o,
  output logic [EXP_W+MAN_W:0]  mm_b_dat_o,
  // memory read port for A22 operands, and push into the subtraction PE
  output logic                  a22_rd_en_o,
  output logic [AW-1:0]         a22_rd_addr_o,
  input  logic [EXP_W+MAN_W:0]  a22_rd_dat_i,
  output logic                  ms_push_o,
  output logic [AW-1:0]         ms_push_addr_o,
  output logic [EXP_W+MAN_W:0]  ms_push_dat_o,
  // event counters
  output logic [31:0]           stat_cycles_o,
  output logic [31:0]           stat_stacks_o,
  output logic [31:0]           stat_zero_o,
  output logic [31:0]           stat_oplu_o,
  output logic [31:0]           stat_opl_o,
  output logic [31:0]           stat_opu_o,
  output logic [31:0]           stat_opmms_o,
  output logic [31:0]           stat_preload_o
);
  localparam int unsigned LU_LAT  = 1 + (B - 1) * (LAT_MUL + LAT_SUB) + LAT_DIV;
  localparam int unsigned MM_LAT  = B * (LAT_MUL + LAT_SUB) + LAT_SUB;
  localparam int unsigned DRAIN1  = LU_LAT + 4;
  localparam int unsigned DRAIN2  = MM_LAT + 4;
  localparam int unsigned DW      = $clog2(((DRAIN1 > DRAIN2) ? DRAIN1 : DRAIN2) + 1);

  typedef enum logic [2:0] {
    ST_IDLE, ST_LU, ST_LUS, ST_DRAIN1, ST_MM_PRE, ST_MM_SWEEP, ST_DRAIN2
  } state_e;

  state_e         state;
  logic [NBW-1:0] nb, kb, q;
  logic [7:0]     cy, ci, cm;             // stream column, row, slot
  logic [15:0]    st;                     // stack number within LUS
  logic           par;                    // parity of the current stack
  logic [15:0]    g;                      // sweep row slot
  logic [7:0]     c;                      // position inside a row slot
  logic [DW-1:0]  wait_cnt;

  // block each (parity, slot) belongs to, for write-back
  logic [NBW-1:0] tab_brow [2][S];
  logic [NBW-1:0] tab_bcol [2][S];

  // ---------------- derived quantities ----------------
  logic [NBW-1:0] r;            // blocks left after the diagonal one
  logic [15:0]    nops, nstk;   // opL+opU count, stacks for them
  logic [15:0]    nrows;        // rows of the L21 sweep
  assign r     = nb - kb - 1'b1;
  assign nops  = 16'(2 * int'(r));
  assign nstk  = 16'((int'(nops) + S - 1) / S);
  assign nrows = 16'(int'(r) * B);

  function automatic logic [AW-1:0] addr_of(input int row, input int col);
    return AW'(row * NMAX + col);
  endfunction

  // slot contents of the stack being issued
  lu_op_e         s_op;
  logic [NBW-1:0] s_brow, s_bcol;
  always_comb begin
    int idx, t;
    idx = int'(st) * S + int'(cm);
    t   = idx / 2;
    s_op = OP_ZERO; s_brow = kb; s_bcol = kb;
    if (state == ST_LU) begin
      s_op = (cm == '0) ? OP_LU : OP_ZERO;
    end else if (state == ST_LUS && idx < int'(nops)) begin
      if (idx % 2 == 0) begin
        s_op = OP_L; s_brow = kb + NBW'(1 + t); s_bcol = kb;
      end else begin
        s_op = OP_U; s_brow = kb; s_bcol = kb + NBW'(1 + t);
      end
    end
  end

  logic issuing;
  assign issuing = (state == ST_LU) || (state == ST_LUS);

  // ---------------- main FSM ----------------
  logic last_word;
  assign last_word = (int'(cm) == S - 1) && (int'(ci) == B - 1) && (int'(cy) == B - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      nb <= '0; kb <= '0; q <= '0;
      cy <= '0; ci <= '0; cm <= '0; st <= '0; par <= 1'b0;
      g <= '0; c <= '0; wait_cnt <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        ST_IDLE: if (start_i && nblk_i != '0) begin
          nb <= nblk_i; kb <= '0; st <= '0;
          cy <= '0; ci <= '0; cm <= '0;
          state <= ST_LU;
        end
        ST_LU, ST_LUS: begin
          if (int'(cm) == S - 1) begin
            cm <= '0;
            if (int'(ci) == B - 1) begin
              ci <= '0;
              if (int'(cy) == B - 1) cy <= '0;
              else                   cy <= cy + 1'b1;
            end else ci <= ci + 1'b1;
          end else cm <= cm + 1'b1;
          if (last_word) begin
            par <= ~par;
            if (state == ST_LU) begin
              st <= '0;
              if (r == '0) begin state <= ST_DRAIN1; wait_cnt <= '0; end
              else           state <= ST_LUS;
            end else if (st + 1'b1 == nstk) begin
              state <= ST_DRAIN1; wait_cnt <= '0;
            end else st <= st + 1'b1;
          end
        end
        ST_DRAIN1: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (int'(wait_cnt) == DRAIN1) begin
            if (r == '0) begin
              state <= ST_IDLE; done_o <= 1'b1;
            end else begin
              q <= kb + 1'b1; ci <= '0; cy <= '0; state <= ST_MM_PRE;
            end
          end
        end
        ST_MM_PRE: begin
          if (int'(cy) == B - 1) begin
            cy <= '0;
            if (int'(ci) == B - 1) begin
              ci <= '0; g <= '0; c <= '0; state <= ST_MM_SWEEP;
            end else ci <= ci + 1'b1;
          end else cy <= cy + 1'b1;
        end
        ST_MM_SWEEP: begin
          if (int'(c) == B - 1) begin
            c <= '0;
            if (g == nrows) begin
              if (q + 1'b1 == nb) begin state <= ST_DRAIN2; wait_cnt <= '0; end
              else begin q <= q + 1'b1; state <= ST_MM_PRE; end
            end else g <= g + 1'b1;
          end else c <= c + 1'b1;
        end
        ST_DRAIN2: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (int'(wait_cnt) == DRAIN2) begin
            kb <= kb + 1'b1; st <= '0; state <= ST_LU;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy_o = (state != ST_IDLE);

  // ---------------- LU stream: read, then tag meets data ----------------
  always_comb begin
    lu_rd_en_o   = issuing && (s_op != OP_ZERO);
    lu_rd_addr_o = addr_of(int'(s_brow) * B + int'(ci), int'(s_bcol) * B + int'(cy));
  end

  lu_tag_t issue_tag;
  always_comb begin
    issue_tag       = '0;
    issue_tag.valid = issuing;
    issue_tag.op    = s_op;
    issue_tag.par   = par;
    issue_tag.slot  = cm;
    issue_tag.row   = ci;
    issue_tag.col   = cy;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) lu_in_tag_o <= '0;
    else        lu_in_tag_o <= issue_tag;
    if (issuing) begin
      tab_brow[par][cm] <= s_brow;
      tab_bcol[par][cm] <= s_bcol;
    end
  end
  assign lu_in_dat_o = (lu_in_tag_o.op == OP_ZERO) ? '0 : lu_rd_dat_i;

  // write-back of LU array results
  always_comb begin
    lu_wr_en_o   = lu_out_tag_i.valid && (lu_out_tag_i.op != OP_ZERO);
    lu_wr_addr_o = addr_of(int'(tab_brow[lu_out_tag_i.par][lu_out_tag_i.slot]) * B +
                           int'(lu_out_tag_i.row),
                           int'(tab_bcol[lu_out_tag_i.par][lu_out_tag_i.slot]) * B +
                           int'(lu_out_tag_i.col));
    lu_wr_dat_o  = lu_out_dat_i;
  end

  // ---------------- opMMS streams ----------------
  mm_btag_t btag_n;
  mm_atag_t atag_n;
  logic     a22_n;
  always_comb begin
    btag_n = '0; atag_n = '0; a22_n = 1'b0;
    mb_rd_addr_o  = '0;
    a22_rd_addr_o = '0;
    if (state == ST_MM_PRE) begin
      btag_n.valid = 1'b1; btag_n.kind = MB_U; btag_n.k = ci; btag_n.j = cy;
      mb_rd_addr_o = addr_of(int'(kb) * B + int'(ci), int'(q) * B + int'(cy));
    end else if (state == ST_MM_SWEEP) begin
      if (g < nrows) begin
        btag_n.valid = 1'b1; btag_n.kind = MB_L; btag_n.k = c;
        mb_rd_addr_o = addr_of((int'(kb) + 1) * B + int'(g), int'(kb) * B + int'(c));
      end
      if (g != '0) begin
        atag_n.valid = 1'b1; atag_n.first = (c == '0);
        atag_n.row = g - 1'b1; atag_n.col = c;
        a22_n = 1'b1;
        a22_rd_addr_o = addr_of((int'(kb) + 1) * B + int'(g) - 1, int'(q) * B + int'(c));
      end
    end
    mb_rd_en_o  = btag_n.valid;
    a22_rd_en_o = a22_n;
  end

  logic [AW-1:0] a22_addr_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mm_a_tag_o <= '0; mm_b_tag_o <= '0; ms_push_o <= 1'b0;
    end else begin
      mm_a_tag_o <= atag_n; mm_b_tag_o <= btag_n; ms_push_o <= a22_n;
    end
    a22_addr_q <= a22_rd_addr_o;
  end
  assign mm_b_dat_o     = mb_rd_dat_i;
  assign ms_push_addr_o = a22_addr_q;
  assign ms_push_dat_o  = a22_rd_dat_i;

  // ---------------- event counters ----------------
  always_ff @(posedge clk) begin
    if (!rst_n || (state == ST_IDLE && start_i)) begin
      stat_cycles_o <= '0; stat_stacks_o <= '0; stat_zero_o <= '0; stat_oplu_o <= '0;
      stat_opl_o <= '0; stat_opu_o <= '0; stat_opmms_o <= '0; stat_preload_o <= '0;
    end else begin
      if (busy_o) stat_cycles_o <= stat_cycles_o + 1;
      if (issuing && ci == '0 && cy == '0) begin
        if (cm == '0) stat_stacks_o <= stat_stacks_o + 1;
        unique case (s_op)
          OP_ZERO: stat_zero_o <= stat_zero_o + 1;
          OP_LU:   stat_oplu_o <= stat_oplu_o + 1;
          OP_L:    stat_opl_o  <= stat_opl_o + 1;
          default: stat_opu_o  <= stat_opu_o + 1;
        endcase
      end
      if (state == ST_MM_PRE && ci == '0 && cy == '0) stat_preload_o <= stat_preload_o + 1;
      if (state == ST_MM_SWEEP && g < nrows && int'(g) % B == 0 && c == '0)
        stat_opmms_o <= stat_opmms_o + 1;
    end
  end
endmodule
