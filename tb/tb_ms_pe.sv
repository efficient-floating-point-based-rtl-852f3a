// tb_ms_pe: self-checking testbench for the matrix subtraction PE (FIFO of
// 8 entries, subtractor 3 stages). A22 operands with their addresses are
// pushed ahead of the products, with a varying gap, and each result must be
// A22 - C in double precision with the matching address, LAT_SUB cycles
// after its product arrived, in order.
module tb_ms_pe;
  localparam int LS = 3, AW = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, push, cv, wen;
  logic [AW-1:0] paddr, waddr;
  logic [63:0] pdat, cdat, wdat;
  logic [3:0] level;
  int checks = 0, failures = 0;

  ms_pe #(.AW(AW), .DEPTH(8), .LAT_SUB(LS)) u_dut (
    .clk, .rst_n, .push_i(push), .push_addr_i(paddr), .push_dat_i(pdat),
    .c_valid_i(cv), .c_dat_i(cdat), .wr_en_o(wen), .wr_addr_o(waddr), .wr_dat_o(wdat),
    .level_o(level));

  typedef struct { logic [AW-1:0] a; logic [63:0] d; int due; } item_t;
  item_t expq[$];
  real   a22q[$];
  logic [AW-1:0] addrq[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && wen) begin
      item_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = expq.pop_front();
        if (waddr !== e.a || wdat !== e.d || cyc != e.due) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %0d %h expected %0d %h at %0d",
                                      cyc, waddr, wdat, e.a, e.d, e.due);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npush = 0, npop = 0;
    rst_n = 1'b0; push = 1'b0; cv = 1'b0; paddr = '0; pdat = '0; cdat = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      push = (npush < 100) && (npush - npop < 6) && ($urandom_range(0, 3) != 0);
      cv   = (npop < npush) && ($urandom_range(0, 2) != 0);
      if (push) begin
        real v;
        v = (real'($urandom_range(0, 100000)) - 50000.0) / 333.0;
        paddr = AW'($urandom); pdat = $realtobits(v);
        a22q.push_back(v); addrq.push_back(paddr);
      end
      if (cv) begin
        item_t e;
        real c;
        c = (real'($urandom_range(0, 100000)) - 50000.0) / 777.0;
        cdat = $realtobits(c);
        e.a = addrq.pop_front(); e.d = $realtobits(a22q.pop_front() - c); e.due = cyc + LS;
        expq.push_back(e);
      end
      @(posedge clk); #1;
      if (push) npush++;
      if (cv) npop++;
      push = 1'b0; cv = 1'b0;
    end
    repeat (LS + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0 || npop != npush) begin
      failures++; $display("%0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
