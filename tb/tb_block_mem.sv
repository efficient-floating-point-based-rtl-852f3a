// tb_block_mem: self-checking testbench for the memory bank, reduced to a
// 16 x 16 matrix with 2 read and 2 write ports. Random writes on both write
// ports (never to the same address in one cycle) and random reads on both
// read ports are compared with a model array; read data must appear one
// cycle after the address.
module tb_block_mem;
  localparam int NMAX = 16, AW = 8, W = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          rd_en [2];
  logic [AW-1:0] rd_addr [2];
  logic [W-1:0]  rd_dat [2];
  logic          wr_en [2];
  logic [AW-1:0] wr_addr [2];
  logic [W-1:0]  wr_dat [2];
  int checks = 0, failures = 0;

  block_mem #(.W(W), .NMAX(NMAX), .NRD(2), .NWR(2), .AW(AW)) u_dut (
    .clk, .rd_en, .rd_addr, .rd_dat, .wr_en, .wr_addr, .wr_dat);

  logic [W-1:0] model [NMAX*NMAX];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expv [2];
    bit           expect_rd [2];
    for (int p = 0; p < 2; p++) begin
      rd_en[p] = 1'b0; wr_en[p] = 1'b0; rd_addr[p] = '0; wr_addr[p] = '0; wr_dat[p] = '0;
    end
    // fill every word first
    for (int a = 0; a < NMAX * NMAX; a += 2) begin
      for (int p = 0; p < 2; p++) begin
        wr_en[p] = 1'b1; wr_addr[p] = AW'(a + p); wr_dat[p] = {$urandom, $urandom};
        model[a + p] = wr_dat[p];
      end
      @(posedge clk); #1;
    end
    for (int t = 0; t < 2000; t++) begin
      for (int p = 0; p < 2; p++) begin
        rd_en[p] = ($urandom_range(0, 1) == 1); rd_addr[p] = AW'($urandom);
        expect_rd[p] = rd_en[p]; expv[p] = model[rd_addr[p]];
        wr_en[p] = ($urandom_range(0, 1) == 1); wr_addr[p] = AW'($urandom);
        wr_dat[p] = {$urandom, $urandom};
      end
      if (wr_addr[0] == wr_addr[1]) wr_en[1] = 1'b0;
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) if (wr_en[p]) model[wr_addr[p]] = wr_dat[p];
      for (int p = 0; p < 2; p++)
        if (expect_rd[p]) begin
          checks++;
          if (rd_dat[p] !== expv[p]) begin
            failures++;
            if (failures < 10) $display("port %0d: got %h expected %h", p, rd_dat[p], expv[p]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
