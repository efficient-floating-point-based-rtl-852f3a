// valid_delay: a LAT-stage shift register for a single valid bit, cleared by
// an active-low synchronous reset so that no stale word is ever reported as
// valid after reset. It runs alongside a delay_line that carries the data.
module valid_delay #(
  parameter int unsigned LAT = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  if (LAT == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [LAT-1:0] sr;
    always_ff @(posedge clk) begin
      if (!rst_n) sr <= '0;
      else        sr <= (sr << 1) | LAT'(d);
    end
    assign q = sr[LAT-1];
  end
endmodule
