// delay_line: a plain register pipeline that delays a W-bit word by LAT clock
// cycles (LAT = 0 gives a wire). The floating-point units use it as their
// pipeline, and the processing elements use it to keep tags and pass-through
// data aligned with the arithmetic. The registers are not reset, because
// every user also delays a valid bit through a reset delay line of its own.
module delay_line #(
  parameter int unsigned W   = 1,
  parameter int unsigned LAT = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (LAT == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [LAT];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < LAT; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[LAT-1];
  end
endmodule
