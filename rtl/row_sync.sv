// row_sync: S-flip-flop synchronizer for one row's status indicator, with a
// synchronous clear of all but its first flip-flop.
//
// d is asynchronous to clk (it rises when the other clock domain frees or
// fills a slot in the row). It passes through S flops, so q follows d after S
// rising edges. When the local side accesses the row (clr high on a clock
// edge), flops 1..S-1 are cleared on that edge, so q reads 0 for the next S-1
// cycles and the row cannot be offered again until an indicator sampled
// after the access has crossed the whole chain. Flop 0 keeps sampling d on
// every edge. Reset (asynchronous, active low) clears all flops: after reset
// a row reports nothing until its indicator has been synchronized.
module row_sync #(
  parameter int unsigned S = sfifo_pkg::DEF_SYNC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic clr,
  output logic q
);

  initial assert (S >= 2) else $fatal(1, "row_sync: S must be >= 2");

  logic [S-1:0] ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff <= '0;
    end else begin
      ff[0] <= d;
      for (int k = 1; k < S; k++) ff[k] <= clr ? 1'b0 : ff[k-1];
    end
  end

  assign q = ff[S-1];

endmodule : row_sync
