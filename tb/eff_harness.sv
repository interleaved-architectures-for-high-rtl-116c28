// eff_harness: one FIFO configuration under saturated traffic, for the
// throughput sweep in tb_efficiency_sweep.
//
// The sender requests on every cycle and sends consecutive numbers; the
// receiver requests on every cycle and checks that the numbers arrive in
// order with no gaps (a word is retired when datav and req_get are both
// high). xfers counts retired words while count_en is high; errors counts
// mismatches and non-zero data_out while datav is low.
module eff_harness #(
  parameter int unsigned NV = 4,
  parameter int unsigned NH = 4,
  parameter int unsigned S  = 2,
  parameter int unsigned W  = 8
) (
  input  logic clk_put,
  input  logic clk_get,
  input  logic rst_n,
  input  logic count_en,
  output int   xfers,
  output int   errors
);

  logic         req_put, req_get, spaceav, datav;
  logic [W-1:0] data_in, data_out, expect_w;

  interleaved_fifo #(.NV(NV), .NH(NH), .WIDTH(W), .SYNC_DEPTH(S)) dut (
    .clk_put, .rst_n_put(rst_n), .req_put, .data_in, .spaceav,
    .clk_get, .rst_n_get(rst_n), .req_get, .data_out, .datav
  );

  assign req_put = rst_n;
  assign req_get = rst_n;

  always_ff @(posedge clk_put or negedge rst_n) begin
    if (!rst_n)       data_in <= '0;
    else if (spaceav) data_in <= data_in + 1'b1;
  end

  always_ff @(posedge clk_get or negedge rst_n) begin
    if (!rst_n) begin
      expect_w <= '0;
      xfers    <= 0;
      errors   <= 0;
    end else if (datav) begin
      expect_w <= expect_w + 1'b1;
      if (count_en) xfers <= xfers + 1;
      if (data_out != expect_w) errors <= errors + 1;
    end else if (data_out != '0) begin
      errors <= errors + 1;
    end
  end

endmodule : eff_harness
