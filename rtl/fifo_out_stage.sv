// fifo_out_stage: glitch-blocking output register of the interleaved FIFO.
//
// On a rising edge of clk_get with load high, data_out takes data_even when
// sel_even is high, data_odd when sel_odd is high, and all zeros when neither
// is. With load low it holds. The read buses are driven from latches written
// in the other clock domain; because an unselected bus is masked to zero
// before the flip-flops, data_out never changes except on clk_get edges and is
// zero whenever it carries no valid word. Logic in the receiver that mixes
// data_out with its own state therefore never sees values that settle
// asynchronously. This costs one clk_get cycle of latency.
module fifo_out_stage #(
  parameter int unsigned WIDTH = sfifo_pkg::DEF_WIDTH
) (
  input  logic             clk_get,
  input  logic             rst_n_get,
  input  logic             load,
  input  logic             sel_even,
  input  logic             sel_odd,
  input  logic [WIDTH-1:0] data_even,
  input  logic [WIDTH-1:0] data_odd,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] d;

  assign d = ({WIDTH{sel_even}} & data_even) | ({WIDTH{sel_odd}} & data_odd);

  always_ff @(posedge clk_get or negedge rst_n_get) begin
    if (!rst_n_get)  data_out <= '0;
    else if (load)   data_out <= d;
  end

  a_one_select: assert property (@(posedge clk_get) disable iff (!rst_n_get)
    !(sel_even && sel_odd));

endmodule : fifo_out_stage
