// fifo_storage: data store of the interleaved FIFO (NV x NH latches of WIDTH
// bits) with its input latch and two read buses.
//
// Write side: data_in passes a latch that is transparent while clk_put is low,
// so it holds the value present at the rising edge through the high phase. The
// storage latch selected by wsel is transparent during that high phase and
// closes on the falling edge. Input latch plus storage latch behave like a
// rising-edge flip-flop, and the word is in its slot right after the edge.
//
// Read side: every latch whose oe bit is set drives its bus: rows with an even
// index drive data_even, odd rows data_odd (AND-OR selection standing in for
// tri-state drivers). The get controller enables the latches of the next two
// words, which lie in rows of opposite parity, so at most one latch drives each
// bus. A bus with no enabled latch reads zero.
module fifo_storage #(
  parameter int unsigned NV    = sfifo_pkg::DEF_NV,
  parameter int unsigned NH    = sfifo_pkg::DEF_NH,
  parameter int unsigned WIDTH = sfifo_pkg::DEF_WIDTH
) (
  input  logic                  clk_put,
  input  logic [WIDTH-1:0]      data_in,
  input  logic [NV-1:0][NH-1:0] wsel,
  input  logic [NV-1:0][NH-1:0] oe,
  output logic [WIDTH-1:0]      data_even,
  output logic [WIDTH-1:0]      data_odd
);

  logic [WIDTH-1:0]                  din_l;
  logic [NV-1:0][NH-1:0][WIDTH-1:0]  cell_q;

  always_latch begin
    if (!clk_put) din_l <= data_in;
  end

  for (genvar i = 0; i < NV; i++) begin : g_row
    for (genvar j = 0; j < NH; j++) begin : g_col
      logic [WIDTH-1:0] word_l;
      always_latch begin
        if (clk_put && wsel[i][j]) word_l <= din_l;
      end
      assign cell_q[i][j] = word_l;
    end
  end

  always_comb begin
    data_even = '0;
    data_odd  = '0;
    for (int i = 0; i < NV; i++)
      for (int j = 0; j < NH; j++)
        if (oe[i][j]) begin
          if (i % 2 == 0) data_even |= cell_q[i][j];
          else            data_odd  |= cell_q[i][j];
        end
  end

endmodule : fifo_storage
