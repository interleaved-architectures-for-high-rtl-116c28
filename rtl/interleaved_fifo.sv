// interleaved_fifo: synchronizing (two-clock) FIFO with an interleaved
// one-hot-style control and data path.
//
// Put interface (clk_put domain): the sender presents data_in and raises
// req_put; the word is taken on the rising edge where spaceav is also high.
// A request while spaceav is low is ignored, so req_put may be held high and
// spaceav read as the acknowledgement. Get interface (clk_get domain): datav
// says data_out holds a valid word; raising req_get asks for the next one,
// which appears after the next edge if present (datav stays high), otherwise
// datav falls and data_out reads zero until a word arrives. Both sides can
// sustain one word per cycle of their own clock.
//
// The N = NV*NH words live in latches arranged as NV rows of NH words. Each
// side keeps its pointer as a vertical (row) and a horizontal (column) ring
// counter; therm_combine expands each pair into an N-bit thermometer code and
// slot_status compares the two codes bit by bit to get per-latch empty/full
// flags. Only one synchronizer per row and direction (2*NV in all) crosses
// between the clocks; consecutive words go to consecutive rows, so a row is
// accessed at most once every NV cycles, which hides the synchronizer depth
// when NV >= SYNC_DEPTH. Even and odd rows drive separate read buses, giving
// the read path an extra cycle, and data_out is a register in clk_get that
// is forced to zero when no valid word is selected.
//
// Latency of an empty FIFO: the put pointer moves one clk_put cycle after the
// edge that accepts the word; from there the full flag needs SYNC_DEPTH
// clk_get edges to cross and one more edge loads data_out, so the word is
// valid SYNC_DEPTH + 1 receiver cycles plus one sender cycle (and the phase
// between the clocks) after it was put.
// The structure (counter pairs, per-row synchronizers, even/odd buses,
// zero-forced output register) follows the published architecture; the
// split into modules and the reset style are this implementation's choices.
// Resets: one asynchronous active-low reset per domain; both must be applied
// together before use.
module interleaved_fifo #(
  parameter int unsigned NV         = sfifo_pkg::DEF_NV,
  parameter int unsigned NH         = sfifo_pkg::DEF_NH,
  parameter int unsigned WIDTH      = sfifo_pkg::DEF_WIDTH,
  parameter int unsigned SYNC_DEPTH = sfifo_pkg::DEF_SYNC
) (
  // put side
  input  logic             clk_put,
  input  logic             rst_n_put,
  input  logic             req_put,
  input  logic [WIDTH-1:0] data_in,
  output logic             spaceav,
  // get side
  input  logic             clk_get,
  input  logic             rst_n_get,
  input  logic             req_get,
  output logic [WIDTH-1:0] data_out,
  output logic             datav
);

  logic [NV-1:0]          qv_put, qv_get;
  logic [NH-1:0]          qh_put, qh_get;
  logic [NV-1:0][NH-1:0]  therm_put, therm_get, empty, full, wsel, oe;
  logic [WIDTH-1:0]       data_even, data_odd;
  logic                   load, sel_even, sel_odd;

  put_control #(.NV(NV), .NH(NH), .S(SYNC_DEPTH)) u_put (
    .clk_put, .rst_n_put, .req_put, .empty, .spaceav, .do_put(), .wsel,
    .qv(qv_put), .qh(qh_put)
  );

  get_control #(.NV(NV), .NH(NH), .S(SYNC_DEPTH)) u_get (
    .clk_get, .rst_n_get, .req_get, .full, .datav, .load, .sel_even, .sel_odd,
    .oe, .do_get(), .qv(qv_get), .qh(qh_get)
  );

  therm_combine #(.NV(NV), .NH(NH)) u_therm_put (.qv(qv_put), .qh(qh_put), .therm(therm_put));
  therm_combine #(.NV(NV), .NH(NH)) u_therm_get (.qv(qv_get), .qh(qh_get), .therm(therm_get));

  slot_status #(.NV(NV), .NH(NH)) u_status (
    .therm_put, .therm_get, .empty, .full
  );

  fifo_storage #(.NV(NV), .NH(NH), .WIDTH(WIDTH)) u_store (
    .clk_put, .data_in, .wsel, .oe, .data_even, .data_odd
  );

  fifo_out_stage #(.WIDTH(WIDTH)) u_out (
    .clk_get, .rst_n_get, .load, .sel_even, .sel_odd, .data_even, .data_odd, .data_out
  );

endmodule : interleaved_fifo
