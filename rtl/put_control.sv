// put_control: sender-side controller of the interleaved synchronizing FIFO.
//
// Pointer. A vertical ring counter (NV stages) advances on every put and a
// horizontal one (NH stages) advances when the vertical one wraps, so puts
// visit rows round-robin and the pair points at slot count(qv)+NV*count(qh).
// The counters are post-incremented: a put accepted on edge k (do_put high in
// cycle k) writes the slot the counters show during cycle k, and the counters
// move on edge k+1.
//
// Write select. ohv_l/ohh_l are latches, transparent while clk_put is low,
// holding the one-hot code of the counter state that will hold after the next
// rising edge. Through the high phase they therefore name the slot being
// written. The put decision (req_put & spaceav) is latched the same way in
// put_l, which equals do_put during the high phase but, unlike the do_put
// flop, does not change right after the rising edge; wsel = put_l & ohv_l &
// ohh_l therefore has no glitch while clk_put is high, when it opens a
// storage latch. (Gating with the do_put flop directly would let a rejected
// word slip into a full slot in the clock-to-Q window after the edge.)
//
// Space available. For each row an indicator is formed from the empty flags
// of its latches: (a) the row has an empty latch and is not being written this
// cycle, or (b) it is being written but another latch in it is empty. The
// indicator crosses into the clk_put domain through a row_sync whose last S-1
// flops are cleared by a put to the row. The synchronized row flags are
// ORed separately over even and odd rows. Empty slots are contiguous, so two
// free slots always lie in rows of opposite parity:
//   spaceav = (even & odd) | (~do_put & (even | odd)).
// spaceav is combinational from flops of this domain; a put is accepted on a
// rising edge where req_put and spaceav are both high (do_put <= req_put &
// spaceav). A request while spaceav is low is ignored.
//
// The structure follows the design description; reset style (asynchronous,
// active low), synchronizers clearing to "no space" at reset and the use of
// do_put for "a put in the current cycle" are choices of this implementation.
module put_control #(
  parameter int unsigned NV = sfifo_pkg::DEF_NV,
  parameter int unsigned NH = sfifo_pkg::DEF_NH,
  parameter int unsigned S  = sfifo_pkg::DEF_SYNC
) (
  input  logic                  clk_put,
  input  logic                  rst_n_put,
  input  logic                  req_put,
  input  logic [NV-1:0][NH-1:0] empty,     // per-latch empty flags (rise asynchronously)
  output logic                  spaceav,
  output logic                  do_put,    // a put is being performed this cycle
  output logic [NV-1:0][NH-1:0] wsel,      // storage latch write select (gated by clk_put high)
  output logic [NV-1:0]         qv,        // vertical thermometer counter
  output logic [NH-1:0]         qh         // horizontal thermometer counter
);

  logic [NV-1:0] qv_next, ohv, ohv_next, ohv_l;
  logic [NH-1:0] qh_next, ohh, ohh_next, ohh_l;
  logic [NV-1:0] row_ind, row_clr, row_av;
  logic          av_even, av_odd;
  logic          put_l;            // copy of the next do_put, latched while clk_put is low
  logic [NV-1:0][NH-1:0] cur_sel;  // slot the counters point at this cycle

  therm_counter #(.N(NV)) u_cnt_v (
    .clk(clk_put), .rst_n(rst_n_put), .inc(do_put),
    .q(qv), .q_next(qv_next), .oh(ohv), .oh_next(ohv_next)
  );

  therm_counter #(.N(NH)) u_cnt_h (
    .clk(clk_put), .rst_n(rst_n_put), .inc(do_put & ohv[NV-1]),
    .q(qh), .q_next(qh_next), .oh(ohh), .oh_next(ohh_next)
  );

  // Retimed one-hot write pointer and write request, latched while clk_put
  // is low so that they are stable for the whole high (write) phase.
  always_latch begin
    if (!clk_put) begin
      ohv_l <= ohv_next;
      ohh_l <= ohh_next;
      put_l <= req_put & spaceav;
    end
  end

  always_comb begin
    for (int i = 0; i < NV; i++)
      for (int j = 0; j < NH; j++)
        wsel[i][j] = put_l & ohv_l[i] & ohh_l[j];
  end

  // Per-row space indicators (a) and (b), and the synchronizer clears.
  always_comb begin
    for (int i = 0; i < NV; i++) begin
      for (int j = 0; j < NH; j++) cur_sel[i][j] = ohv[i] & ohh[j];
      row_ind[i] = ((~do_put | ~ohv[i]) & (|empty[i]))
                 | (do_put & ohv[i] & (|(empty[i] & ~ohh)));
      row_clr[i] = do_put & ohv[i];
    end
  end

  for (genvar i = 0; i < NV; i++) begin : g_row
    row_sync #(.S(S)) u_sync (
      .clk(clk_put), .rst_n(rst_n_put),
      .d(row_ind[i]), .clr(row_clr[i]), .q(row_av[i])
    );
  end

  // Second OR-tree, split into even- and odd-indexed rows.
  always_comb begin
    av_even = 1'b0;
    av_odd  = 1'b0;
    for (int i = 0; i < NV; i += 2) begin
      av_even |= row_av[i];
      av_odd  |= row_av[i+1];
    end
  end

  assign spaceav = (av_even & av_odd) | (~do_put & (av_even | av_odd));

  always_ff @(posedge clk_put or negedge rst_n_put) begin
    if (!rst_n_put) do_put <= 1'b0;
    else            do_put <= req_put & spaceav;
  end

  // The slot being written must be empty.
  a_put_into_empty: assert property (@(posedge clk_put) disable iff (!rst_n_put)
    do_put |-> |(empty & cur_sel));

endmodule : put_control
