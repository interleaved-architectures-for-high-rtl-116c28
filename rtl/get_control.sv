// get_control: receiver-side controller of the interleaved synchronizing FIFO.
//
// Pointer. Like the put side, a vertical and a horizontal ring counter
// (post-incremented) give the read pointer; the pair feeds therm_combine so
// that the per-latch full flags can be formed.
//
// Data valid. For each row an indicator says that the row holds a word other
// than one being read this cycle ((a) no read from the row and some latch
// full, or (b) a read from the row and another latch full). It is
// synchronized into clk_get by a row_sync whose last S-1 flops are cleared by
// a read of the row. The synchronized flags are ORed over even rows (dv_even)
// and odd rows (dv_odd).
//
// Output selection. Words are read alternately from even and odd rows. A
// toggle (tgl) holds the parity of the next word to be loaded into data_out;
// sel_even = ~tgl & dv_even, sel_odd = tgl & dv_odd, gated by the wish for a
// new word (req_get, or data_out not holding valid data). Full slots are
// contiguous from the read pointer, so a valid flag of the wanted parity means
// that word is present; when a read is under way, the flag of the other
// parity cannot be stale. The output register is loaded with the selected bus,
// or with zeros when neither select is high, and datav tells which.
//
// Bus enables. nv/nh are a one-hot copy of the address of the next word to be
// loaded (read pointer plus any read still in flight). Its storage latch and
// the one after it drive the two read buses (they are of opposite parity), so
// each bus already carries the candidate word when its select is decided.
//
// Timing: a word whose slot became full is seen by dv after S clk_get edges
// and appears at data_out on the following edge. With req_get held high and
// data present, one word is delivered per clk_get cycle.
//
// The structure follows the design description; reset style, load condition
// (req_get | ~datav) and the registered one-hot copy of the next address are
// choices of this implementation.
module get_control #(
  parameter int unsigned NV = sfifo_pkg::DEF_NV,
  parameter int unsigned NH = sfifo_pkg::DEF_NH,
  parameter int unsigned S  = sfifo_pkg::DEF_SYNC
) (
  input  logic                  clk_get,
  input  logic                  rst_n_get,
  input  logic                  req_get,
  input  logic [NV-1:0][NH-1:0] full,      // per-latch full flags (rise asynchronously)
  output logic                  datav,     // data_out holds a valid word
  output logic                  load,      // data_out register loads this edge
  output logic                  sel_even,
  output logic                  sel_odd,
  output logic [NV-1:0][NH-1:0] oe,        // storage latch drives its read bus
  output logic                  do_get,    // a word was taken on the last edge
  output logic [NV-1:0]         qv,
  output logic [NH-1:0]         qh
);

  logic [NV-1:0] qv_next, ohv, ohv_next, nv, nv1;
  logic [NH-1:0] qh_next, ohh, ohh_next, nh, nh1;
  logic [NV-1:0] row_ind, row_clr, row_dv;
  logic          dv_even, dv_odd, tgl, take;
  logic [NV-1:0][NH-1:0] nsel;     // the next word's latch

  therm_counter #(.N(NV)) u_cnt_v (
    .clk(clk_get), .rst_n(rst_n_get), .inc(do_get),
    .q(qv), .q_next(qv_next), .oh(ohv), .oh_next(ohv_next)
  );

  therm_counter #(.N(NH)) u_cnt_h (
    .clk(clk_get), .rst_n(rst_n_get), .inc(do_get & ohv[NV-1]),
    .q(qh), .q_next(qh_next), .oh(ohh), .oh_next(ohh_next)
  );

  always_comb begin
    for (int i = 0; i < NV; i++) begin
      row_ind[i] = ((~do_get | ~ohv[i]) & (|full[i]))
                 | (do_get & ohv[i] & (|(full[i] & ~ohh)));
      row_clr[i] = do_get & ohv[i];
    end
  end

  for (genvar i = 0; i < NV; i++) begin : g_row
    row_sync #(.S(S)) u_sync (
      .clk(clk_get), .rst_n(rst_n_get),
      .d(row_ind[i]), .clr(row_clr[i]), .q(row_dv[i])
    );
  end

  always_comb begin
    dv_even = 1'b0;
    dv_odd  = 1'b0;
    for (int i = 0; i < NV; i += 2) begin
      dv_even |= row_dv[i];
      dv_odd  |= row_dv[i+1];
    end
  end

  assign load     = req_get | ~datav;
  assign sel_even = load & ~tgl & dv_even;
  assign sel_odd  = load &  tgl & dv_odd;
  assign take     = sel_even | sel_odd;

  // Address after the next word: rotate the row, step the column on wrap.
  assign nv1 = {nv[NV-2:0], nv[NV-1]};
  assign nh1 = nv[NV-1] ? {nh[NH-2:0], nh[NH-1]} : nh;

  always_comb begin
    for (int i = 0; i < NV; i++)
      for (int j = 0; j < NH; j++) begin
        nsel[i][j] = nv[i] & nh[j];
        oe[i][j]   = nsel[i][j] | (nv1[i] & nh1[j]);
      end
  end

  always_ff @(posedge clk_get or negedge rst_n_get) begin
    if (!rst_n_get) begin
      do_get <= 1'b0;
      datav  <= 1'b0;
      tgl    <= 1'b0;
      nv     <= NV'(1);
      nh     <= NH'(1);
    end else begin
      do_get <= take;
      if (load) datav <= take;
      if (take) begin
        tgl <= ~tgl;
        nv  <= nv1;
        nh  <= nh1;
      end
    end
  end

  // The toggle always names the parity of the row of the next word.
  a_toggle_parity: assert property (@(posedge clk_get) disable iff (!rst_n_get)
    tgl == (|(nv & NV'({(NV/2){2'b10}}))));
  // A word is only taken from a full latch.
  a_take_full: assert property (@(posedge clk_get) disable iff (!rst_n_get)
    take |-> |(full & nsel));

endmodule : get_control
