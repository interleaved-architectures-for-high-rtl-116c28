// tb_get_control: checks the receiver-side controller with a modelled sender.
//
// The testbench holds a model put count p and counts completed reads g
// (edges with do_get high). Slot k is presented as full when
// (k - g) mod N < p - g. The index of the next word to load is
// nx = g + do_get. Checked on every cycle:
//   - a select (take) only when word nx is present (nx < p), and only on the
//     bus of nx's row parity; at most one select, and none without load,
//   - load == req_get | ~datav, and datav follows the select when loading,
//   - oe enables exactly slots nx and nx+1 (mod N), one on each bus,
//   - qv/qh are the Johnson codes of g mod 2NV and floor(g/NV) mod 2NH.
// Directed: latency of a single word into an empty FIFO (datav exactly S+1
// edges after the full flag rises), streaming from a well-stocked FIFO (one
// word per cycle over 300 cycles), and random traffic.
module tb_get_control;
  import sfifo_pkg::*;

  localparam int NV = DEF_NV, NH = DEF_NH, S = DEF_SYNC, N = NV * NH;

  logic clk = 1'b0, rst_n = 1'b0, req_get = 1'b0;
  logic [NV-1:0][NH-1:0] full, oe;
  logic datav, load, sel_even, sel_odd, do_get;
  logic [NV-1:0] qv;
  logic [NH-1:0] qh;
  int checks = 0, failures = 0;
  int p = 0, g = 0, takes = 0;
  logic exp_datav = 1'b0, prev_take = 1'b0;

  get_control #(.NV(NV), .NH(NH), .S(S)) dut (
    .clk_get(clk), .rst_n_get(rst_n), .req_get, .full, .datav, .load,
    .sel_even, .sel_odd, .oe, .do_get, .qv, .qh
  );

  always #5 clk = ~clk;

  function automatic logic [63:0] jcode(int n, int m);
    int r = m % (2 * n);
    logic [63:0] v = '0;
    for (int k = 0; k < n; k++) v[k] = (r < n) ? (k < r) : (k >= r - n);
    return v;
  endfunction

  always_comb begin
    for (int i = 0; i < NV; i++)
      for (int j = 0; j < NH; j++)
        full[i][j] = ((i + NV * j - g % N + N) % N) < p - g;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR @%0t: %s (p=%0d g=%0d)", $time, what, p, g);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic int nx = g + int'(do_get);
    automatic logic take = sel_even | sel_odd;
    check(do_get == prev_take, "do_get does not follow the select");
    check(datav == exp_datav, "datav");
    check(load == (req_get | ~datav), "load");
    check(!(sel_even && sel_odd), "both selects high");
    check(!take || load, "select without load");
    if (take) begin
      takes++;
      check(nx < p, "word taken before it is present");
      check(sel_odd == ((nx % NV) % 2 == 1), "select on the wrong bus");
    end
    if (load) exp_datav = take;
    prev_take = take;
    if (do_get) g++;
  end

  always @(posedge clk) if (rst_n) begin
    int nx;
    #2;
    nx = g + int'(do_get);
    for (int i = 0; i < NV; i++)
      for (int j = 0; j < NH; j++) begin
        automatic int k = i + NV * j;
        check(oe[i][j] == (k == nx % N || k == (nx + 1) % N), "bus enables");
      end
    check(64'(qv) == jcode(NV, g), "vertical counter");
    check(64'(qh) == jcode(NH, g / NV), "horizontal counter");
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    req_get = 1'b1;
    repeat (10) @(negedge clk);
    check(!datav, "datav high on an empty FIFO");
    // latency of one word
    p = 1;
    lat = 0;
    while (!datav && lat < 20) begin
      @(posedge clk);
      lat++;
      #1;
    end
    $display("single word valid %0d edges after its slot became full", lat);
    check(lat == S + 1, "fall-through latency differs from S+1");
    // streaming from a stocked FIFO, refilled as it drains
    repeat (10) @(negedge clk);
    for (int t = 0; t < 341; t++) begin
      @(negedge clk);
      p = g + N;
      if (t == 40) t0 = takes;
    end
    $display("streaming: %0d of 300 cycles delivered a word", takes - t0);
    check(takes - t0 == 300, "streaming throughput below one word per cycle");
    // random traffic
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      req_get = 1'($urandom_range(1));
      if ($urandom_range(2) == 0 && p < g + N) p++;
    end
    // drain
    req_get = 1'b1;
    repeat (40) @(negedge clk);
    check(g == p && !datav, "words left behind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_get_control
