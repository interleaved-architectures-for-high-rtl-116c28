// tb_put_control: checks the sender-side controller with a modelled receiver.
//
// The testbench counts completed puts p (edges with do_put high, i.e. counter
// increments) and holds a model read count g <= p. Slot k is presented as
// empty unless (k - g) mod N < p - g. Checked on every cycle:
//   - a put is only accepted (req_put & spaceav) when the slot it will write
//     is free: p + do_put - g < N,
//   - do_put follows req_put & spaceav of the previous edge,
//   - qv/qh are the Johnson codes of p mod 2NV and floor(p/NV) mod 2NH,
//   - during the high phase wsel selects exactly slot p mod N when do_put is
//     high, and nothing otherwise.
// Phases: fill with no reads (exactly N words must be accepted, then spaceav
// stays low); streaming with reads a few cycles behind (with NV > S every
// cycle must accept: 100% over 300 cycles); random traffic.
module tb_put_control;
  import sfifo_pkg::*;

  localparam int NV = DEF_NV, NH = DEF_NH, S = DEF_SYNC, N = NV * NH;

  logic clk = 1'b0, rst_n = 1'b0, req_put = 1'b0;
  logic [NV-1:0][NH-1:0] empty, wsel;
  logic spaceav, do_put;
  logic [NV-1:0] qv;
  logic [NH-1:0] qh;
  int checks = 0, failures = 0;
  int p = 0, g = 0, acc = 0;
  int read_lag = -1;          // <0: no reads; else reads follow p after this many cycles
  int hist[$];
  logic prev_acc = 1'b0;

  put_control #(.NV(NV), .NH(NH), .S(S)) dut (
    .clk_put(clk), .rst_n_put(rst_n), .req_put, .empty, .spaceav, .do_put, .wsel, .qv, .qh
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
        empty[i][j] = !(((i + NV * j - g % N + N) % N) < p - g);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR @%0t: %s (p=%0d g=%0d)", $time, what, p, g);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(do_put == prev_acc, "do_put does not follow req_put & spaceav");
    if (req_put && spaceav) begin
      acc++;
      check(p + int'(do_put) - g < N, "put accepted with no free slot");
    end
    prev_acc = req_put && spaceav;
    if (do_put) p++;
    hist.push_back(p);
    if (read_lag >= 0 && hist.size() > read_lag) g = hist.pop_front();
    else if (read_lag < 0) hist.delete();
  end

  // mid high phase: write select and counters
  always @(posedge clk) if (rst_n) begin
    #2;
    for (int i = 0; i < NV; i++)
      for (int j = 0; j < NH; j++)
        check(wsel[i][j] == (do_put && (i + NV * j) == p % N), "wrong write select");
    check(64'(qv) == jcode(NV, p), "vertical counter");
    check(64'(qh) == jcode(NH, p / NV), "horizontal counter");
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // fill without reads
    @(negedge clk) req_put = 1'b1;
    repeat (60) @(negedge clk);
    check(acc == N, $sformatf("fill accepted %0d words, expected %0d", acc, N));
    check(!spaceav, "spaceav high on a full FIFO");
    // empty it, then stream with reads 3 cycles behind
    req_put = 1'b0;
    read_lag = 3;
    repeat (20) @(negedge clk);
    req_put = 1'b1;
    repeat (20) @(negedge clk);
    a0 = acc;
    repeat (300) @(negedge clk);
    $display("streaming: %0d of 300 cycles accepted a put", acc - a0);
    check(acc - a0 == 300, "streaming throughput below one put per cycle");
    // random traffic with varying read lag
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      req_put  = 1'($urandom_range(1));
      if (t % 100 == 0) read_lag = $urandom_range(12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_put_control
