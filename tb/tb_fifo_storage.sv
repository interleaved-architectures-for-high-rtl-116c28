// tb_fifo_storage: checks the latch store and its two read buses.
//
// Writes: a write select is set while clk_put is low, data_in is presented
// before the rising edge and then changed during the high phase; the slot must
// keep the value present at the edge (input latch opaque while clk_put is
// high), and slots not selected must keep their contents. Reads: for every
// slot k the enables of k and k+1 are set; the even-row one must appear on
// data_even and the odd-row one on data_odd. With no enable both buses read
// zero. A reference array holds what each slot should contain.
module tb_fifo_storage;
  import sfifo_pkg::*;

  localparam int NV = DEF_NV, NH = DEF_NH, W = DEF_WIDTH, N = NV * NH;

  logic clk_put = 1'b0;
  logic [W-1:0] data_in = '0, data_even, data_odd;
  logic [NV-1:0][NH-1:0] wsel = '0, oe = '0;
  logic [W-1:0] ref_mem [N];
  int checks = 0, failures = 0;

  fifo_storage #(.NV(NV), .NH(NH), .WIDTH(W)) dut (
    .clk_put, .data_in, .wsel, .oe, .data_even, .data_odd
  );

  always #5 clk_put = ~clk_put;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR @%0t: %s", $time, what);
    end
  endtask

  task automatic write(int k, logic [W-1:0] v);
    @(negedge clk_put);
    wsel = '0;
    wsel[(k % NV)][(k / NV)] = 1'b1;
    data_in = v;
    @(posedge clk_put);
    #1 data_in = ~v;          // must not reach the store
    @(negedge clk_put);
    wsel = '0;
    ref_mem[k] = v;
  endtask

  task automatic read_pair(int k);
    int k1 = (k + 1) % N;
    logic [W-1:0] ev, od;
    oe = '0;
    oe[k % NV][k / NV]   = 1'b1;
    oe[k1 % NV][k1 / NV] = 1'b1;
    #1;
    ev = ((k % NV) % 2 == 0) ? ref_mem[k] : ref_mem[k1];
    od = ((k % NV) % 2 == 1) ? ref_mem[k] : ref_mem[k1];
    check(data_even == ev, $sformatf("slot pair %0d: data_even %h expected %h", k, data_even, ev));
    check(data_odd == od,  $sformatf("slot pair %0d: data_odd %h expected %h", k, data_odd, od));
  endtask

  initial begin
    repeat (2000) @(posedge clk_put);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) write(k, W'($urandom));
    for (int k = 0; k < N; k++) read_pair(k);
    for (int r = 0; r < 3; r++) begin
      for (int t = 0; t < N / 2; t++) write($urandom_range(N - 1), W'($urandom));
      for (int k = 0; k < N; k++) read_pair(k);
    end
    oe = '0;
    #1;
    check(data_even == '0 && data_odd == '0, "buses not zero with no enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_fifo_storage
