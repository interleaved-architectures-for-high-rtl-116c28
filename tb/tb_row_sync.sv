// tb_row_sync: checks the clearable row synchronizer for S = 2, 3 and 4.
//
// d and clr are random. The reference is the history of d and clr: q at a
// given edge must equal d as sampled S edges before, unless a clear was seen
// at one of the S-1 most recent edges, in which case q must be 0. After reset
// q must be 0 for the first S cycles.
module tb_row_sync;

  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, clr = 1'b0;
  logic q2, q3, q4;
  int   checks = 0, failures = 0;
  logic dh[$], ch[$];  // histories, newest first

  row_sync #(.S(2)) s2 (.clk, .rst_n, .d, .clr, .q(q2));
  row_sync #(.S(3)) s3 (.clk, .rst_n, .d, .clr, .q(q3));
  row_sync #(.S(4)) s4 (.clk, .rst_n, .d, .clr, .q(q4));

  always #5 clk = ~clk;

  function automatic logic model(int s);
    if (dh.size() < s) return 1'b0;
    for (int k = 0; k < s - 1; k++) if (ch[k]) return 1'b0;
    return dh[s - 1];
  endfunction

  task automatic cmp(logic got, int s);
    checks++;
    if (got !== model(s)) begin
      failures++;
      $display("ERROR @%0t: S=%0d q=%b expected %b", $time, s, got, model(s));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      d   = (t % 50 < 20) ? 1'b1 : 1'($urandom_range(1));
      clr = ($urandom_range(5) == 0);
      @(posedge clk);
      dh.push_front(d);
      ch.push_front(clr);
      @(negedge clk);
      cmp(q2, 2);
      cmp(q3, 3);
      cmp(q4, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_row_sync
