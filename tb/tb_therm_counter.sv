// tb_therm_counter: checks the ring counter against an arithmetic model.
//
// Two instances (N = 4 and N = 6) are advanced with random inc. The model
// keeps the number of increments m; the expected state is the Johnson code
// of m mod 2N (bit k set when k < m for the first N states, when k >= m-N for
// the next N), the expected one-hot bit is m mod N. q_next/oh_next are checked
// against the model for m+inc. Reset must give the all-zero state.
module tb_therm_counter;

  logic clk = 1'b0, rst_n = 1'b0, inc = 1'b0;
  int   checks = 0, failures = 0;

  logic [3:0] q4, qn4, oh4, ohn4;
  logic [5:0] q6, qn6, oh6, ohn6;

  therm_counter #(.N(4)) dut4 (.clk, .rst_n, .inc, .q(q4), .q_next(qn4), .oh(oh4), .oh_next(ohn4));
  therm_counter #(.N(6)) dut6 (.clk, .rst_n, .inc, .q(q6), .q_next(qn6), .oh(oh6), .oh_next(ohn6));

  always #5 clk = ~clk;

  function automatic logic [63:0] jcode(int n, int m);
    int r = m % (2 * n);
    logic [63:0] v = '0;
    for (int k = 0; k < n; k++) v[k] = (r < n) ? (k < r) : (k >= r - n);
    return v;
  endfunction

  function automatic logic [63:0] onehot(int n, int m);
    return 64'(1) << (m % n);
  endfunction

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m = 0;
    repeat (2) @(posedge clk);
    expect_eq(64'(q4), 0, "reset q4");
    expect_eq(64'(q6), 0, "reset q6");
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      inc = (t < 40) ? 1'b1 : 1'($urandom_range(1));
      #1;
      expect_eq(64'(q4),   jcode(4, m),       "q4");
      expect_eq(64'(oh4),  onehot(4, m),      "oh4");
      expect_eq(64'(qn4),  jcode(4, m + inc), "q_next4");
      expect_eq(64'(ohn4), onehot(4, m + inc),"oh_next4");
      expect_eq(64'(q6),   jcode(6, m),       "q6");
      expect_eq(64'(oh6),  onehot(6, m),      "oh6");
      expect_eq(64'(qn6),  jcode(6, m + inc), "q_next6");
      expect_eq(64'(ohn6), onehot(6, m + inc),"oh_next6");
      @(posedge clk);
      m += int'(inc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_therm_counter
