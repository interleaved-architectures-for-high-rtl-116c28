// tb_therm_combine: checks that a (vertical, horizontal) counter pair expands
// to the thermometer code of an N = NV*NH stage counter.
//
// For every count m over two full periods the inputs are the Johnson codes
// of m mod 2NV (vertical) and floor(m/NV) mod 2NH (horizontal), exactly the
// states the two ring counters pass through; the expected output bit (i, j)
// is bit i + NV*j of the Johnson code of m mod 2N. Instances: the default
// 4 x 4, and 2 x 6 and 6 x 2 to cover other shapes.
module tb_therm_combine;

  int checks = 0, failures = 0;

  logic [3:0] qv44;  logic [3:0] qh44;  logic [3:0][3:0] t44;
  logic [1:0] qv26;  logic [5:0] qh26;  logic [1:0][5:0] t26;
  logic [5:0] qv62;  logic [1:0] qh62;  logic [5:0][1:0] t62;

  therm_combine #(.NV(4), .NH(4)) d44 (.qv(qv44), .qh(qh44), .therm(t44));
  therm_combine #(.NV(2), .NH(6)) d26 (.qv(qv26), .qh(qh26), .therm(t26));
  therm_combine #(.NV(6), .NH(2)) d62 (.qv(qv62), .qh(qh62), .therm(t62));

  function automatic logic [63:0] jcode(int n, int m);
    int r = m % (2 * n);
    logic [63:0] v = '0;
    for (int k = 0; k < n; k++) v[k] = (r < n) ? (k < r) : (k >= r - n);
    return v;
  endfunction

  task automatic cmp(int nv, int nh, int m, logic got, int i, int j);
    logic [63:0] t = jcode(nv * nh, m);
    checks++;
    if (got !== t[i + nv * j]) begin
      failures++;
      $display("ERROR: %0dx%0d m=%0d bit(%0d,%0d) got %b expected %b", nv, nh, m, i, j, got, t[i + nv * j]);
    end
  endtask

  initial begin
    for (int m = 0; m < 4 * 16; m++) begin
      qv44 = 4'(jcode(4, m));      qh44 = 4'(jcode(4, m / 4));
      qv26 = 2'(jcode(2, m));      qh26 = 6'(jcode(6, m / 2));
      qv62 = 6'(jcode(6, m));      qh62 = 2'(jcode(2, m / 6));
      #1;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) cmp(4, 4, m, t44[i][j], i, j);
      for (int i = 0; i < 2; i++) for (int j = 0; j < 6; j++) cmp(2, 6, m, t26[i][j], i, j);
      for (int i = 0; i < 6; i++) for (int j = 0; j < 2; j++) cmp(6, 2, m, t62[i][j], i, j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_therm_combine
