// tb_slot_status: checks the per-latch empty/full flags against pointer
// arithmetic.
//
// For random put and get counts p and g with 0 <= p - g <= N (N = 16), the
// inputs are the N-stage thermometer (Johnson) codes of p and g. Slot k holds
// a word exactly when (k - g) mod N < p - g; full must say so and empty must be
// its complement. Includes the empty (p = g) and full (p = g + N) cases.
module tb_slot_status;

  localparam int NV = 4, NH = 4, N = NV * NH;

  int checks = 0, failures = 0;
  logic [NV-1:0][NH-1:0] tp, tg, empty, full;

  slot_status #(.NV(NV), .NH(NH)) dut (.therm_put(tp), .therm_get(tg), .empty, .full);

  function automatic logic [N-1:0] jcode(int m);
    int r = m % (2 * N);
    logic [N-1:0] v = '0;
    for (int k = 0; k < N; k++) v[k] = (r < N) ? (k < r) : (k >= r - N);
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      automatic int g = $urandom_range(4 * N);
      automatic int d = (t < 2 * N + 2) ? t % (N + 1) : $urandom_range(N);
      automatic int p = g + d;
      automatic logic [N-1:0] jp = jcode(p), jg = jcode(g);
      for (int i = 0; i < NV; i++)
        for (int j = 0; j < NH; j++) begin
          tp[i][j] = jp[i + NV * j];
          tg[i][j] = jg[i + NV * j];
        end
      #1;
      for (int i = 0; i < NV; i++)
        for (int j = 0; j < NH; j++) begin
          automatic int k = i + NV * j;
          automatic logic occ = ((k - g % N + N) % N) < d;
          checks++;
          if (full[i][j] !== occ || empty[i][j] !== !occ) begin
            failures++;
            $display("ERROR: p=%0d g=%0d slot %0d full=%b empty=%b expected full=%b",
                     p, g, k, full[i][j], empty[i][j], occ);
          end
        end
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

endmodule : tb_slot_status
