// tb_efficiency_sweep: throughput ("efficiency", words per clock cycle) of
// every configuration of the parameter sweep NV, NH in {2,4,6,8} and
// S in {2,3,4} (8-bit words; the width does not affect the control), with
// both sides requesting on every cycle and both clocks at the same frequency
// with an offset phase.
//
// Prints, for each (NV, S), [min mean max] over NH, in the layout of the
// published efficiency table. Checks:
//   - every configuration delivers all words in order (no data errors),
//   - NV > S and NH >= 4: efficiency at least 0.99,
//   - NV <= S: efficiency below 0.85 for every NH (row synchronizers not
//     interleaved enough to hide their latency),
//   - the mean over NH within 0.15 of the published mean for that (NV, S).
module tb_efficiency_sweep;

  localparam int NCFG = 48;
  localparam int WINDOW = 2000;
  // published mean efficiency over NH, [NV/2-1][S-2]
  localparam real PUB_MEAN [4][3] = '{'{0.50, 0.47, 0.38}, '{0.97, 0.93, 0.72},
                                     '{1.00, 1.00, 0.98}, '{1.00, 1.00, 0.99}};

  logic clk_put = 1'b0, clk_get = 1'b0, rst_n = 1'b0, count_en = 1'b0;
  int   xfers [NCFG];
  int   errors[NCFG];
  int   checks = 0, failures = 0;

  always #5 clk_put = ~clk_put;
  initial begin
    #3;
    forever #5 clk_get = ~clk_get;
  end

  // configuration c: NV = 2*(1 + c/12), S = 2 + (c/4)%3, NH = 2*(1 + c%4)
  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    eff_harness #(
      .NV(2 * (1 + c / 12)), .S(2 + (c / 4) % 3), .NH(2 * (1 + c % 4)), .W(8)
    ) h (
      .clk_put, .clk_get, .rst_n, .count_en, .xfers(xfers[c]), .errors(errors[c])
    );
  end

  initial begin
    repeat (20000) @(posedge clk_get);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk_put);
    rst_n = 1'b1;
    repeat (200) @(posedge clk_get);
    count_en = 1'b1;
    repeat (WINDOW) @(posedge clk_get);
    count_en = 1'b0;
    repeat (2) @(posedge clk_get);
    $display("efficiency [min mean max] over NH = 2,4,6,8");
    $display("          S = 2               S = 3               S = 4");
    for (int v = 0; v < 4; v++) begin
      automatic string line;
      line = $sformatf("NV = %0d ", 2 * (v + 1));
      for (int s = 0; s < 3; s++) begin
        automatic real mn = 2.0, mx = 0.0, sum = 0.0;
        for (int h = 0; h < 4; h++) begin
          automatic int  c   = v * 12 + s * 4 + h;
          automatic real eff = real'(xfers[c]) / real'(WINDOW);
          automatic int  nv  = 2 * (v + 1), sd = s + 2, nh = 2 * (h + 1);
          if (eff < mn) mn = eff;
          if (eff > mx) mx = eff;
          sum += eff;
          checks++;
          if (errors[c] != 0) begin
            failures++;
            $display("ERROR: NV=%0d NH=%0d S=%0d: %0d data errors", nv, nh, sd, errors[c]);
          end
          if (nv > sd && nh >= 4) begin
            checks++;
            if (eff < 0.99) begin
              failures++;
              $display("ERROR: NV=%0d NH=%0d S=%0d: efficiency %0.3f < 0.99", nv, nh, sd, eff);
            end
          end
          if (nv <= sd) begin
            checks++;
            if (eff >= 0.85) begin
              failures++;
              $display("ERROR: NV=%0d NH=%0d S=%0d: efficiency %0.3f, expected stalls", nv, nh, sd, eff);
            end
          end
        end
        checks++;
        if (sum / 4.0 > PUB_MEAN[v][s] + 0.15 || sum / 4.0 < PUB_MEAN[v][s] - 0.15) begin
          failures++;
          $display("ERROR: NV=%0d S=%0d: mean efficiency %0.2f, published %0.2f",
                   2 * (v + 1), s + 2, sum / 4.0, PUB_MEAN[v][s]);
        end
        line = {line, $sformatf("  [%0.2f %0.2f %0.2f]", mn, sum / 4.0, mx)};
      end
      $display("%s", line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_efficiency_sweep
