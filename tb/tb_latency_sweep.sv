// tb_latency_sweep: fall-through latency of an empty FIFO for synchronizer
// depths S = 2, 3, 4 and word widths 8, 16, 32 (NV = NH = 4).
//
// One word at a time is put into an empty FIFO and timed from the clk_put
// edge that accepts it to the clk_get edge after which datav is high. The
// word pointer moves on the next clk_put edge (post-increment), the slot's
// full flag crosses S synchronizer flops and the glitch-blocking output
// register adds one more clk_get edge, so with periods Tput and Tget
//     Tput + S*Tget < latency <= Tput + (S+1)*Tget,
// i.e. (S+1) receiver cycles plus a phase term when the clocks are equal.
// Tput = 11 and Tget = 10 time units make the phase drift between the ten
// words of each configuration. The word must also arrive intact.
module tb_latency_sweep;

  localparam int TPUT = 11, TGET = 10, NCFG = 9, NWORDS = 10;

  logic clk_put = 1'b0, clk_get = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, done = 0;

  always #(TPUT / 2.0) clk_put = ~clk_put;
  always #(TGET / 2.0) clk_get = ~clk_get;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int S = 2 + c % 3;
    localparam int W = 8 << (c / 3);
    logic req_put = 1'b0, req_get = 1'b0, spaceav, datav;
    logic [W-1:0] data_in = '0, data_out;

    interleaved_fifo #(.NV(4), .NH(4), .WIDTH(W), .SYNC_DEPTH(S)) dut (
      .clk_put, .rst_n_put(rst_n), .req_put, .data_in, .spaceav,
      .clk_get, .rst_n_get(rst_n), .req_get, .data_out, .datav
    );

    initial begin
      realtime t0, lat;
      wait (rst_n);
      for (int n = 0; n < NWORDS; n++) begin
        repeat (3 + n % 3) @(negedge clk_put);
        while (!spaceav) @(negedge clk_put);
        req_put = 1'b1;
        data_in = W'({$urandom, $urandom});
        @(posedge clk_put);
        t0 = $realtime;
        #1 req_put = 1'b0;
        do begin
          @(posedge clk_get);
          #1;
        end while (!datav && $realtime - t0 < 20 * TGET);
        lat = $realtime - 1 - t0;
        checks += 2;
        if (!(lat > TPUT + S * TGET && lat <= TPUT + (S + 1) * TGET)) begin
          failures++;
          $display("ERROR: S=%0d W=%0d latency %0.1f outside (%0d, %0d]", S, W, lat,
                   TPUT + S * TGET, TPUT + (S + 1) * TGET);
        end
        if (data_out != data_in) begin
          failures++;
          $display("ERROR: S=%0d W=%0d word %h arrived as %h", S, W, data_in, data_out);
        end
        if (n == 0) $display("S=%0d W=%0d first word latency %0.1f (Tget %0d)", S, W, lat, TGET);
        @(negedge clk_get) req_get = 1'b1;
        @(negedge clk_get) req_get = 1'b0;
      end
      done++;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40 rst_n = 1'b1;
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_latency_sweep
