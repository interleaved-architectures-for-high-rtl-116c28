// tb_interleaved_fifo: end-to-end test of the two-clock FIFO at its default
// parameters.
//
// A scoreboard queue records every word the FIFO accepts (req_put and spaceav
// high at a clk_put edge); on the get side every cycle with datav high must
// show the head of that queue on data_out, a word is retired when req_get is
// also high, and data_out must be all zeros whenever datav is low. The run
// walks through five traffic patterns (always-on, random, near-empty,
// half-full, near-full) at several clock-period ratios, then measures:
//   - throughput with both sides always requesting at equal clock periods
//     (expected: one word per cycle, at least 99% after warm-up, since
//     NV > SYNC_DEPTH and NV*NH >= 12),
//   - fall-through latency of an empty FIFO: the word must be valid on data_out
//     SYNC_DEPTH+1 or SYNC_DEPTH+2 clk_get edges after the clk_put edge that
//     took it (the second case when the clocks are out of phase),
// and checks that every control mechanism fired at least once.
module tb_interleaved_fifo;
  import sfifo_pkg::*;

  localparam int NV = DEF_NV;
  localparam int NH = DEF_NH;
  localparam int W  = DEF_WIDTH;
  localparam int S  = DEF_SYNC;
  localparam int N  = NV * NH;

  typedef enum logic [2:0] {IDLE, DRAIN, FAST, RANDOM, NEAR_EMPTY, HALF, NEAR_FULL} mode_e;

  logic         clk_put = 1'b0, clk_get = 1'b0;
  logic         rst_n_put = 1'b0, rst_n_get = 1'b0;
  logic         req_put = 1'b0, req_get = 1'b0;
  logic [W-1:0] data_in = '0;
  logic [W-1:0] data_out;
  logic         spaceav, datav;

  int unsigned hp_put = 5, hp_get = 5;
  mode_e       mode = IDLE;
  int          checks = 0, failures = 0;
  logic [W-1:0] sb[$];

  // mechanism counters
  int n_put = 0, n_get = 0, n_put_stall = 0, n_get_wait = 0, n_zero_out = 0;
  int n_put_b = 0, n_get_b = 0, n_sel_even = 0, n_sel_odd = 0, n_two_slot = 0;
  int n_b2b_put = 0, n_b2b_get = 0, n_full = 0, n_put_clr = 0, n_get_clr = 0;
  logic last_put = 1'b0, last_get = 1'b0;

  // single-word latency probe
  logic lat_fire = 1'b0;   // request exactly one put
  logic lat_armed = 1'b0;
  int   lat_edges = 0, lat_result = -1;

  interleaved_fifo dut (
    .clk_put, .rst_n_put, .req_put, .data_in, .spaceav,
    .clk_get, .rst_n_get, .req_get, .data_out, .datav
  );

  always #(hp_put) clk_put = ~clk_put;
  initial begin
    #3;
    forever #(hp_get) clk_get = ~clk_get;
  end

  function automatic logic want_put(mode_e m);
    case (m)
      FAST:       return 1'b1;
      RANDOM:     return 1'($urandom_range(1));
      NEAR_EMPTY: return $urandom_range(3) == 0;
      HALF:       return sb.size() < N / 2;
      NEAR_FULL:  return 1'b1;
      default:    return 1'b0;
    endcase
  endfunction

  function automatic logic want_get(mode_e m);
    case (m)
      FAST:       return 1'b1;
      RANDOM:     return 1'($urandom_range(1));
      NEAR_EMPTY: return 1'b1;
      DRAIN:      return 1'b1;
      HALF:       return sb.size() > N / 2;
      NEAR_FULL:  return $urandom_range(3) == 0;
      default:    return 1'b0;
    endcase
  endfunction

  // put side: record accepted words, drive new requests
  always @(posedge clk_put) begin
    if (rst_n_put) begin
      if (req_put && spaceav) begin
        sb.push_back(data_in);
        n_put++;
        if (last_put) n_b2b_put++;
        if (lat_fire) lat_armed = 1'b1;
      end
      if (req_put && !spaceav) n_put_stall++;
      last_put = req_put && spaceav;
      if (sb.size() > N + 1) begin
        failures++;
        $display("ERROR: %0d words held, capacity %0d", sb.size(), N + 1);
      end
      if (sb.size() == N + 1) n_full++;
      // internal mechanisms
      if (dut.u_put.do_put && |(dut.u_put.row_clr & dut.u_put.row_ind)) n_put_b++;
      if (dut.u_put.do_put && (dut.u_put.av_even ^ dut.u_put.av_odd)) n_two_slot++;
      if (|dut.u_put.row_clr) n_put_clr++;
      req_put <= lat_fire ? !lat_armed && !(req_put && spaceav) : want_put(mode);
      data_in <= W'($urandom);
    end
  end

  // get side: compare with the scoreboard, retire words, drive requests
  always @(posedge clk_get) begin
    if (rst_n_get) begin
      if (datav) begin
        checks++;
        if (sb.size() == 0 || data_out != sb[0]) begin
          failures++;
          $display("ERROR @%0t: data_out %h, expected %h (queue %0d)", $time, data_out,
                   sb.size() ? sb[0] : '0, sb.size());
        end
        if (req_get) begin
          void'(sb.pop_front());
          n_get++;
          if (last_get) n_b2b_get++;
        end
      end else begin
        checks++;
        if (data_out != '0) begin
          failures++;
          $display("ERROR @%0t: data_out %h while datav low", $time, data_out);
        end
        n_zero_out++;
        if (req_get) n_get_wait++;
      end
      last_get = datav && req_get;
      if (dut.u_get.do_get && |(dut.u_get.row_clr & dut.u_get.row_ind)) n_get_b++;
      if (dut.u_get.sel_even) n_sel_even++;
      if (dut.u_get.sel_odd)  n_sel_odd++;
      if (|dut.u_get.row_clr) n_get_clr++;
      if (lat_armed && lat_result < 0) begin
        lat_edges++;
        if (datav) lat_result = lat_edges - 1;
      end
      req_get <= want_get(mode);
    end
  end

  task automatic run(mode_e m, int unsigned hpp, int unsigned hpg, int cycles);
    hp_put = hpp;
    hp_get = hpg;
    mode   = m;
    repeat (cycles) @(posedge clk_put);
  endtask


  task automatic force_get_all();
    // sender quiet, receiver keeps asking until the queue is empty
    mode = DRAIN;
    while (sb.size() != 0) @(posedge clk_get);
    repeat (4 * S + 8) @(posedge clk_get);
    mode = IDLE;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk_put);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g0, t0;
    real eff;
    repeat (4) @(posedge clk_put);
    rst_n_put = 1'b1;
    rst_n_get = 1'b1;

    // Latency through an empty FIFO, same clock period, offset phase.
    repeat (20) @(posedge clk_put);
    lat_fire = 1'b1;
    wait (lat_result >= 0 || lat_edges > 40);
    lat_fire = 1'b0;
    $display("fall-through latency: %0d clk_get edges after the put edge", lat_result);
    check(lat_result == S + 1 || lat_result == S + 2, "fall-through latency out of range");
    force_get_all();
    lat_armed = 1'b0;

    // The five traffic patterns at several clock-period ratios.
    run(FAST,       5, 5, 2000);
    run(RANDOM,     5, 5, 2000);
    run(NEAR_EMPTY, 5, 5, 2000);
    run(HALF,       5, 5, 2000);
    run(NEAR_FULL,  5, 5, 2000);
    run(FAST,       5, 8, 2000);
    run(RANDOM,     5, 8, 2000);
    run(NEAR_FULL,  5, 8, 2000);
    run(FAST,       7, 4, 2000);
    run(RANDOM,     7, 4, 2000);
    run(NEAR_EMPTY, 7, 4, 2000);
    run(HALF,       6, 5, 2000);
    run(NEAR_FULL,  3, 11, 2000);
    run(NEAR_EMPTY, 11, 3, 2000);

    // Throughput: both sides always requesting, equal periods.
    run(FAST, 5, 5, 100);
    g0 = n_get;
    t0 = 1000;
    repeat (t0) @(posedge clk_get);
    eff = real'(n_get - g0) / real'(t0);
    $display("efficiency at equal clocks: %0.3f words per cycle", eff);
    check(eff >= 0.99, "full-throughput efficiency below 0.99");

    force_get_all();
    check(sb.size() == 0 && !datav, "FIFO did not drain");

    $display("puts=%0d gets=%0d put_stalls=%0d get_waits=%0d zero_out=%0d full=%0d",
             n_put, n_get, n_put_stall, n_get_wait, n_zero_out, n_full);
    $display("put_b=%0d get_b=%0d two_slot=%0d sel_even=%0d sel_odd=%0d b2b_put=%0d b2b_get=%0d",
             n_put_b, n_get_b, n_two_slot, n_sel_even, n_sel_odd, n_b2b_put, n_b2b_get);
    check(n_put > 1000 && n_get > 1000,  "too few transfers");
    check(n_put_stall > 0, "sender never stalled on spaceav");
    check(n_full > 0,      "FIFO never completely full");
    check(n_get_wait > 0,  "receiver never waited for data");
    check(n_zero_out > 0,  "data_out never forced to zero");
    check(n_put_b > 0,     "put-side indicator (b) never used");
    check(n_get_b > 0,     "get-side indicator (b) never used");
    check(n_two_slot > 0,  "two-slot spaceav rule never exercised");
    check(n_sel_even > 0 && n_sel_odd > 0, "even or odd read bus never selected");
    check(n_b2b_put > 0 && n_b2b_get > 0, "no back-to-back transfers");
    check(n_put_clr > 0 && n_get_clr > 0, "synchronizer clears never seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_interleaved_fifo
