// tb_fifo_out_stage: checks the glitch-blocking output register.
//
// Random load, selects and bus values are applied between clk_get edges. On
// an edge with load high data_out must become data_even (sel_even),
// data_odd (sel_odd) or zero (neither); with load low it must hold. Buses are
// also changed in the middle of a cycle with no select, as an unsynchronized
// source would, and data_out must stay put until the next edge.
module tb_fifo_out_stage;
  import sfifo_pkg::*;

  localparam int W = DEF_WIDTH;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, sel_even = 1'b0, sel_odd = 1'b0;
  logic [W-1:0] data_even = '0, data_odd = '0, data_out, expect_out = '0;
  int checks = 0, failures = 0;
  int n_zero = 0;

  fifo_out_stage #(.WIDTH(W)) dut (
    .clk_get(clk), .rst_n_get(rst_n), .load, .sel_even, .sel_odd, .data_even, .data_odd, .data_out
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (data_out != '0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      load      = 1'($urandom_range(3) != 0);
      case ($urandom_range(2))
        0: begin sel_even = 1'b1; sel_odd = 1'b0; end
        1: begin sel_even = 1'b0; sel_odd = 1'b1; end
        default: begin sel_even = 1'b0; sel_odd = 1'b0; end
      endcase
      data_even = W'($urandom);
      data_odd  = W'($urandom);
      if (load) expect_out = sel_even ? data_even : sel_odd ? data_odd : '0;
      if (load && !sel_even && !sel_odd) n_zero++;
      @(posedge clk);
      #1;
      checks++;
      if (data_out != expect_out) begin
        failures++;
        $display("ERROR @%0t: data_out %h expected %h", $time, data_out, expect_out);
      end
      // unselected buses wander mid-cycle: no effect before the next edge
      data_even = W'($urandom);
      data_odd  = W'($urandom);
      #2;
      checks++;
      if (data_out != expect_out) begin
        failures++;
        $display("ERROR @%0t: data_out changed between edges", $time);
      end
    end
    checks++;
    if (n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_fifo_out_stage
