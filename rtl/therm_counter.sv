// therm_counter: N-stage ring counter in thermometer (Johnson) code with a
// one-hot recoding of its count.
//
// On each cycle with inc high the register shifts left and takes the inverse of
// its top bit into bit 0, so it runs through 2N states: 0..0, 0..01, 0..011, ...,
// 1..1, 1..10, ... The count is the position of the single 0/1 boundary:
// count(q) = i where q[i] != q[i-1], and 0 when q[N-1] == q[0]; inverting all
// bits leaves the count unchanged, so the count wraps modulo N. The one-hot
// code is formed by XORing neighbouring bits, with an XNOR for the wrap-around
// bit 0. Both the current state (q, oh) and the state after the coming edge
// (q_next, oh_next) are brought out: the put side latches oh_next as its write
// select, the control logic uses oh for the row currently being accessed.
//
// Reset (asynchronous, active low) clears the counter to count 0 as in the
// design description; the reset style itself is a choice of this implementation.
// N must be at least 2.
module therm_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,      // advance by one on the next rising edge
  output logic [N-1:0] q,        // thermometer state
  output logic [N-1:0] q_next,   // state after the next rising edge
  output logic [N-1:0] oh,       // one-hot of count(q)
  output logic [N-1:0] oh_next   // one-hot of count(q_next)
);

  initial assert (N >= 2) else $fatal(1, "therm_counter: N must be >= 2");

  assign q_next = inc ? {q[N-2:0], ~q[N-1]} : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

  always_comb begin
    oh[0]      = ~(q[N-1] ^ q[0]);
    oh_next[0] = ~(q_next[N-1] ^ q_next[0]);
    for (int i = 1; i < N; i++) begin
      oh[i]      = q[i] ^ q[i-1];
      oh_next[i] = q_next[i] ^ q_next[i-1];
    end
  end

endmodule : therm_counter
