// slot_status: per-latch empty/full status of the FIFO storage array.
//
// A latch holds a word exactly when the combined thermometer codes of the put
// pointer and the get pointer differ at its position, so the status is one
// XNOR (empty) and one inverter (full) per latch, with no pointer arithmetic.
// The two inputs come from different clock domains: each output is only ever
// sampled through a synchronizer (or, for the controller that owns the
// changing input, in the domain where its own changes are synchronous).
module slot_status #(
  parameter int unsigned NV = sfifo_pkg::DEF_NV,
  parameter int unsigned NH = sfifo_pkg::DEF_NH
) (
  input  logic [NV-1:0][NH-1:0] therm_put,
  input  logic [NV-1:0][NH-1:0] therm_get,
  output logic [NV-1:0][NH-1:0] empty,
  output logic [NV-1:0][NH-1:0] full
);

  assign empty = ~(therm_put ^ therm_get);
  assign full  = ~empty;

endmodule : slot_status
