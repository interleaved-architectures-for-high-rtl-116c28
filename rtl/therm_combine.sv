// therm_combine: turns a (vertical, horizontal) pair of thermometer counters
// into the NV*NH bits of the equivalent N-stage thermometer counter, N = NV*NH.
//
// The pair counts c = count(qv) + NV*count(qh). Bit (i, j) of the combined code
// (flat index i + NV*j) is one of two neighbouring bits of the horizontal
// counter, chosen by comparing qv[i] with the parity of the column j:
//   qv[i] == j%2 : therm(i,j) = qh[j]
//   qv[i] != j%2 : therm(i,j) = qh[j-1]    (~qh[NH-1] for j == 0)
// This relies on NH being even: the vertical counter then changes phase
// (fills with ones or with zeros) exactly when count(qh) changes parity.
// Purely combinational: one 2:1 selection per storage latch, no carry chain.
module therm_combine #(
  parameter int unsigned NV = sfifo_pkg::DEF_NV,
  parameter int unsigned NH = sfifo_pkg::DEF_NH
) (
  input  logic [NV-1:0]          qv,
  input  logic [NH-1:0]          qh,
  output logic [NV-1:0][NH-1:0]  therm   // therm[i][j]: row i, column j
);

  initial assert (NH % 2 == 0 && NV % 2 == 0)
    else $fatal(1, "therm_combine: NV and NH must be even");

  always_comb begin
    for (int i = 0; i < NV; i++) begin
      for (int j = 0; j < NH; j++) begin
        if (qv[i] == 1'(j % 2)) therm[i][j] = qh[j];
        else if (j == 0)        therm[i][j] = ~qh[NH-1];
        else                    therm[i][j] = qh[j-1];
      end
    end
  end

endmodule : therm_combine
