// Output multiplexer of the CDMR datapath.
//
// Per bit it selects the primary voter's value e1 (sel = 0) or the
// supplementary voter's value e2 (sel = 1). The select vector is the set of
// bits on which the two primary copies disagreed. Where they agree their
// common value is the two-out-of-three majority whatever the third copy
// says; where they differ the third copy decides the majority. So this
// multiplexer realises the majority vote of the two-stage scheme without a
// separate voter. The per-bit select is this design's reading of how the
// multiplexer and the majority vote fit together.
//
// uncorrectable (this design's addition) is high when a bit taken from e2 was
// not confirmed by the supplementary pair either (e2_mismatch), i.e. the
// result bit comes from a held, not a freshly agreed, value.
// Purely combinational.
module cdmr_mux #(
  parameter int unsigned WIDTH = 17
) (
  input  logic [WIDTH-1:0] e1,
  input  logic [WIDTH-1:0] e2,
  input  logic [WIDTH-1:0] sel,
  input  logic [WIDTH-1:0] e2_mismatch,
  output logic [WIDTH-1:0] out,
  output logic             uncorrectable
);

  always_comb begin
    out           = (e1 & ~sel) | (e2 & sel);
    uncorrectable = |(sel & e2_mismatch);
  end

endmodule
