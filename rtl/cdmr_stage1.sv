// First stage of a complementary dual-modular-redundancy (CDMR) pair.
//
// Each of the four stage-1 blocks (A, B, C, D) captures the result of one
// module copy. In a CDMR pair one copy travels in true form and the other in
// complemented form, so the two copies that reach the merging stage are
// expected to be bitwise inverses of each other. Here the inversion is done
// in this register (INVERT = 1 for B and D), so all module copies can stay
// identical; the document places an inverting module in one branch, and
// putting the inverter in the stage-1 register is this design's choice.
//
// Interface: d is captured on the rising clock edge when en is high; q holds
// it (inverted when INVERT). Asynchronous active-low reset to the encoding of
// zero: 0 for a true branch, all ones for a complemented branch, so that a
// pair agrees after reset. One cycle from d to q.
module cdmr_stage1 #(
  parameter int unsigned WIDTH  = 17,
  parameter bit          INVERT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= INVERT ? '1 : '0;
    else if (en) q <= INVERT ? ~d : d;
  end

endmodule
