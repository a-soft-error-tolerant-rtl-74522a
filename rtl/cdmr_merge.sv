// Second stage of a CDMR pair: the complementary voter (E1, E2).
//
// It takes the true copy t and the complemented copy c of one result. A bit
// whose copies agree (t == ~c) is loaded into the output register; a bit
// whose copies disagree keeps its previous value, so a soft error that hits
// one copy is held off instead of propagating (the hold / latch behaviour of
// the voter). The voter has two complementary outputs, y and y_n, which can
// feed the next stage as a new true/complement pair without duplicating the
// voter. mismatch shows, combinationally, the bits on which the copies
// disagree now, and err is their OR.
//
// The per-bit hold follows the document; realising it as a flip-flop with a
// per-bit load enable (rather than a feedback latch) is this design's choice.
// Timing: with en high, y reflects the agreeing bits one cycle later.
// Asynchronous active-low reset clears y.
module cdmr_merge #(
  parameter int unsigned WIDTH = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] t,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] y_n,
  output logic [WIDTH-1:0] mismatch,
  output logic             err
);

  logic [WIDTH-1:0] agree;

  always_comb begin
    agree    = ~(t ^ ~c);   // 1 where t equals the inverse of c
    mismatch = ~agree;
    err      = |mismatch;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else if (en) y <= (t & agree) | (y & mismatch);
  end

  assign y_n = ~y;

endmodule
