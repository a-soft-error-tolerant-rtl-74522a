// Carry-lookahead adder: the functional module that the CDMR / two-stage TMR
// scheme protects (Module 1..4 of the datapath).
//
// The adder is split into 4-bit lookahead groups (cla4). Inside a group every
// bit forms generate g = a&b and propagate p = a^b and the group carries
// c1..c4 are computed in parallel from g, p and the group carry in. Group
// carries ripple from one group to the next. Purely combinational.
//
// Interface: a, b, cin in; sum = a + b + cin and cout out. WIDTH must be a
// multiple of 4; its default of 16 follows the 16-bit operands of the
// reference simulation. The group structure is this design's choice: only
// the signal names (g, p, c) of a lookahead adder are known.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NGRP = WIDTH / 4;

  logic [NGRP:0] gc;   // carry into each group

  assign gc[0] = cin;

  for (genvar k = 0; k < NGRP; k++) begin : g_grp
    cla4 u_grp (
      .a   (a[4*k +: 4]),
      .b   (b[4*k +: 4]),
      .cin (gc[k]),
      .sum (sum[4*k +: 4]),
      .cout(gc[k+1])
    );
  end

  assign cout = gc[NGRP];

  initial begin
    assert (WIDTH % 4 == 0 && WIDTH > 0)
      else $error("cla_adder: WIDTH must be a positive multiple of 4");
  end

endmodule
