// FIFO memory with 4-bit words and a test port for in-field memory testing.
//
// Normal use: push writes din at the write pointer, pop advances the read
// pointer; dout always shows the head word (first-word fall-through); full
// and empty come from an occupancy counter. The document fixes the 4-bit
// word; depth, flags and handshake are this design's choices.
//
// Test use: while test_en is high the test port owns the storage array
// (push and pop are ignored, pointers and contents are kept): t_rdata is the
// word at t_addr in the same cycle, and t_we writes t_wdata there at the
// clock edge. A transparent test run through this port leaves the FIFO
// contents as they were.
//
// Fault injection (simulation hook, tie inj_en low in use): when inj_en is
// high the cell at inj_addr reads back with the inj_sa0 bits forced to 0 and
// the inj_sa1 bits forced to 1, modelling stuck-at faults in that cell.
//
// The array itself is not reset; pointers and the counter reset
// asynchronously (active low).
module fifo_mem #(
  parameter int unsigned WORD  = 4,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push,
  input  logic [WORD-1:0] din,
  input  logic            pop,
  output logic [WORD-1:0] dout,
  output logic            full,
  output logic            empty,
  input  logic            test_en,
  input  logic [AW-1:0]   t_addr,
  input  logic            t_we,
  input  logic [WORD-1:0] t_wdata,
  output logic [WORD-1:0] t_rdata,
  input  logic            inj_en,
  input  logic [AW-1:0]   inj_addr,
  input  logic [WORD-1:0] inj_sa0,
  input  logic [WORD-1:0] inj_sa1
);

  logic [WORD-1:0] mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     count;
  logic            do_push, do_pop;

  function automatic logic [WORD-1:0] rd_cell(input logic [AW-1:0] addr);
    logic [WORD-1:0] v;
    v = mem[addr];
    if (inj_en && addr == inj_addr) v = (v | inj_sa1) & ~inj_sa0;
    return v;
  endfunction

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    full    = (count == (AW+1)'(DEPTH));
    empty   = (count == '0);
    do_push = push && !test_en && !full;
    do_pop  = pop  && !test_en && !empty;
    dout    = rd_cell(rp);
    t_rdata = rd_cell(t_addr);
  end

  always_ff @(posedge clk) begin
    if (test_en && t_we) mem[t_addr] <= t_wdata;
    else if (do_push)    mem[wp]     <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

endmodule
