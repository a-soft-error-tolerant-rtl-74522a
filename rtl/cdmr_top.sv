// Soft-error tolerant adder with complementary dual modular redundancy
// (CDMR) run as two-stage TMR, and beside it a FIFO memory with a
// transparent in-field memory test.
//
// Datapath (one operation at a time):
//   * Four identical cla_adder copies (modules 1..4) compute {cout, sum}
//     from a latched operand register.
//   * Stage 1: blocks A and C capture modules 1 and 3 in true form, blocks
//     B and D capture modules 2 and 4 complemented, so each pair carries a
//     true and a complementary copy.
//   * Stage 2: voters E1 (A, B) and E2 (C, D) load the bits on which their
//     pair agrees and hold the others.
//   * Primary stage = modules 1, 2 / A, B / E1. If that pair agrees, the
//     result is final and modules 3, 4 are never exercised: their operands
//     stay at zero and C, D, E2 are not clocked. If it disagrees, the
//     supplementary stage (modules 3, 4 / C, D / E2) computes the third copy
//     and the output multiplexer takes, per disagreeing bit, E2's value,
//     which is the two-out-of-three majority.
//   * two_stage_tmr_ctrl sequences this: done comes 3 cycles after start
//     when the primary pair agrees and 5 cycles after start otherwise
//     (supp_used = 1). result/cout are valid while done is high and stay
//     until the next operation. uncorrectable flags a result bit that no
//     pair confirmed.
// result_n/cout_n is the complementary rail taken from the voters' inverted
// outputs; pri_err and supp_err show the primary and the supplementary pair's
// disagreement while each is merged.
// seu_mask[k] is XORed into module k+1's result to emulate single-event
// transients in simulation; tie it to zero in use.
//
// Memory side: fifo_mem (4-bit words) and soa_mats_test. mt_start runs the
// transparent SOA-MATS++ test over every location while the FIFO is frozen;
// mt_fault/mt_fault_addr/mt_fault_bits report the first fault found and
// mt_result the last compare pattern. The
// inj_* inputs force stuck-at bits into one cell for simulation. The two
// sides share only clock and reset.
//
// The pairing of the four modules into the primary and supplementary
// stages, the operand isolation of the supplementary modules and the cycle
// plan are this design's reading of the document; the stage structure, the
// complementary copies, the hold-on-disagreement voter and the skipped third
// copy follow it.
module cdmr_top #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned WORD  = 4,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned RW   = WIDTH + 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // protected adder
  input  logic                  start,
  input  logic [WIDTH-1:0]      a,
  input  logic [WIDTH-1:0]      b,
  input  logic                  cin,
  input  logic [3:0][RW-1:0]    seu_mask,
  output logic                  busy,
  output logic                  done,
  output logic [WIDTH-1:0]      result,
  output logic                  cout,
  output logic [WIDTH-1:0]      result_n,
  output logic                  cout_n,
  output logic                  pri_err,
  output logic                  supp_err,
  output logic                  supp_used,
  output logic                  uncorrectable,
  // FIFO memory
  input  logic                  push,
  input  logic [WORD-1:0]       din,
  input  logic                  pop,
  output logic [WORD-1:0]       dout,
  output logic                  full,
  output logic                  empty,
  // transparent memory test
  input  logic                  mt_start,
  output logic                  mt_busy,
  output logic                  mt_done,
  output logic                  mt_fault,
  output logic [AW-1:0]         mt_fault_addr,
  output logic [WORD-1:0]       mt_fault_bits,
  output logic [WORD-1:0]       mt_result,
  input  logic                  inj_en,
  input  logic [AW-1:0]         inj_addr,
  input  logic [WORD-1:0]       inj_sa0,
  input  logic [WORD-1:0]       inj_sa1
);

  // ------------------------------------------------------------------
  // CDMR / two-stage TMR datapath
  // ------------------------------------------------------------------
  logic             opnd_load, pri_cap, pri_merge;
  logic             supp_active, supp_cap, supp_merge;
  logic [RW-1:0]    sel;
  logic [WIDTH-1:0] op_a, op_b;
  logic             op_c;
  logic [3:0][RW-1:0] mod_out;
  logic [3:0][RW-1:0] st1_q;
  logic [RW-1:0]    e1_y, e1_y_n, e1_mm, e2_y, e2_y_n, e2_mm;
  logic             e1_err;
  logic [RW-1:0]    final_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a <= '0;
      op_b <= '0;
      op_c <= 1'b0;
    end else if (opnd_load) begin
      op_a <= a;
      op_b <= b;
      op_c <= cin;
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_mod
    // modules 3 and 4 (k = 2, 3) belong to the supplementary stage and see
    // zero operands unless it is active
    localparam bit SUPP = (k >= 2);
    logic             live;
    logic [WIDTH-1:0] s;
    logic             co;

    assign live = SUPP ? supp_active : 1'b1;

    cla_adder #(.WIDTH(WIDTH)) u_add (
      .a   (live ? op_a : '0),
      .b   (live ? op_b : '0),
      .cin (live & op_c),
      .sum (s),
      .cout(co)
    );

    assign mod_out[k] = {co, s} ^ seu_mask[k];

    // A (k=0), B (k=1), C (k=2), D (k=3); B and D complement
    cdmr_stage1 #(.WIDTH(RW), .INVERT(k % 2 == 1)) u_st1 (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (SUPP ? supp_cap : pri_cap),
      .d    (mod_out[k]),
      .q    (st1_q[k])
    );
  end

  cdmr_merge #(.WIDTH(RW)) u_e1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (pri_merge),
    .t       (st1_q[0]),
    .c       (st1_q[1]),
    .y       (e1_y),
    .y_n     (e1_y_n),
    .mismatch(e1_mm),
    .err     (e1_err)
  );

  cdmr_merge #(.WIDTH(RW)) u_e2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (supp_merge),
    .t       (st1_q[2]),
    .c       (st1_q[3]),
    .y       (e2_y),
    .y_n     (e2_y_n),
    .mismatch(e2_mm),
    .err     (supp_err)
  );

  // bits the supplementary pair left unconfirmed, frozen with E2
  logic [RW-1:0] e2_mm_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          e2_mm_q <= '0;
    else if (supp_merge) e2_mm_q <= e2_mm;
    else if (pri_merge)  e2_mm_q <= '0;
  end

  two_stage_tmr_ctrl #(.WIDTH(RW)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .pri_mismatch(e1_mm),
    .busy        (busy),
    .opnd_load   (opnd_load),
    .pri_cap     (pri_cap),
    .pri_merge   (pri_merge),
    .supp_active (supp_active),
    .supp_cap    (supp_cap),
    .supp_merge  (supp_merge),
    .sel         (sel),
    .done        (done),
    .supp_used   (supp_used)
  );

  cdmr_mux #(.WIDTH(RW)) u_mux (
    .e1           (e1_y),
    .e2           (e2_y),
    .sel          (sel),
    .e2_mismatch  (e2_mm_q),
    .out          (final_out),
    .uncorrectable(uncorrectable)
  );

  // complementary result rail: mux of the voters' complemented outputs
  logic [RW-1:0] final_out_n;
  assign final_out_n = (e1_y_n & ~sel) | (e2_y_n & sel);
  assign result_n = final_out_n[WIDTH-1:0];
  assign cout_n   = final_out_n[WIDTH];
  // primary pair disagrees right now (meaningful while E1 merges)
  assign pri_err  = e1_err;
  assign result   = final_out[WIDTH-1:0];
  assign cout     = final_out[WIDTH];

  // ------------------------------------------------------------------
  // FIFO memory and its transparent SOA-MATS++ test
  // ------------------------------------------------------------------
  logic            m_en, m_we;
  logic [AW-1:0]   m_addr;
  logic [WORD-1:0] m_wdata, m_rdata;

  fifo_mem #(.WORD(WORD), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (push),
    .din     (din),
    .pop     (pop),
    .dout    (dout),
    .full    (full),
    .empty   (empty),
    .test_en (m_en),
    .t_addr  (m_addr),
    .t_we    (m_we),
    .t_wdata (m_wdata),
    .t_rdata (m_rdata),
    .inj_en  (inj_en),
    .inj_addr(inj_addr),
    .inj_sa0 (inj_sa0),
    .inj_sa1 (inj_sa1)
  );

  soa_mats_test #(.WORD(WORD), .DEPTH(DEPTH)) u_mats (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (mt_start),
    .m_en      (m_en),
    .m_addr    (m_addr),
    .m_we      (m_we),
    .m_wdata   (m_wdata),
    .m_rdata   (m_rdata),
    .busy      (mt_busy),
    .done      (mt_done),
    .fault     (mt_fault),
    .fault_addr(mt_fault_addr),
    .fault_bits(mt_fault_bits),
    .result    (mt_result)
  );

endmodule
