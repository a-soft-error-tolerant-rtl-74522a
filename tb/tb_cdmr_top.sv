// End-to-end testbench for cdmr_top at its default parameters (16-bit
// adder, 4-bit x 16-word FIFO).
//
// Adder side: random additions, without upsets and with upsets injected
// into one or more module copies. Checks the sum against the simulator's
// arithmetic, the complementary rail, the latency (3 cycles after start on
// the primary-only path, 5 with the supplementary stage), that the
// supplementary modules see zero operands unless they are active, and that
// a bit hit in both a primary and a supplementary copy is flagged
// uncorrectable.
// Memory side: fills the FIFO, runs the transparent test (no fault, data
// kept), injects a stuck-at fault and checks it is located, then drains the
// FIFO through full and empty.
// Each mechanism is counted and must occur at least once.
module tb_cdmr_top;
  localparam int WIDTH = 16, RW = 17, WORD = 4, DEPTH = 16, AW = 4;

  logic clk = 0, rst_n = 0;
  logic start = 0, cin = 0;
  logic [WIDTH-1:0] a = '0, b = '0, result, result_n;
  logic [3:0][RW-1:0] seu_mask = '0;
  logic busy, done, cout, cout_n, supp_used, uncorrectable, pri_err, supp_err;
  logic push = 0, pop = 0, full, empty, mt_start = 0, mt_busy, mt_done, mt_fault;
  logic [WORD-1:0] din = '0, dout, mt_fault_bits, mt_result;
  logic [AW-1:0] mt_fault_addr;
  logic inj_en = 0;
  logic [AW-1:0] inj_addr = '0;
  logic [WORD-1:0] inj_sa0 = '0, inj_sa1 = '0;

  int checks = 0, failures = 0;
  int n_primary_only = 0, n_supplementary = 0, n_held_bits = 0, n_uncorrectable = 0;
  int n_mt_pass = 0, n_mt_fault = 0, n_full = 0, n_empty = 0, n_supp_idle_ok = 0;

  always #5 clk = ~clk;

  cdmr_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .cin(cin),
    .seu_mask(seu_mask), .busy(busy), .done(done), .result(result), .cout(cout),
    .result_n(result_n), .cout_n(cout_n), .pri_err(pri_err), .supp_err(supp_err),
    .supp_used(supp_used), .uncorrectable(uncorrectable),
    .push(push), .din(din), .pop(pop), .dout(dout), .full(full), .empty(empty),
    .mt_start(mt_start), .mt_busy(mt_busy), .mt_done(mt_done), .mt_fault(mt_fault),
    .mt_fault_addr(mt_fault_addr), .mt_fault_bits(mt_fault_bits), .mt_result(mt_result),
    .inj_en(inj_en), .inj_addr(inj_addr), .inj_sa0(inj_sa0), .inj_sa1(inj_sa1));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // the supplementary modules must stay idle (zero operands) outside their
  // capture cycle
  always @(negedge clk) if (rst_n && !dut.supp_active && seu_mask[2] == '0 && seu_mask[3] == '0) begin
    if (dut.mod_out[2] != '0 || dut.mod_out[3] != '0) begin
      failures++;
      $display("FAIL supplementary modules active outside supplementary stage");
    end else n_supp_idle_ok++;
  end

  // one addition; m0..m3 are the upset masks of modules 1..4
  task automatic add_op(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb_, input logic tc,
                        input logic [RW-1:0] m0, m1, m2, m3, input bit expect_unc);
    logic [RW-1:0] exp;
    int lat;
    bit want_supp;
    exp = {1'b0, ta} + {1'b0, tb_} + RW'(tc);
    want_supp = ((m0 ^ m1) != '0);
    @(negedge clk);
    a = ta; b = tb_; cin = tc;
    seu_mask[0] = m0; seu_mask[1] = m1; seu_mask[2] = m2; seu_mask[3] = m3;
    start = 1;
    @(negedge clk);
    start = 0;
    a = WIDTH'($urandom); b = WIDTH'($urandom);   // operands are latched
    lat = 1;
    while (!done && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    seu_mask = '0;
    chk(lat == (want_supp ? 5 : 3), $sformatf("latency %0d, supplementary %0b", lat, want_supp));
    chk(supp_used == want_supp, "supp_used");
    if (!expect_unc) begin
      chk({cout, result} == exp, $sformatf("%h+%h+%b = %b_%h, expected %h", ta, tb_, tc, cout, result, exp));
      chk(!uncorrectable, "not uncorrectable");
    end else begin
      chk(uncorrectable, "uncorrectable flagged");
      if (uncorrectable) n_uncorrectable++;
    end
    chk({cout_n, result_n} == ~{cout, result}, "complementary rail");
    if (want_supp) begin
      n_supplementary++;
      n_held_bits += $countones(m0 ^ m1);
    end else n_primary_only++;
  endtask

  function automatic logic [RW-1:0] onebit();
    return RW'(1) << ($urandom % RW);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD-1:0] fifo_ref [$];
    logic [RW-1:0] m;
    #12 rst_n = 1;

    // ---------------- adder under CDMR / two-stage TMR ----------------
    add_op(16'hAAAA, 16'h0000, 1'b0, '0, '0, '0, '0, 0);      // operands of the reference run
    add_op(16'hAAAA, 16'h0000, 1'b0, 17'h00001, '0, '0, '0, 0); // same, LSB upset in module 1
    for (int n = 0; n < 200; n++)
      add_op(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom), '0, '0, '0, '0, 0);
    for (int n = 0; n < 200; n++) begin
      case (n % 5)
        0: add_op(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom), onebit(), '0, '0, '0, 0);
        1: add_op(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom), '0, onebit(), '0, '0, 0);
        2: add_op(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom),
                  RW'($urandom) & RW'($urandom), '0, '0, '0, 0);        // multi-bit upset in one copy
        3: begin                                                        // upsets in primary and supplementary, different bits
          m = onebit();
          add_op(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom), m, '0, (m << 1) | (m >> (RW - 1)), '0, 0);
        end
        default: add_op(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom), '0, '0, onebit(), onebit(), 0);
      endcase
    end
    // same bit hit in a primary and in a supplementary copy
    for (int n = 0; n < 5; n++) begin
      m = onebit();
      add_op(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom), m, '0, m, '0, 1);
    end
    add_op(16'h1234, 16'h4321, 1'b0, '0, '0, '0, '0, 0);       // recovers afterwards

    // ---------------- FIFO with transparent memory test ----------------
    @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      push = 1; din = WORD'($urandom);
      fifo_ref.push_back(din);
      @(negedge clk);
    end
    push = 0;
    mt_start = 1;
    @(negedge clk);
    mt_start = 0;
    begin
      int c = 0;
      while (!mt_done && c < 1000) begin
        @(negedge clk);
        c++;
      end
      chk(c == 6 * DEPTH, $sformatf("memory test took %0d cycles, expected %0d", c, 6 * DEPTH));
    end
    chk(!mt_fault, "fault-free memory passes");
    if (!mt_fault) n_mt_pass++;
    // stuck-at on location 6
    inj_en = 1; inj_addr = 4'd6;
    inj_sa1 = 4'b1000; inj_sa0 = 4'b0000;
    if (fifo_ref[6][3]) begin inj_sa1 = 4'b0000; inj_sa0 = 4'b1000; end
    mt_start = 1;
    @(negedge clk);
    mt_start = 0;
    while (!mt_done) @(negedge clk);
    chk(mt_fault && mt_fault_addr == 4'd6 && mt_fault_bits == 4'b1000, "stuck-at cell located");
    if (mt_fault) n_mt_fault++;
    inj_en = 0;
    // FIFO contents survived both tests; fill to full, drain to empty
    while (!full) begin
      push = 1; din = WORD'($urandom);
      fifo_ref.push_back(din);
      @(negedge clk);
    end
    push = 0;
    chk(fifo_ref.size() == DEPTH, "full at DEPTH words");
    n_full++;
    while (!empty) begin
      chk(dout == fifo_ref.pop_front(), "FIFO data kept through transparent test");
      pop = 1;
      @(negedge clk);
    end
    pop = 0;
    chk(fifo_ref.size() == 0, "empty after DEPTH pops");
    n_empty++;

    $display("primary-only %0d, supplementary %0d, held bits %0d, uncorrectable %0d",
             n_primary_only, n_supplementary, n_held_bits, n_uncorrectable);
    $display("memory test pass %0d, fault found %0d, fifo full %0d, empty %0d, idle-supp cycles %0d",
             n_mt_pass, n_mt_fault, n_full, n_empty, n_supp_idle_ok);
    chk(n_primary_only > 0, "primary-only path exercised");
    chk(n_supplementary > 0, "supplementary stage exercised");
    chk(n_held_bits > 0, "voter hold exercised");
    chk(n_uncorrectable > 0, "uncorrectable case exercised");
    chk(n_mt_pass > 0 && n_mt_fault > 0, "memory test pass and detect");
    chk(n_full > 0 && n_empty > 0, "FIFO full and empty");
    chk(n_supp_idle_ok > 0, "supplementary idle checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
