// Self-checking testbench for soa_mats_test. The memory is modelled here
// (DEPTH 8, 4-bit words) with optional faults on one cell: stuck-at bits and
// transition faults (a bit that cannot rise or cannot fall). Runs:
//   1. fault-free: no fault reported, every word unchanged, 6*DEPTH cycles;
//   2. the worked example: word 1010, MSB stuck at 1; after the inverting
//      write the cell holds 1101, the j=1 compare gives 0111;
//   3. a bit that cannot fall from 1 to 0 on a word whose bit is 0, which
//      only the j=2 read catches;
//   4. a bit that cannot rise, caught in j=1.
module tb_soa_mats_test;
  localparam int WORD = 4, DEPTH = 8, AW = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic m_en, m_we, busy, done, fault;
  logic [AW-1:0] m_addr, fault_addr;
  logic [WORD-1:0] m_wdata, m_rdata, fault_bits, result;
  logic [WORD-1:0] mem [DEPTH];
  logic [WORD-1:0] snap [DEPTH];
  // fault model of cell f_addr
  logic [AW-1:0] f_addr = '0;
  logic [WORD-1:0] f_sa1 = '0, f_sa0 = '0, f_no_rise = '0, f_no_fall = '0;
  int checks = 0, failures = 0, cyc = 0;
  int n_j1_detect = 0, n_j2_detect = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  soa_mats_test #(.WORD(WORD), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .m_en(m_en), .m_addr(m_addr),
    .m_we(m_we), .m_wdata(m_wdata), .m_rdata(m_rdata), .busy(busy), .done(done),
    .fault(fault), .fault_addr(fault_addr), .fault_bits(fault_bits), .result(result));

  // observe location 5 from the memory port: cycles 0..5 at that address are
  // read/act of j=0, j=1, j=2; the j=1 read is cycle 2 and its compare
  // result is visible from cycle 4
  int k5 = 0;
  logic [WORD-1:0] rd5_j1 = '0, res5_j1 = '0;
  always @(posedge clk) if (m_en && m_addr == 3'd5) begin
    if (k5 == 2) rd5_j1 <= m_rdata;
    if (k5 == 4) res5_j1 <= result;
    k5 <= k5 + 1;
  end

  always_comb begin
    m_rdata = mem[m_addr];
    if (m_addr == f_addr) m_rdata = (m_rdata | f_sa1) & ~f_sa0;
  end

  always @(posedge clk) begin
    if (m_en && m_we) begin
      logic [WORD-1:0] old, nw;
      old = mem[m_addr];
      nw  = m_wdata;
      if (m_addr == f_addr) begin
        nw = (nw & ~(f_no_rise & ~old)) | (old & f_no_rise & ~old);   // rising bits stay 0
        nw = nw | (f_no_fall & old);                                    // falling bits stay 1
      end
      mem[m_addr] <= nw;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_test(output int cycles);
    int c0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    c0 = cyc;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    for (int k = 0; k < DEPTH; k++) begin
      mem[k] = WORD'($urandom);
      snap[k] = mem[k];
    end
    #12 rst_n = 1;

    // 1. fault-free
    run_test(cycles);
    chk(!fault, "fault-free: no fault");
    chk(cycles == 6 * DEPTH, $sformatf("fault-free: %0d cycles, expected %0d", cycles, 6 * DEPTH));
    for (int k = 0; k < DEPTH; k++) chk(mem[k] == snap[k], "fault-free: contents kept");
    chk(!busy && !m_en, "idle after test");

    // 2. worked example: 1010, MSB stuck at 1, at location 5
    mem[5] = 4'b1010;
    f_addr = 3'd5; f_sa1 = 4'b1000;
    k5 = 0;
    run_test(cycles);
    chk(rd5_j1 == 4'b1101, $sformatf("example: j=1 read %b expected 1101", rd5_j1));
    chk(res5_j1 == 4'b0111, $sformatf("example: result %b expected 0111", res5_j1));
    chk(fault && fault_addr == 3'd5 && fault_bits == 4'b1000, "example: MSB of location 5 reported");
    n_j1_detect++;
    f_sa1 = '0;

    // 3. bit 1 of location 2 cannot fall: word has bit 1 = 0, so j=0 raises
    //    it, the restore in j=1 cannot lower it, j=2 sees a 1
    mem[2] = 4'b0101;
    f_addr = 3'd2; f_no_fall = 4'b0010;
    run_test(cycles);
    chk(fault && fault_addr == 3'd2 && fault_bits == 4'b0010, "no-fall fault found at location 2, bit 1");
    n_j2_detect++;
    f_no_fall = '0;
    mem[2] = 4'b0101;

    // 4. bit 2 of location 7 cannot rise: word has bit 2 = 0
    mem[7] = 4'b0011;
    f_addr = 3'd7; f_no_rise = 4'b0100;
    run_test(cycles);
    chk(fault && fault_addr == 3'd7 && fault_bits == 4'b0100, "no-rise fault found at location 7, bit 2");
    n_j1_detect++;
    f_no_rise = '0;

    $display("j=1 detections %0d, j=2 detections %0d", n_j1_detect, n_j2_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
