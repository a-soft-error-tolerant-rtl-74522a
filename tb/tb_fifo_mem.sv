// Self-checking testbench for fifo_mem (DEPTH 8 here). Random push/pop
// traffic is compared with a queue model, including full and empty; then
// the test port reads and writes cells in place while the pointers are kept,
// and a stuck-at injection is checked on the read path.
module tb_fifo_mem;
  localparam int WORD = 4, DEPTH = 8, AW = 3;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, empty, test_en = 0, t_we = 0, inj_en = 0;
  logic [WORD-1:0] din = '0, dout, t_wdata = '0, t_rdata, inj_sa0 = '0, inj_sa1 = '0;
  logic [AW-1:0] t_addr = '0, inj_addr = '0;
  logic [WORD-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  always #5 clk = ~clk;

  fifo_mem #(.WORD(WORD), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .push(push), .din(din), .pop(pop), .dout(dout),
    .full(full), .empty(empty), .test_en(test_en), .t_addr(t_addr), .t_we(t_we),
    .t_wdata(t_wdata), .t_rdata(t_rdata), .inj_en(inj_en), .inj_addr(inj_addr),
    .inj_sa0(inj_sa0), .inj_sa1(inj_sa1));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(dout == q[0], "dout");
      if (full) n_full++;
      if (empty) n_empty++;
      // bias toward filling in the first half, draining in the second
      push = (n < 300) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = (n < 300) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      din  = WORD'($urandom);
      @(posedge clk);
      begin
        bit dp, dq;
        dp = push && q.size() < DEPTH;
        dq = pop && q.size() > 0;
        if (dq) void'(q.pop_front());
        if (dp) q.push_back(din);
      end
    end
    @(negedge clk); push = 0; pop = 0;
    chk(n_full > 0 && n_empty > 0, "full and empty both reached");
    // fill to 5 entries, then test-port access
    while (q.size() < 5) begin
      push = 1; din = WORD'($urandom);
      @(posedge clk); q.push_back(din);
      @(negedge clk);
    end
    push = 0;
    test_en = 1;
    push = 1; pop = 1;           // must be ignored while test_en
    for (int k = 0; k < DEPTH; k++) begin
      t_addr = AW'(k); t_we = 1; t_wdata = WORD'(k ^ 5);
      @(negedge clk);
    end
    t_we = 0;
    for (int k = 0; k < DEPTH; k++) begin
      t_addr = AW'(k); #1;
      chk(t_rdata == WORD'(k ^ 5), "test-port readback");
    end
    inj_en = 1; inj_addr = 3'd2; inj_sa1 = 4'b1000; inj_sa0 = 4'b0001;
    t_addr = 3'd2; #1;
    chk(t_rdata == ((WORD'(2 ^ 5) | 4'b1000) & ~4'b0001), "stuck-at injection");
    t_addr = 3'd3; #1;
    chk(t_rdata == WORD'(3 ^ 5), "other cell unaffected");
    inj_en = 0;
    push = 0; pop = 0;
    @(negedge clk);
    test_en = 0;
    #1 chk(!empty && !full, "pointers kept through test access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
