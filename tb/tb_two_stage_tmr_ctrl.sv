// Self-checking testbench for two_stage_tmr_ctrl. Issues tasks with and
// without a primary disagreement and checks, cycle by cycle, the strobe
// sequence: load, primary capture, primary merge, then either done (3 cycles
// after start) or supplementary capture, supplementary merge and done
// (5 cycles after start), plus sel and supp_used. Counts both paths.
module tb_two_stage_tmr_ctrl;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] mm = '0, sel;
  logic busy, opnd_load, pri_cap, pri_merge, supp_active, supp_cap, supp_merge, done, supp_used;
  int checks = 0, failures = 0, n_agree = 0, n_supp = 0;

  always #5 clk = ~clk;

  two_stage_tmr_ctrl #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .pri_mismatch(mm), .busy(busy),
    .opnd_load(opnd_load), .pri_cap(pri_cap), .pri_merge(pri_merge),
    .supp_active(supp_active), .supp_cap(supp_cap), .supp_merge(supp_merge),
    .sel(sel), .done(done), .supp_used(supp_used));

  // expected strobes as a 8-bit vector
  function automatic logic [7:0] strobes();
    return {busy, opnd_load, pri_cap, pri_merge, supp_active, supp_cap, supp_merge, done};
  endfunction

  task automatic expect_s(input logic [7:0] e, input string what);
    checks++;
    if (strobes() !== e) begin
      failures++;
      $display("FAIL %s: strobes %b exp %b", what, strobes(), e);
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
    for (int n = 0; n < 60; n++) begin
      logic [W-1:0] v;
      int lat;
      v = (n % 2 == 1) ? (W'(1) << ($urandom % W)) | (W'($urandom) & W'($urandom) & W'($urandom)) : '0;
      @(negedge clk);
      expect_s(8'b0000_0000, "idle");
      start = 1;
      #1 expect_s(8'b0100_0000, "load");
      @(negedge clk); start = 0;
      lat = 1;
      expect_s(8'b1010_0000, "pri_cap");
      @(negedge clk); lat++;
      mm = v;
      #1 expect_s(8'b1001_0000, "pri_merge");
      @(negedge clk); lat++;
      mm = W'($urandom);   // must not matter any more
      if (v != 0) begin
        expect_s(8'b1000_1100, "supp_cap");
        @(negedge clk); lat++;
        expect_s(8'b1000_0010, "supp_merge");
        @(negedge clk); lat++;
      end
      expect_s(8'b1000_0001, "done");
      checks++;
      if (sel !== v || supp_used !== (v != 0)) begin
        failures++;
        $display("FAIL sel=%h exp %h supp_used=%b", sel, v, supp_used);
      end
      checks++;
      if (lat != ((v != 0) ? 5 : 3)) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      if (v != 0) n_supp++; else n_agree++;
      mm = '0;
      repeat ($urandom % 3) @(negedge clk);
    end
    checks++;
    if (n_agree == 0 || n_supp == 0) failures++;
    $display("primary-only tasks %0d, supplementary tasks %0d", n_agree, n_supp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
