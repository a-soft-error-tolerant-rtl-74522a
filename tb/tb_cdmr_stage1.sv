// Self-checking testbench for cdmr_stage1: one true-form and one
// complementing instance. Checks the reset encoding, capture one cycle after
// en, hold while en is low, and inversion in the complementing branch.
module tb_cdmr_stage1;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, qt, qc, last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cdmr_stage1 #(.WIDTH(W), .INVERT(1'b0)) u_t (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(qt));
  cdmr_stage1 #(.WIDTH(W), .INVERT(1'b1)) u_c (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(qc));

  task automatic chk(input logic [W-1:0] et, input logic [W-1:0] ec, input string what);
    checks++;
    if (qt !== et || qc !== ec) begin
      failures++;
      $display("FAIL %s: qt=%h qc=%h exp %h %h", what, qt, qc, et, ec);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    chk('0, '1, "reset");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d  = W'($urandom);
      en = 1'($urandom);
      last = qt;
      @(posedge clk); #1;
      if (en) chk(d, ~d, "capture");
      else    chk(last, ~last, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
