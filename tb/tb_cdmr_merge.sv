// Self-checking testbench for cdmr_merge (complementary voter).
// A reference model keeps its own copy of the voter state: bits whose true
// and complemented inputs agree are loaded, others are held. Random single
// and multiple bit upsets are applied to either copy. Also checks y_n,
// mismatch, err and that nothing changes while en is low.
module tb_cdmr_merge;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] t = '0, c = '1, y, y_n, mm, ref_y;
  logic err;
  int checks = 0, failures = 0, held_bits = 0;

  always #5 clk = ~clk;

  cdmr_merge #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .t(t), .c(c),
                               .y(y), .y_n(y_n), .mismatch(mm), .err(err));

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_y = '0;
    #12;
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [W-1:0] v, ft, fc, exp_mm;
      @(negedge clk);
      v  = W'($urandom);
      ft = ($urandom % 3 == 0) ? W'(1) << ($urandom % W) : '0;
      fc = ($urandom % 4 == 0) ? W'($urandom) & W'($urandom) : '0;
      t  = v ^ ft;
      c  = ~v ^ fc;
      en = ($urandom % 8 != 0);
      exp_mm = ft ^ fc;
      #1;
      checks++;
      if (mm !== exp_mm || err !== (|exp_mm)) begin
        failures++;
        $display("FAIL mismatch %h exp %h", mm, exp_mm);
      end
      if (en) begin
        ref_y = (t & ~exp_mm) | (ref_y & exp_mm);
        held_bits += $countones(exp_mm);
      end
      @(posedge clk); #1;
      checks++;
      if (y !== ref_y || y_n !== ~ref_y) begin
        failures++;
        $display("FAIL y=%h y_n=%h exp %h", y, y_n, ref_y);
      end
    end
    checks++;
    if (held_bits == 0) begin
      failures++;
      $display("FAIL no bit was ever held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
