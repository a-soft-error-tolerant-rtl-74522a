// Self-checking testbench for cla_adder at its default 16-bit width.
// Drives corner cases (carry chains through every group, all ones, zero)
// and random operands, and compares {cout, sum} with a + b + cin computed
// by the simulator's own arithmetic. A second instance at 8 bits checks the
// width parameter.
module tb_cla_adder;
  localparam int W = 16;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic [7:0]   a8, b8, s8;
  logic         c8i, c8o;
  int checks = 0, failures = 0;

  cla_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  cla_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(c8i), .sum(s8), .cout(c8o));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", ta, tb_, tc, cout, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0000, 1'b0);
    check(16'hFFFF, 16'h0000, 1'b1);
    check(16'hFFFF, 16'hFFFF, 1'b1);
    check(16'hAAAA, 16'h0000, 1'b1);   // operand pattern of the reference run
    check(16'hAAAA, 16'h5555, 1'b1);
    check(16'h000F, 16'h0001, 1'b0);
    check(16'h00FF, 16'h0001, 1'b0);
    check(16'h0FFF, 16'h0001, 1'b0);
    check(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k < 16; k++) check(16'(1) << k, 16'hFFFF >> (15 - k), 1'b0);
    for (int n = 0; n < 2000; n++) check(16'($urandom), 16'($urandom), 1'($urandom));
    for (int n = 0; n < 300; n++) begin
      logic [8:0] e8;
      a8 = 8'($urandom); b8 = 8'($urandom); c8i = 1'($urandom);
      #1;
      e8 = {1'b0, a8} + {1'b0, b8} + 9'(c8i);
      checks++;
      if ({c8o, s8} !== e8) begin
        failures++;
        $display("FAIL8 a=%h b=%h", a8, b8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
