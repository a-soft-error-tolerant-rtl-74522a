// Self-checking testbench for cdmr_mux. Builds three copies of a random
// value with random upsets, forms the select vector from the disagreement of
// the first two, and checks that the output equals the bitwise
// two-out-of-three majority whenever no bit is hit twice; checks the
// uncorrectable flag against its definition.
module tb_cdmr_mux;
  localparam int W = 17;
  logic [W-1:0] e1, e2, sel, e2m, out;
  logic unc;
  int checks = 0, failures = 0;

  cdmr_mux #(.WIDTH(W)) dut (.e1(e1), .e2(e2), .sel(sel), .e2_mismatch(e2m),
                             .out(out), .uncorrectable(unc));

  function automatic logic [W-1:0] maj3(input logic [W-1:0] x, y, z);
    return (x & y) | (x & z) | (y & z);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] v, f1, f2, c1, c2, c3;
      v  = W'($urandom);
      f1 = W'($urandom) & W'($urandom) & W'($urandom);
      f2 = W'($urandom) & W'($urandom) & W'($urandom) & ~f1;
      c1 = v ^ f1;
      c2 = v ^ f2;
      c3 = v;
      sel = c1 ^ c2;
      e1  = c1 & ~sel | (W'($urandom) & sel);   // disagreeing bits of E1 are held, arbitrary
      e2  = c3;
      e2m = W'($urandom) & W'($urandom);
      #1;
      checks++;
      if (out !== maj3(c1, c2, c3) || out !== v) begin
        failures++;
        $display("FAIL out=%h exp %h", out, maj3(c1, c2, c3));
      end
      checks++;
      if (unc !== |(sel & e2m)) begin
        failures++;
        $display("FAIL uncorrectable");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
