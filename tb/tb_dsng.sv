// tb_dsng: self-checking testbench for the stochastic number generator
// comparator. Checks a unipolar and a bipolar 8-bit instance exhaustively
// against (rn < x) and (rn < x + 128 mod 256), and checks that a long stream
// of comparisons against a uniform random number has a ones-density equal to
// the encoded value.
module tb_dsng;
  localparam int unsigned W = 8;

  logic [W-1:0] x, rn;
  logic bu, bb;
  int checks = 0;
  int failures = 0;

  dsng #(.W(W), .BIPOLAR(1'b0)) dut_u (.x, .rn, .bit_o(bu));
  dsng #(.W(W), .BIPOLAR(1'b1)) dut_b (.x, .rn, .bit_o(bb));

  initial begin
    for (int xi = 0; xi < (1 << W); xi++) begin
      int ones;
      int expb;
      ones = 0;
      for (int ri = 0; ri < (1 << W); ri++) begin
        x = W'(xi);
        rn = W'(ri);
        #1;
        checks++;
        if (bu !== (ri < xi)) begin
          failures++;
          $display("FAIL unipolar x=%0d rn=%0d bit=%0d", xi, ri, bu);
        end
        // bipolar: two's-complement x in [-1,1) maps to p = (x+1)/2
        expb = (ri < ((xi >= 128) ? xi - 128 : xi + 128)) ? 1 : 0;
        checks++;
        if (int'(bb) != expb) begin
          failures++;
          $display("FAIL bipolar x=%0d rn=%0d bit=%0d", xi, ri, bb);
        end
        ones += int'(bu);
      end
      // over all random numbers, the count of ones is exactly x
      checks++;
      if (ones != xi) begin
        failures++;
        $display("FAIL density x=%0d ones=%0d", xi, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
