// tb_sobol_rng: self-checking testbench for the Sobol generator.
//
// Runs an 8-dimension, 8-bit generator through more than one full period of
// 256 points and checks, independently of the generator's recurrence:
//   - dimension 1 equals the bit-reversed Gray code of the index;
//   - the first eight points of dimensions 2 and 3 match published values;
//   - over one period every dimension visits each 8-bit value exactly once;
//   - dimensions 1 and 2 form a (0,8,2)-net: every elementary box of area
//     2^-8 holds exactly one point;
//   - the generator holds its point while en is low and restarts after wrap.
module tb_sobol_rng;
  localparam int unsigned DIMS = 8;
  localparam int unsigned RW   = 8;
  localparam int unsigned P    = 1 << RW;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [RW-1:0] rn [DIMS];

  int checks = 0;
  int failures = 0;

  sobol_rng #(.DIMS(DIMS), .RW(RW)) dut (.clk, .rst_n, .en, .rn);

  always #5 clk = ~clk;

  logic [RW-1:0] pts [DIMS][P];

  function automatic logic [RW-1:0] bitrev(input logic [RW-1:0] v);
    logic [RW-1:0] r;
    for (int i = 0; i < RW; i++) r[i] = v[RW-1-i];
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // published first points (Gray-code order), as 8-bit fractions
  localparam logic [7:0] D2 [8] = '{0, 128, 64, 192, 96, 224, 32, 160};
  localparam logic [7:0] D3 [8] = '{0, 128, 64, 192, 160, 32, 224, 96};

  initial begin
    rst_n = 1'b0;
    en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < P; n++) begin
      for (int d = 0; d < DIMS; d++) pts[d][n] = rn[d];
      check(rn[0] == bitrev(RW'(n ^ (n >> 1))), $sformatf("dim1 point %0d = %0d", n, rn[0]));
      if (n < 8) begin
        check(rn[1] == D2[n], $sformatf("dim2 point %0d = %0d exp %0d", n, rn[1], D2[n]));
        check(rn[2] == D3[n], $sformatf("dim3 point %0d = %0d exp %0d", n, rn[2], D3[n]));
      end
      if (n == 37) begin  // hold while en is low
        logic [RW-1:0] keep;
        keep = rn[4];
        repeat (3) @(negedge clk);
        check(rn[4] == keep, "hold with en low");
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
    end
    // wrapped: back to point 0, then point 1
    check(rn[0] == 0 && rn[1] == 0 && rn[7] == 0, "wrap to point 0");
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    for (int d = 0; d < DIMS; d++)
      check(rn[d] == pts[d][1], $sformatf("dim%0d point 1 after wrap", d + 1));

    // permutation property of every dimension
    for (int d = 0; d < DIMS; d++) begin
      int seen [P];
      bit ok;
      for (int v = 0; v < P; v++) seen[v] = 0;
      for (int n = 0; n < P; n++) seen[pts[d][n]]++;
      ok = 1'b1;
      for (int v = 0; v < P; v++) if (seen[v] != 1) ok = 1'b0;
      check(ok, $sformatf("dim%0d is a permutation", d + 1));
    end

    // (0,8,2)-net property of dimensions 1 and 2
    for (int k = 0; k <= RW; k++) begin
      int box [P];
      bit ok;
      for (int c = 0; c < P; c++) box[c] = 0;
      for (int n = 0; n < P; n++) begin
        int cx, cy;
        cx = int'(pts[0][n]) >> (RW - k);
        cy = (RW - k == 0) ? 0 : (int'(pts[1][n]) >> k);
        box[(cx << (RW - k)) + cy]++;
      end
      ok = 1'b1;
      for (int c = 0; c < P; c++) if (box[c] != 1) ok = 1'b0;
      check(ok, $sformatf("net property k=%0d", k));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
