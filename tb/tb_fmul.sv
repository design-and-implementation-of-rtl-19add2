// tb_fmul: self-checking test of the multiplier. The three worked operand
// pairs for this unit must give exactly the published products
// (03c9fd40, and ffe65d32 / fff7cac2 with the overflow flag, whose true
// exponents are below the normal range). Directed corner cases and 4000
// random pairs are compared with a double-precision reference, and `done`
// must follow `start` by exactly one clock.
module tb_fmul;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        start;
  logic [31:0] a, b, result;
  logic        ov, done;
  int          checks = 0, failures = 0;

  fmul dut (.clk, .rst, .start, .a, .b, .result, .ov, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [31:0] y, logic use_exp = 1'b0,
                     logic [31:0] exp_res = '0, logic exp_ov = 1'b0);
    ref_t r;
    r = ref_mul(x, y);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL latency: done not one cycle after start");
    end
    checks++;
    if (result !== r.res || ov !== r.ov) begin
      failures++;
      $display("FAIL %h * %h: got %h ov=%b, want %h ov=%b", x, y, result, ov, r.res, r.ov);
    end
    if (use_exp) begin
      checks++;
      if (result !== exp_res || ov !== exp_ov) begin
        failures++;
        $display("FAIL %h * %h: got %h ov=%b, published %h ov=%b", x, y, result, ov, exp_res, exp_ov);
      end
    end
  endtask

  initial begin
    logic [31:0] x;
    rst = 1'b1; start = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(32'h12121231, 32'h31310016, 1'b1, 32'h03c9fd40, 1'b0);
    run(32'h98571234, 32'h02091a04, 1'b1, 32'hffe65d32, 1'b1);
    run(32'h091a0470, 32'habcdef10, 1'b1, 32'hfff7cac2, 1'b1);
    run(32'h40400000, 32'h3f400000, 1'b1, 32'h40100000, 1'b0);   // 3 * 0.75 = 2.25
    run(32'hc0000000, 32'h40000000, 1'b1, 32'hc0800000, 1'b0);   // -2 * 2 = -4
    run(32'h3f800000, 32'h00000000, 1'b1, 32'h00000000, 1'b0);   // 1 * 0 = 0
    run(32'h7f000000, 32'h7f000000, 1'b1, 32'h7f800000, 1'b1);   // overflow
    run(32'h7f800000, 32'h3f800000);                              // infinity operand
    for (int i = 0; i < 4000; i++) begin
      x = rand_fp(8'd127);
      run(x, rand_fp(8'($urandom_range(1, 254))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
