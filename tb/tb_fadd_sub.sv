// tb_fadd_sub: self-checking test of the adder-subtractor. Directed cases
// (the three worked operand pairs for this unit, cancellation to zero,
// overflow, underflow, zero and infinity operands) and 4000 random pairs
// are compared with an exact big-integer reference. It also checks that
// `done` follows `start` by exactly one clock.
module tb_fadd_sub;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        start, sub;
  logic [31:0] a, b, result;
  logic        ov, done;
  int          checks = 0, failures = 0;

  fadd_sub dut (.clk, .rst, .start, .sub, .a, .b, .result, .ov, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [31:0] y, logic s, logic [31:0] exp_res = 32'hx, logic use_exp = 1'b0);
    ref_t r;
    r = ref_add(x, y, s);
    @(negedge clk);
    a = x; b = y; sub = s; start = 1'b1;
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
      $display("FAIL %h %s %h: got %h ov=%b, want %h ov=%b", x, s ? "-" : "+", y, result, ov, r.res, r.ov);
    end
    if (use_exp) begin
      checks++;
      if (result !== exp_res) begin
        failures++;
        $display("FAIL %h %s %h: got %h, want %h (hand-computed)", x, s ? "-" : "+", y, result, exp_res);
      end
    end
    @(negedge clk);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done held high");
    end
  endtask

  initial begin
    logic [31:0] x;
    rst = 1'b1; start = 1'b0; sub = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // The three worked operand pairs. With truncation, adding a much smaller
    // operand of the opposite sign takes one unit off the larger magnitude.
    run(32'h12121231, 32'h31310016, 1'b0, 32'h31310016, 1'b1);
    run(32'h98571234, 32'h02091a04, 1'b0, 32'h98571233, 1'b1);
    run(32'h091a0470, 32'habcdef10, 1'b0, 32'habcdef0f, 1'b1);
    run(32'h12121231, 32'h31310016, 1'b1, 32'hb1310015, 1'b1);
    run(32'h091a0470, 32'habcdef10, 1'b1, 32'h2bcdef10, 1'b1);
    // Small hand-checked cases.
    run(32'h3f800000, 32'h3f800000, 1'b0, 32'h40000000, 1'b1);   // 1 + 1 = 2
    run(32'h40400000, 32'h3f800000, 1'b1, 32'h40000000, 1'b1);   // 3 - 1 = 2
    run(32'h3f800000, 32'h3f800000, 1'b1, 32'h00000000, 1'b1);   // 1 - 1 = 0
    run(32'h3f800000, 32'h33800000, 1'b1, 32'h3f7fffff, 1'b1);   // 1 - 2^-24 truncates down
    run(32'h3f800000, 32'h00000000, 1'b0, 32'h3f800000, 1'b1);   // 1 + 0
    run(32'h80000000, 32'h00000000, 1'b1, 32'h80000000, 1'b1);   // -0 - 0 = -0
    run(32'h7f7fffff, 32'h7f7fffff, 1'b0);                        // overflow
    run(32'h00800001, 32'h00800000, 1'b1);                        // underflow
    run(32'h7f800000, 32'h3f800000, 1'b0);                        // infinity operand
    for (int i = 0; i < 4000; i++) begin
      x = rand_fp(8'($urandom_range(1, 254)));
      run(x, rand_fp(x[30:23]), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
