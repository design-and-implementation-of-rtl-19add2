// tb_fdiv: self-checking test of the iterative divider. The three worked
// operand pairs for this unit are checked against their truncated IEEE
// quotients, worked out by hand; directed corner cases and 2000 random
// pairs are compared with a double-precision reference. Every operation
// must raise `done` exactly FRAC_W+5 = 28 clocks after `start`, `busy` must
// cover that time, and a `start` issued while busy must be ignored.
module tb_fdiv;
  import tb_fp_ref_pkg::*;

  localparam int LATENCY = 28;

  logic        clk = 1'b0;
  logic        rst;
  logic        start;
  logic [31:0] a, b, result;
  logic        ov, busy, done;
  int          checks = 0, failures = 0;

  fdiv dut (.clk, .rst, .start, .a, .b, .result, .ov, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [31:0] y, logic use_exp = 1'b0,
                     logic [31:0] exp_res = '0, logic exp_ov = 1'b0,
                     logic poke = 1'b0);
    ref_t r;
    int   n;
    r = ref_div(x, y);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done && n < 100) begin
      // A second start while busy, with other operands, must change nothing.
      if (poke && n == 5) begin
        a = 32'h3f800000; b = 32'h40000000; start = 1'b1;
      end else begin
        start = 1'b0;
      end
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low during division");
      end
      @(negedge clk);
      n++;
    end
    start = 1'b0;
    checks++;
    if (n != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, want %0d", n, LATENCY);
    end
    checks++;
    if (result !== r.res || ov !== r.ov) begin
      failures++;
      $display("FAIL %h / %h: got %h ov=%b, want %h ov=%b", x, y, result, ov, r.res, r.ov);
    end
    if (use_exp) begin
      checks++;
      if (result !== exp_res || ov !== exp_ov) begin
        failures++;
        $display("FAIL %h / %h: got %h ov=%b, hand-computed %h ov=%b", x, y, result, ov, exp_res, exp_ov);
      end
    end
  endtask

  initial begin
    logic [31:0] x;
    rst = 1'b1; start = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(32'h12121231, 32'h31310016, 1'b1, 32'h20534426, 1'b0);
    run(32'h98571234, 32'h02091a04, 1'b1, 32'hd5c8cb1c, 1'b0);
    run(32'h091a0470, 32'habcdef10, 1'b1, 32'h9cbf7630, 1'b0, 1'b1);
    run(32'h40c00000, 32'h40000000, 1'b1, 32'h40400000, 1'b0);   // 6 / 2 = 3
    run(32'h3f800000, 32'h40400000, 1'b1, 32'h3eaaaaaa, 1'b0);   // 1 / 3 truncated
    run(32'hbf800000, 32'h3f000000, 1'b1, 32'hc0000000, 1'b0);   // -1 / 0.5 = -2
    run(32'h00000000, 32'h3f800000, 1'b1, 32'h00000000, 1'b0);   // 0 / 1 = 0
    run(32'h3f800000, 32'h00000000, 1'b1, 32'h7f800000, 1'b1);   // divide by zero
    run(32'h7f000000, 32'h00800000, 1'b1, 32'h7f800000, 1'b1);  // overflow, fraction 0
    for (int i = 0; i < 2000; i++) begin
      x = rand_fp(8'd127);
      run(x, rand_fp(8'($urandom_range(1, 254))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
