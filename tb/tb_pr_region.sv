// tb_pr_region: self-checking test of the reconfigurable region with a
// short swap time (RECONF_CYCLES = 20). It checks that the region starts
// empty, that every swap keeps it empty and isolated for exactly
// RECONF_CYCLES clocks before `cfg_done`, that the swapped-in module starts
// from reset (no result left over from the previous module), and that each
// module computes correctly with its own latency once loaded (checked
// against the reference models), including a reload of the module already
// present.
module tb_pr_region;
  import fpau_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int RC = 20;

  logic  clk = 1'b0;
  logic  rst;
  logic  cfg_req;
  rm_e   cfg_id;
  rm_e   loaded;
  logic  reconfiguring, cfg_done;
  logic  start, sub;
  fp32_t a, b, result;
  logic  ov, done, busy, start_err;
  int    checks = 0, failures = 0;

  pr_region #(.RECONF_CYCLES(RC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic swap(rm_e id);
    int n;
    @(negedge clk);
    cfg_req = 1'b1; cfg_id = id;
    @(negedge clk);
    cfg_req = 1'b0;
    n = 0;
    while (!cfg_done && n < 10 * RC) begin
      check(reconfiguring && loaded == RM_NONE, "region not empty during swap");
      check(result == '0 && !done && !ov, "outputs not isolated during swap");
      @(negedge clk);
      n++;
    end
    check(n == RC, $sformatf("swap took %0d clocks, want %0d", n, RC));
    check(loaded == id && !reconfiguring, "module not loaded after swap");
    check(result == '0 && !ov, "swapped-in module did not start from reset");
  endtask

  task automatic op(logic s, logic [31:0] x, logic [31:0] y, int lat);
    ref_t r;
    int   n;
    case (loaded)
      RM_ADDSUB: r = ref_add(x, y, s);
      RM_MUL:    r = ref_mul(x, y);
      default:   r = ref_div(x, y);
    endcase
    @(negedge clk);
    start = 1'b1; sub = s; a = x; b = y;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (!done && n < 100) begin
      @(negedge clk);
      n++;
    end
    check(n == lat, $sformatf("latency %0d, want %0d", n, lat));
    check(result == r.res && ov == r.ov,
          $sformatf("%h op %h: got %h/%b want %h/%b", x, y, result, ov, r.res, r.ov));
  endtask

  initial begin
    rst = 1'b1; cfg_req = 1'b0; cfg_id = RM_NONE; start = 1'b0; sub = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(loaded == RM_NONE && !reconfiguring, "region not empty after reset");
    swap(RM_ADDSUB);
    op(1'b0, 32'h3fc00000, 32'h40200000, 1);   // 1.5 + 2.5
    op(1'b1, 32'h3fc00000, 32'h40200000, 1);   // 1.5 - 2.5
    swap(RM_MUL);
    op(1'b0, 32'h12121231, 32'h31310016, 1);
    op(1'b0, 32'h98571234, 32'h02091a04, 1);   // out of range: ov
    check(ov, "multiplier overflow flag not seen");
    swap(RM_DIV);
    op(1'b0, 32'h12121231, 32'h31310016, 28);
    op(1'b0, 32'h40400000, 32'h3f800000, 28);
    swap(RM_DIV);                              // reload of the same module
    op(1'b0, 32'h091a0470, 32'habcdef10, 28);
    swap(RM_ADDSUB);
    for (int i = 0; i < 200; i++) op(1'($urandom), rand_fp(8'd120), rand_fp(8'd125), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
