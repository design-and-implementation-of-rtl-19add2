// tb_fpau_top: end-to-end test of the whole unit at its default parameters
// (a module swap takes RECONF_CYCLES = 1024 clocks), driven only through the
// host bus.
//
// Part 1 reads three operand pairs and their published products from
// tb/table1_vectors.hex (one hex word per line: a, b, a*b) and runs add,
// sub, mul and div on each, so the region is swapped between the modules;
// the products must equal the published ones bit for bit. Part 2 preloads a
// module, issues a command while busy, and writes/reads registers during a
// swap. Part 3 runs 300 random operations of random kinds. Every result is
// checked against the reference models, every swap must keep the region
// busy for exactly RECONF_CYCLES clocks, and every operation must take the
// predicted number of clocks from the start command to `done` (2 for
// add/sub/mul and 29 for div, plus RECONF_CYCLES + 2 when a swap is needed).
// Each mechanism (swap, swap avoided, preload, each operation, overflow,
// host access during a swap, divider busy, command refused) is counted and
// must occur at least once.
module tb_fpau_top;
  import fpau_pkg::*;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        host_wr, host_rd;
  logic [2:0]  host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic        host_rvalid;
  rm_e         loaded;
  logic        reconfiguring;
  int          checks = 0, failures = 0;

  fpau_top dut (.*);

  localparam int RC = 1024;   // fpau_top's default RECONF_CYCLES

  // Mechanism counters.
  int n_swap = 0, n_noswap = 0, n_preload = 0, n_add = 0, n_sub = 0, n_mul = 0, n_div = 0;
  int n_ov = 0, n_host_in_swap = 0, n_div_busy = 0, n_refused = 0;

  logic [31:0] vec [9];

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle counter and swap-length monitor.
  longint cyc = 0;
  int     rc_run = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (reconfiguring) rc_run <= rc_run + 1;
    else if (rc_run != 0) begin
      checks++;
      if (rc_run != RC) begin
        failures++;
        $display("FAIL swap lasted %0d clocks, want %0d", rc_run, RC);
      end
      rc_run <= 0;
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [2:0] ad, logic [31:0] d);
    @(negedge clk);
    host_wr = 1'b1; host_addr = ad; host_wdata = d;
    @(negedge clk);
    host_wr = 1'b0;
  endtask

  task automatic rd(logic [2:0] ad, output logic [31:0] d);
    @(negedge clk);
    host_rd = 1'b1; host_addr = ad;
    @(negedge clk);
    host_rd = 1'b0;
    d = host_rdata;
  endtask

  // Run one operation and check result, flags and timing.
  task automatic do_op(op_e op, logic [31:0] x, logic [31:0] y,
                       logic use_pub = 1'b0, logic [31:0] pub = '0);
    ref_t        r;
    logic [31:0] st, res;
    longint      t0, t1;
    int          want;
    logic        need_swap;
    case (op)
      OP_ADD:  begin r = ref_add(x, y, 1'b0); n_add++; end
      OP_SUB:  begin r = ref_add(x, y, 1'b1); n_sub++; end
      OP_MUL:  begin r = ref_mul(x, y); n_mul++; end
      default: begin r = ref_div(x, y); n_div++; end
    endcase
    need_swap = (loaded != rm_for_op(op));
    if (need_swap) n_swap++;
    else           n_noswap++;
    want = (op == OP_DIV ? 29 : 2) + (need_swap ? RC + 2 : 0);
    wr(REG_OPA, x);
    wr(REG_OPB, y);
    @(negedge clk);
    host_wr = 1'b1; host_addr = REG_CTRL; host_wdata = 32'(op);
    @(negedge clk);
    t0 = cyc;                    // the clock edge that took the command
    host_wr = 1'b0;
    while (!dut.u_base.done_q) begin
      if (dut.u_region.busy) n_div_busy++;
      @(negedge clk);
    end
    t1 = cyc;
    check(int'(t1 - t0) == want, $sformatf("op %0d took %0d clocks, want %0d", op, t1 - t0, want));
    rd(REG_RESULT, res);
    rd(REG_STATUS, st);
    if (st[2]) n_ov++;
    check(res == r.res && st[2] == r.ov,
          $sformatf("op %0d %h %h: got %h ov=%b want %h ov=%b", op, x, y, res, st[2], r.res, r.ov));
    if (use_pub)
      check(res == pub, $sformatf("product %h, published %h", res, pub));
    check(st[1] && !st[0] && st[5:4] == 2'(rm_for_op(op)), $sformatf("status %h", st));
  endtask

  initial begin
    logic [31:0] d, st;
    op_e         op;
    rst = 1'b1; host_wr = 1'b0; host_rd = 1'b0; host_addr = '0; host_wdata = '0;
    $readmemh("tb/table1_vectors.hex", vec);
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // Part 1: the worked operand pairs through every operation.
    for (int i = 0; i < 3; i++) begin
      do_op(OP_ADD, vec[3*i], vec[3*i+1]);
      do_op(OP_SUB, vec[3*i], vec[3*i+1]);
      do_op(OP_MUL, vec[3*i], vec[3*i+1], 1'b1, vec[3*i+2]);
      do_op(OP_DIV, vec[3*i], vec[3*i+1]);
    end

    // Part 2a: preload the multiplier; host works on during the swap.
    wr(REG_CFG, 32'(RM_MUL));
    n_preload++;
    wr(REG_OPA, 32'h40490fdb);
    rd(REG_OPA, d);
    if (reconfiguring) n_host_in_swap++;
    check(d == 32'h40490fdb, "OPA written during a swap");
    do begin rd(REG_STATUS, st); end while (st[0]);
    check(loaded == RM_MUL, "multiplier preloaded");
    do_op(OP_MUL, 32'h40490fdb, 32'h40000000);   // no swap needed now

    // Part 2b: a command while the divider runs is refused.
    wr(REG_OPA, 32'h3f800000);
    wr(REG_OPB, 32'h40400000);
    wr(REG_CTRL, 32'(OP_DIV));            // needs a swap from the multiplier
    n_swap++;
    repeat (RC + 5) @(negedge clk);
    wr(REG_CTRL, 32'(OP_ADD));
    rd(REG_STATUS, st);
    if (st[6]) n_refused++;
    check(st[6] && st[0], "command while busy flagged");
    do begin rd(REG_STATUS, st); end while (st[0]);
    rd(REG_RESULT, d);
    check(d == 32'h3eaaaaaa && loaded == RM_DIV, "divide survived the refused command");

    // Part 3: random operations.
    for (int i = 0; i < 300; i++) begin
      op = op_e'($urandom_range(1, 4));
      d  = rand_fp(8'($urandom_range(40, 210)));
      do_op(op, d, rand_fp(($urandom_range(0, 1) != 0) ? d[30:23] : 8'($urandom_range(1, 254))));
    end

    rd(REG_COUNT, d);
    check(int'(d[31:16]) == n_swap + n_preload && int'(d[15:0]) == n_add + n_sub + n_mul + n_div + 1,   // + the refused-test divide
          $sformatf("counters %h", d));

    $display("swaps=%0d swaps_avoided=%0d preloads=%0d add=%0d sub=%0d mul=%0d div=%0d",
             n_swap, n_noswap, n_preload, n_add, n_sub, n_mul, n_div);
    $display("overflows=%0d host_access_during_swap=%0d div_busy_cycles=%0d refused=%0d",
             n_ov, n_host_in_swap, n_div_busy, n_refused);
    check(n_swap > 0, "no swap happened");
    check(n_noswap > 0, "no swap was avoided");
    check(n_preload > 0, "no preload");
    check(n_add > 0 && n_sub > 0 && n_mul > 0 && n_div > 0, "an operation never ran");
    check(n_ov > 0, "no overflow");
    check(n_host_in_swap > 0, "no host access during a swap");
    check(n_div_busy > 0, "divider never busy");
    check(n_refused > 0, "no command refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
