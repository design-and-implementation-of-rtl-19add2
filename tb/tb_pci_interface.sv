// tb_pci_interface: self-checking test of the static base on its own. The
// testbench plays the reconfigurable region: it answers a swap request
// after 7 clocks and an operation after 3 clocks, returning a ^ b as the
// result and `sub` as the overflow flag, so that every value the base
// stores can be predicted. Checked: register write/read-back and read
// latency, a swap requested only when the needed module is missing and with
// the right module, operands latched at the start command while the host
// rewrites OPA during the swap, the sub flag, result/overflow/done capture,
// refusal of a command while busy, explicit preload through CFG, a bad op
// code, and the operation and swap counters.
module tb_pci_interface;
  import fpau_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        host_wr, host_rd;
  logic [2:0]  host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic        host_rvalid;
  logic        cfg_req, reconfiguring, cfg_done;
  rm_e         cfg_id, loaded;
  logic        start, sub, ov, done, busy, start_err;
  fp32_t       op_a, op_b, result;
  int          checks = 0, failures = 0;

  // Region model bookkeeping.
  int          n_cfg = 0, n_start = 0;
  rm_e         last_cfg_id;
  logic [31:0] last_a, last_b;
  logic        last_sub;

  pci_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural stand-in for the reconfigurable region.
  initial begin
    loaded = RM_NONE; reconfiguring = 1'b0; cfg_done = 1'b0;
    result = '0; ov = 1'b0; done = 1'b0; busy = 1'b0; start_err = 1'b0;
    forever begin
      @(posedge clk);
      #1;
      cfg_done = 1'b0;
      done     = 1'b0;
      if (!rst && cfg_req) begin
        n_cfg++;
        last_cfg_id   = cfg_id;
        loaded        = RM_NONE;
        reconfiguring = 1'b1;
        repeat (7) @(posedge clk);
        #1;
        loaded        = last_cfg_id;
        reconfiguring = 1'b0;
        cfg_done      = 1'b1;
      end else if (!rst && start) begin
        n_start++;
        last_a = op_a; last_b = op_b; last_sub = sub;
        busy = 1'b1;
        repeat (3) @(posedge clk);
        #1;
        busy   = 1'b0;
        result = last_a ^ last_b;
        ov     = last_sub;
        done   = 1'b1;
      end
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
    check(host_rvalid, "read data not valid one clock after strobe");
    d = host_rdata;
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    int n = 0;
    do begin
      rd(REG_STATUS, st);
      n++;
    end while (st[0] && n < 100);
  endtask

  initial begin
    logic [31:0] d;
    int c0, s0;
    rst = 1'b1; host_wr = 1'b0; host_rd = 1'b0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    rd(REG_STATUS, d);
    check(d == 32'h0, $sformatf("status after reset %h", d));
    wr(REG_OPA, 32'h12121231);
    wr(REG_OPB, 32'h31310016);
    rd(REG_OPA, d); check(d == 32'h12121231, "OPA read-back");
    rd(REG_OPB, d); check(d == 32'h31310016, "OPB read-back");

    // Multiply with no module loaded: a swap to the multiplier first.
    wr(REG_CTRL, 32'(OP_MUL));
    rd(REG_STATUS, d);
    check(d[0] && d[3], "busy and reconfiguring during the swap");
    wr(REG_OPA, 32'hdeadbeef);               // host keeps working meanwhile
    rd(REG_OPA, d); check(d == 32'hdeadbeef, "OPA written during swap");
    wait_idle();
    check(n_cfg == 1 && last_cfg_id == RM_MUL, "one swap, to the multiplier");
    check(n_start == 1, "one start after the swap");
    check(last_a == 32'h12121231 && last_b == 32'h31310016 && !last_sub,
          "operands latched at the start command");
    rd(REG_RESULT, d); check(d == (32'h12121231 ^ 32'h31310016), "result captured");
    rd(REG_STATUS, d);
    check(d[1] && !d[2] && d[5:4] == 2'(RM_MUL) && !d[6], $sformatf("status after mul %h", d));
    rd(REG_CTRL, d); check(d[2:0] == 3'(OP_MUL), "last op code");

    // Second multiply: module present, no swap.
    wr(REG_CTRL, 32'(OP_MUL));
    wait_idle();
    check(n_cfg == 1 && n_start == 2, "no swap when the module is loaded");
    check(last_a == 32'hdeadbeef, "new operand used");

    // Subtract: swap to the adder-subtractor, sub flag set, ov captured.
    wr(REG_CTRL, 32'(OP_SUB));
    // A command while busy is refused and flagged.
    wr(REG_CTRL, 32'(OP_ADD));
    wait_idle();
    check(n_cfg == 2 && last_cfg_id == RM_ADDSUB && n_start == 3 && last_sub, "sub via swap");
    rd(REG_STATUS, d);
    check(d[1] && d[2] && d[6], $sformatf("done, ov and error after sub %h", d));

    // Add uses the same module.
    wr(REG_CTRL, 32'(OP_ADD));
    wait_idle();
    check(n_cfg == 2 && n_start == 4 && !last_sub, "add without swap");

    // Explicit preload of the divider: a swap, no operation.
    wr(REG_CFG, 32'(RM_DIV));
    wait_idle();
    check(n_cfg == 3 && last_cfg_id == RM_DIV && n_start == 4, "preload of the divider");
    wr(REG_CFG, 32'(RM_DIV));                // already there: nothing happens
    wait_idle();
    check(n_cfg == 3, "preload of a loaded module ignored");
    wr(REG_CTRL, 32'(OP_DIV));
    wait_idle();
    check(n_cfg == 3 && n_start == 5, "divide on the preloaded module");

    // A bad op code starts nothing.
    c0 = n_cfg; s0 = n_start;
    wr(REG_CTRL, 32'd7);
    repeat (5) @(negedge clk);
    check(n_cfg == c0 && n_start == s0, "bad op code ignored");

    rd(REG_COUNT, d);
    check(d == {16'd3, 16'd5}, $sformatf("counters %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
