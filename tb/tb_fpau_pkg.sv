// tb_fpau_pkg: checks the shared package: the single precision struct must
// place sign, exponent and fraction at bits 31, 30:23 and 22:0, the op codes
// must map to the module that executes them (add and sub to the
// adder-subtractor), and the register addresses must be distinct.
module tb_fpau_pkg;
  import fpau_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t       f;
    logic [31:0] w;
    logic [2:0]  addrs [7];
    w = 32'hc0490fdb;                      // -3.14159274
    f = w;
    check($bits(fp32_t) == 32, "struct width");
    check(f.sign == 1'b1 && f.exp == 8'h80 && f.frac == 23'h490fdb, "field positions");
    check(EXP_W == 8 && FRAC_W == 23, "single precision widths");
    check(rm_for_op(OP_ADD) == RM_ADDSUB, "add -> adder-subtractor");
    check(rm_for_op(OP_SUB) == RM_ADDSUB, "sub -> adder-subtractor");
    check(rm_for_op(OP_MUL) == RM_MUL, "mul -> multiplier");
    check(rm_for_op(OP_DIV) == RM_DIV, "div -> divider");
    check(rm_for_op(OP_NONE) == RM_NONE, "no op -> no module");
    check(rm_for_op(op_e'(3'd7)) == RM_NONE, "bad code -> no module");
    check(OP_ADD == 3'd1 && OP_SUB == 3'd2 && OP_MUL == 3'd3 && OP_DIV == 3'd4, "op code numbering");
    addrs = '{REG_OPA, REG_OPB, REG_CTRL, REG_STATUS, REG_RESULT, REG_CFG, REG_COUNT};
    for (int i = 0; i < 7; i++)
      for (int j = i + 1; j < 7; j++)
        check(addrs[i] != addrs[j], $sformatf("register addresses %0d and %0d differ", i, j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
