// pr_region: the partially reconfigurable region of the arithmetic unit.
//
// On the FPGA the region is a fixed rectangle of logic into which one
// arithmetic module at a time is swapped by loading its partial bitstream,
// while the static base keeps running. The region's signals cross into the
// base through fixed routing points (bus macros). This module reproduces
// that behaviour at register-transfer level so the whole system can be
// simulated and built as ordinary logic:
//  - the three modules (adder-subtractor, multiplier, divider) are all
//    instantiated, but only the one recorded as loaded gets `start` and
//    drives the outputs; the others are held in reset, so no state survives
//    a swap-out, as on the device;
//  - `cfg_req` with `cfg_id` swaps in a module: the region is empty
//    (`loaded` = RM_NONE, outputs isolated to zero, all modules in reset)
//    for RECONF_CYCLES clocks, after which `loaded` becomes `cfg_id` and
//    `cfg_done` pulses for one clock. A request always reloads, even for the
//    module already present; avoiding needless swaps is the controller's job.
// The length of the swap is this design's own placeholder: the real time is
// set by the partial bitstream size and the configuration port speed.
//
// Operation port: `start` with `a`, `b` and `sub` (used by the
// adder-subtractor only) goes to the loaded module; `result`, `ov` and the
// one-cycle `done` come back from it, with the module's own latency (1 clock
// for add/sub and mul, 28 for div). `busy` is high while the divider
// iterates. A `start` with no module loaded (or while reconfiguring) is
// dropped and flagged on `start_err`; the assertions below treat it, and a
// `cfg_req` during a swap or an operation, as a protocol error.
module pr_region
  import fpau_pkg::*;
#(
  parameter int unsigned RECONF_CYCLES = 1024
) (
  input  logic  clk,
  input  logic  rst,
  // Reconfiguration port
  input  logic  cfg_req,
  input  rm_e   cfg_id,
  output rm_e   loaded,
  output logic  reconfiguring,
  output logic  cfg_done,
  // Operation port
  input  logic  start,
  input  logic  sub,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t result,
  output logic  ov,
  output logic  done,
  output logic  busy,
  output logic  start_err
);

  localparam int unsigned CW = $clog2(RECONF_CYCLES + 1);

  rm_e           loaded_q, target_q;
  logic          reconf_q;
  logic [CW-1:0] cnt_q;

  // Per-module signals.
  logic          rst_add, rst_mul, rst_div;
  logic          st_add, st_mul, st_div;
  logic [31:0]   res_add, res_mul, res_div;
  logic          ov_add, ov_mul, ov_div;
  logic          dn_add, dn_mul, dn_div;
  logic          busy_div;

  assign loaded        = loaded_q;
  assign reconfiguring = reconf_q;

  // Swap sequencer.
  always_ff @(posedge clk) begin
    if (rst) begin
      loaded_q <= RM_NONE;
      target_q <= RM_NONE;
      reconf_q <= 1'b0;
      cnt_q    <= '0;
      cfg_done <= 1'b0;
    end else begin
      cfg_done <= 1'b0;
      if (!reconf_q) begin
        if (cfg_req) begin
          loaded_q <= RM_NONE;     // old module swapped out
          target_q <= cfg_id;
          reconf_q <= 1'b1;
          cnt_q    <= CW'(RECONF_CYCLES - 1);
        end
      end else if (cnt_q == '0) begin
        loaded_q <= target_q;      // new module swapped in
        reconf_q <= 1'b0;
        cfg_done <= 1'b1;
      end else begin
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  // Only the loaded module is out of reset and sees `start`.
  always_comb begin
    rst_add = rst || (loaded_q != RM_ADDSUB);
    rst_mul = rst || (loaded_q != RM_MUL);
    rst_div = rst || (loaded_q != RM_DIV);
    st_add  = start && (loaded_q == RM_ADDSUB);
    st_mul  = start && (loaded_q == RM_MUL);
    st_div  = start && (loaded_q == RM_DIV);
  end

  fadd_sub u_fadd_sub (
    .clk, .rst(rst_add), .start(st_add), .sub, .a(a), .b(b),
    .result(res_add), .ov(ov_add), .done(dn_add)
  );

  fmul u_fmul (
    .clk, .rst(rst_mul), .start(st_mul), .a(a), .b(b),
    .result(res_mul), .ov(ov_mul), .done(dn_mul)
  );

  fdiv u_fdiv (
    .clk, .rst(rst_div), .start(st_div), .a(a), .b(b),
    .result(res_div), .ov(ov_div), .busy(busy_div), .done(dn_div)
  );

  // Region boundary: the loaded module drives the outputs, nothing else does.
  always_comb begin
    result = '0;
    ov     = 1'b0;
    done   = 1'b0;
    busy   = 1'b0;
    case (loaded_q)
      RM_ADDSUB: begin result = res_add; ov = ov_add; done = dn_add; end
      RM_MUL:    begin result = res_mul; ov = ov_mul; done = dn_mul; end
      RM_DIV:    begin result = res_div; ov = ov_div; done = dn_div; busy = busy_div; end
      default:   ;
    endcase
    start_err = start && (loaded_q == RM_NONE);
  end

  // Handshake rules of the region.
  a_no_start_when_empty: assert property (@(posedge clk) disable iff (rst)
    start |-> loaded_q != RM_NONE)
    else $error("start issued while the region holds no module");
  a_no_cfg_during_swap: assert property (@(posedge clk) disable iff (rst)
    cfg_req |-> !reconf_q && !busy)
    else $error("reconfiguration requested during a swap or an operation");

endmodule
