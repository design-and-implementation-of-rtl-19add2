// pci_interface: the static base design. It stays loaded while modules are
// swapped in and out of the reconfigurable region, and is both the host
// interface and the control unit of the region.
//
// The host sees a small register file on a simple synchronous bus (write
// strobe, read strobe, 3-bit word address, 32-bit data). The PCI protocol
// itself and the register map are this design's own choices; the base's job
// follows the document: hand operands to the reconfigurable module, collect
// its result, and have the module each operation needs loaded on demand.
//
//   addr 0 OPA     R/W  first operand (IEEE-754 single)
//   addr 1 OPB     R/W  second operand
//   addr 2 CTRL    W    [2:0] op code 1 add, 2 sub, 3 mul, 4 div: starts it
//                  R    [2:0] op code of the last operation
//   addr 3 STATUS  R    [0] busy [1] done [2] ov [3] reconfiguring
//                       [5:4] loaded module (0 none, 1 add-sub, 2 mul, 3 div)
//                       [6] error: start while busy, bad op code, or a
//                           start the region dropped
//                       [7] region busy (divider iterating)
//   addr 4 RESULT  R    result of the last operation
//   addr 5 CFG     W    [1:0] module to swap in now (preload); ignored when busy
//   addr 6 COUNT   R    [31:16] swaps performed, [15:0] operations completed
//
// Control: writing CTRL copies OPA/OPB into the operation registers and
// clears `done`. If the needed module is already loaded, the operation
// starts on the next clock; otherwise the base requests a swap, waits for
// `cfg_done`, then starts it. When the module reports `done`, the result
// and overflow flag are stored and `done` is set. The host may keep reading
// and writing registers throughout, including during a swap (it can load
// the next operands), since the base is never reconfigured.
//
// Reads: `host_rd` returns the addressed register on `host_rdata` with
// `host_rvalid` one clock later. Synchronous active-high reset.
module pci_interface
  import fpau_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // Host bus
  input  logic        host_wr,
  input  logic        host_rd,
  input  logic [2:0]  host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        host_rvalid,
  // Reconfiguration port of the region
  output logic        cfg_req,
  output rm_e         cfg_id,
  input  rm_e         loaded,
  input  logic        reconfiguring,
  input  logic        cfg_done,
  // Operation port of the region
  output logic        start,
  output logic        sub,
  output fp32_t       op_a,
  output fp32_t       op_b,
  input  fp32_t       result,
  input  logic        ov,
  input  logic        done,
  input  logic        busy,
  input  logic        start_err
);

  typedef enum logic [2:0] {S_IDLE, S_CFG_REQ, S_CFG_WAIT, S_START, S_WAIT} state_e;

  state_e      state_q;
  fp32_t       opa_q, opb_q, run_a_q, run_b_q, res_q;
  op_e         op_q;
  rm_e         cfg_id_q;
  logic        op_pending_q;    // a swap is on behalf of an operation
  logic        done_q, ov_q, err_q;
  logic [15:0] ops_cnt_q, swaps_cnt_q;
  logic        wr_ctrl, wr_cfg;
  op_e         wr_op;
  logic        idle;

  assign idle    = (state_q == S_IDLE);
  assign wr_ctrl = host_wr && host_addr == REG_CTRL;
  assign wr_cfg  = host_wr && host_addr == REG_CFG;
  assign wr_op   = op_e'(host_wdata[2:0]);

  assign cfg_req = (state_q == S_CFG_REQ);
  assign cfg_id  = cfg_id_q;
  assign start   = (state_q == S_START);
  assign sub     = (op_q == OP_SUB);
  assign op_a    = run_a_q;
  assign op_b    = run_b_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q      <= S_IDLE;
      opa_q        <= '0;
      opb_q        <= '0;
      run_a_q      <= '0;
      run_b_q      <= '0;
      res_q        <= '0;
      op_q         <= OP_NONE;
      cfg_id_q     <= RM_NONE;
      op_pending_q <= 1'b0;
      done_q       <= 1'b0;
      ov_q         <= 1'b0;
      err_q        <= 1'b0;
      ops_cnt_q    <= '0;
      swaps_cnt_q  <= '0;
    end else begin
      // Operand registers are writable at any time.
      if (host_wr && host_addr == REG_OPA) opa_q <= host_wdata;
      if (host_wr && host_addr == REG_OPB) opb_q <= host_wdata;

      case (state_q)
        S_IDLE: begin
          if (wr_ctrl) begin
            if (rm_for_op(wr_op) == RM_NONE) begin
              err_q <= 1'b1;
            end else begin
              op_q    <= wr_op;
              run_a_q <= opa_q;
              run_b_q <= opb_q;
              done_q  <= 1'b0;
              if (loaded == rm_for_op(wr_op)) begin
                state_q <= S_START;
              end else begin
                cfg_id_q     <= rm_for_op(wr_op);
                op_pending_q <= 1'b1;
                state_q      <= S_CFG_REQ;
              end
            end
          end else if (wr_cfg) begin
            if (rm_e'(host_wdata[1:0]) != loaded) begin
              cfg_id_q     <= rm_e'(host_wdata[1:0]);
              op_pending_q <= 1'b0;
              state_q      <= S_CFG_REQ;
            end
          end
        end
        S_CFG_REQ: begin
          swaps_cnt_q <= swaps_cnt_q + 1'b1;
          state_q     <= S_CFG_WAIT;
        end
        S_CFG_WAIT: begin
          if (cfg_done) state_q <= op_pending_q ? S_START : S_IDLE;
        end
        S_START: begin
          state_q <= S_WAIT;
        end
        S_WAIT: begin
          if (done) begin
            res_q     <= result;
            ov_q      <= ov;
            done_q    <= 1'b1;
            ops_cnt_q <= ops_cnt_q + 1'b1;
            state_q   <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase

      // A start or swap request while the base is busy is refused.
      if (!idle && (wr_ctrl || wr_cfg)) err_q <= 1'b1;
      if (start_err) err_q <= 1'b1;
    end
  end

  // Register reads, one clock after the strobe.
  always_ff @(posedge clk) begin
    if (rst) begin
      host_rdata  <= '0;
      host_rvalid <= 1'b0;
    end else begin
      host_rvalid <= host_rd;
      if (host_rd) begin
        case (host_addr)
          REG_OPA:    host_rdata <= opa_q;
          REG_OPB:    host_rdata <= opb_q;
          REG_CTRL:   host_rdata <= {29'd0, op_q};
          REG_STATUS: host_rdata <= {24'd0, busy, err_q, loaded, reconfiguring, ov_q, done_q, !idle};
          REG_RESULT: host_rdata <= res_q;
          REG_COUNT:  host_rdata <= {swaps_cnt_q, ops_cnt_q};
          default:    host_rdata <= '0;
        endcase
      end
    end
  end

  // The region must not report completion of an operation nobody started.
  a_done_only_when_waiting: assert property (@(posedge clk) disable iff (rst)
    done |-> state_q == S_WAIT)
    else $error("result returned with no operation outstanding");

endmodule
