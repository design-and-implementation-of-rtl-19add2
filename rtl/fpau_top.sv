// fpau_top: the partially reconfigurable floating point arithmetic unit.
//
// The design is split, as on the FPGA, into a static base and one
// reconfigurable region. The base (pci_interface) is the host's register
// interface and the control unit; the region (pr_region) holds either the
// adder-subtractor, the multiplier or the divider, swapped in when an
// operation needs it. The two are joined only by the region's reconfiguration
// port and operation port, the signals that cross the region boundary.
//
// Interface: the host bus of pci_interface (see its header for the register
// map), plus `loaded` and `reconfiguring` brought out for observation.
// RECONF_CYCLES is the time one module swap takes, in clocks.
module fpau_top
  import fpau_pkg::*;
#(
  parameter int unsigned RECONF_CYCLES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        host_wr,
  input  logic        host_rd,
  input  logic [2:0]  host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        host_rvalid,
  output rm_e         loaded,
  output logic        reconfiguring
);

  logic  cfg_req, cfg_done, start, sub, done, busy, ov, start_err;
  rm_e   cfg_id;
  fp32_t op_a, op_b, result;

  pci_interface u_base (
    .clk, .rst,
    .host_wr, .host_rd, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .cfg_req, .cfg_id, .loaded, .reconfiguring, .cfg_done,
    .start, .sub, .op_a, .op_b, .result, .ov, .done, .busy, .start_err
  );

  pr_region #(.RECONF_CYCLES(RECONF_CYCLES)) u_region (
    .clk, .rst,
    .cfg_req, .cfg_id, .loaded, .reconfiguring, .cfg_done,
    .start, .sub, .a(op_a), .b(op_b),
    .result, .ov, .done, .busy, .start_err
  );

endmodule
