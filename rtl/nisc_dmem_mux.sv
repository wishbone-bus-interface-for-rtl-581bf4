// Data-memory multiplexer: shares the NISC data-memory controller between the
// NISC core and an external access port.
//
// Ownership follows the NISC core's state: while its reset or its halt signal
// is active (ext_sel = reset OR halt) the external port drives the memory
// controller's address, control and write data, and sees the controller's
// read data. Otherwise the NISC core drives the controller; the external
// port's requests are dropped (it cannot write) and its read data is forced to
// zero. The NISC core's read-data input is wired straight to the controller's
// read-data output in both states.
//
// Purely combinational: no clock, no added latency; the controller's own read
// latency passes through unchanged.
//
// From the original interface design: the OR of reset and halt, the three
// multiplexers, the zero constant on the external read path. Chosen here:
// the request and control signals are bundled in one struct per port.
module nisc_dmem_mux
  import nisc_wb_pkg::*;
(
  // NISC core side
  input  logic              nisc_reset_i,
  input  logic              nisc_halt_i,
  input  dmem_req_t         nisc_req_i,
  input  logic [DATA_W-1:0] nisc_wdata_i,
  output logic [DATA_W-1:0] nisc_rdata_o,
  // External access side
  input  dmem_req_t         ext_req_i,
  input  logic [DATA_W-1:0] ext_wdata_i,
  output logic [DATA_W-1:0] ext_rdata_o,
  // NISC memory controller side
  output dmem_req_t         mc_req_o,
  output logic [DATA_W-1:0] mc_wdata_o,
  input  logic [DATA_W-1:0] mc_rdata_i
);

  logic ext_sel;  // 1: the external port owns the controller

  always_comb begin
    ext_sel      = nisc_reset_i | nisc_halt_i;
    mc_req_o     = ext_sel   ? ext_req_i   : nisc_req_i;
    mc_wdata_o   = ext_sel   ? ext_wdata_i : nisc_wdata_i;
    ext_rdata_o  = ext_sel   ? mc_rdata_i  : '0;
    nisc_rdata_o = mc_rdata_i;
  end

endmodule
