// NISC WISHBONE coprocessor interface: everything that turns a generated NISC
// core into a memory-mapped WISHBONE coprocessor.
//
// A NISC core has no instruction set and no bus port: it is a custom datapath
// run by control words, with a reset input, a halt output, external input and
// output ports, and a private data memory. This block gives a host processor
// two WISHBONE classic slave ports onto such a core:
//
//   s1 (wb_*)   the basic interface (nisc_wb_basic): RESET/HALT control word,
//               interrupt enable, result registers read from the core's
//               external output ports, argument registers driving its
//               external input ports; INT_O on completion. Zero wait states.
//   s2 (mem_*)  the data-memory interface (nisc_wb_dmem): the whole NISC data
//               memory at its own base address, byte/half-word/word access.
//               One wait state per access (ACK in the second cycle).
//
// Between the data-memory interface, the core and the core's memory controller
// sits the data-memory multiplexer (nisc_dmem_mux). The host owns the data
// memory while the core is held in reset or has halted; while the core runs,
// host reads of s2 return zero and host writes are lost.
//
// The core itself (controller, datapath, control memory) and its data-memory
// controller are produced by the NISC tool flow and are not part of this
// block: their signals are ports. The core runs on clk_i, so the system is
// fully synchronous.
//
// Use from host software: write 1 to RESET, write arguments to the ARG
// registers and arrays to the data memory, write 0 to RESET, then poll HALT
// (or wait for INT_O), then read RESULT and the data memory.
//
// From the original interface design: the three parts and how they connect,
// the two slave ports, INT_O, the default of two arguments and one result.
// Chosen here: the width of the basic slave's address field and the struct
// used for the memory ports.
module nisc_wb_coprocessor
  import nisc_wb_pkg::*;
#(
  parameter int unsigned N_ARGS    = 2,
  parameter int unsigned N_RESULTS = 1,
  parameter int unsigned ADDR_W    = 5
) (
  input  logic               clk_i,
  input  logic               rst_i,
  // s1: basic interface
  input  logic               wb_cyc_i,
  input  logic               wb_stb_i,
  input  logic               wb_we_i,
  input  logic [ADDR_W-1:0]  wb_adr_i,
  input  logic [3:0]         wb_sel_i,
  input  logic [DATA_W-1:0]  wb_dat_i,
  output logic [DATA_W-1:0]  wb_dat_o,
  output logic               wb_ack_o,
  output logic               int_o,
  // s2: data-memory interface
  input  logic               mem_cyc_i,
  input  logic               mem_stb_i,
  input  logic               mem_we_i,
  input  logic [DMEM_AW-1:0] mem_adr_i,
  input  logic [3:0]         mem_sel_i,
  input  logic [DATA_W-1:0]  mem_dat_i,
  output logic [DATA_W-1:0]  mem_dat_o,
  output logic               mem_ack_o,
  // NISC core
  output logic               nisc_reset_o,
  input  logic               nisc_halt_i,
  output logic [DATA_W-1:0]  nisc_ext_in_o  [N_ARGS],
  input  logic [DATA_W-1:0]  nisc_ext_out_i [N_RESULTS],
  input  dmem_req_t          nisc_mem_req_i,
  input  logic [DATA_W-1:0]  nisc_mem_wdata_i,
  output logic [DATA_W-1:0]  nisc_mem_rdata_o,
  // NISC data-memory controller
  output dmem_req_t          mc_req_o,
  output logic [DATA_W-1:0]  mc_wdata_o,
  input  logic [DATA_W-1:0]  mc_rdata_i
);

  dmem_req_t         ext_req;
  logic [DATA_W-1:0] ext_wdata;
  logic [DATA_W-1:0] ext_rdata;

  nisc_wb_basic #(
    .N_ARGS    (N_ARGS),
    .N_RESULTS (N_RESULTS),
    .ADDR_W    (ADDR_W)
  ) u_basic (
    .clk_i        (clk_i),
    .rst_i        (rst_i),
    .cyc_i        (wb_cyc_i),
    .stb_i        (wb_stb_i),
    .we_i         (wb_we_i),
    .adr_i        (wb_adr_i),
    .sel_i        (wb_sel_i),
    .dat_i        (wb_dat_i),
    .dat_o        (wb_dat_o),
    .ack_o        (wb_ack_o),
    .int_o        (int_o),
    .nisc_reset_o (nisc_reset_o),
    .nisc_halt_i  (nisc_halt_i),
    .ext_in_o     (nisc_ext_in_o),
    .ext_out_i    (nisc_ext_out_i)
  );

  nisc_wb_dmem u_dmem_if (
    .clk_i       (clk_i),
    .rst_i       (rst_i),
    .cyc_i       (mem_cyc_i),
    .stb_i       (mem_stb_i),
    .we_i        (mem_we_i),
    .adr_i       (mem_adr_i),
    .sel_i       (mem_sel_i),
    .dat_i       (mem_dat_i),
    .dat_o       (mem_dat_o),
    .ack_o       (mem_ack_o),
    .mem_req_o   (ext_req),
    .mem_wdata_o (ext_wdata),
    .mem_rdata_i (ext_rdata)
  );

  nisc_dmem_mux u_mux (
    .nisc_reset_i (nisc_reset_o),
    .nisc_halt_i  (nisc_halt_i),
    .nisc_req_i   (nisc_mem_req_i),
    .nisc_wdata_i (nisc_mem_wdata_i),
    .nisc_rdata_o (nisc_mem_rdata_o),
    .ext_req_i    (ext_req),
    .ext_wdata_i  (ext_wdata),
    .ext_rdata_o  (ext_rdata),
    .mc_req_o     (mc_req_o),
    .mc_wdata_o   (mc_wdata_o),
    .mc_rdata_i   (mc_rdata_i)
  );

endmodule
