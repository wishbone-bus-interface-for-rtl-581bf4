// NISC data-memory WISHBONE interface: maps the NISC data memory into the
// host's address space.
//
// A 32-bit WISHBONE classic SLAVE that turns single read and write cycles into
// requests for the NISC data-memory controller. That controller takes a byte
// address that need not be word aligned, an access-type code, and data of less
// than 32 bits in the low bits of its buses. The slave therefore
//   * forwards ADR_I as the address, with its two low bits replaced by the byte
//     offset of the lowest selected lane;
//   * turns SEL_I into a type code (byte, half-word or word, see
//     nisc_wb_pkg::decode_sel);
//   * shifts write data down from its lane to bit 0, and read data up from
//     bit 0 to its lane, clearing the lanes that were not selected;
//   * takes the write enable from WE_I and the read enable from its inverse.
//
// Timing: the data memory is a synchronous RAM with one cycle of read latency,
// so ACK_O is held back one cycle. A delay register samples CYC_I & STB_I, and
// ACK_O = CYC_I & STB_I & delay. Every access takes two clock cycles: the
// request reaches the memory in the first, data and ACK_O come in the second.
// The delay register is cleared in the ACK cycle so a strobe held high for
// back-to-back accesses again waits one cycle. The write enable is raised in
// the first cycle only, the read enable in both.
//
// From the original interface design: address pass-through, type decoding,
// alignment in both directions, enables from WE_I, the one-cycle ACK delay
// built from a register and two AND gates. Chosen here: the enables are also
// qualified by CYC_I & STB_I, so another slave's cycle never reaches the
// memory; the clear of the delay register on ACK; little-endian lane order.
module nisc_wb_dmem
  import nisc_wb_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_i,
  // WISHBONE slave
  input  logic               cyc_i,
  input  logic               stb_i,
  input  logic               we_i,
  input  logic [DMEM_AW-1:0] adr_i,
  input  logic [3:0]         sel_i,
  input  logic [DATA_W-1:0]  dat_i,
  output logic [DATA_W-1:0]  dat_o,
  output logic               ack_o,
  // NISC data-memory external access port
  output dmem_req_t          mem_req_o,
  output logic [DATA_W-1:0]  mem_wdata_o,
  input  logic [DATA_W-1:0]  mem_rdata_i
);

  logic      sel;
  logic      ack_dly_q;
  lane_sel_t lane;

  assign sel   = cyc_i & stb_i;
  assign lane  = decode_sel(sel_i);
  assign ack_o = sel & ack_dly_q;

  always_ff @(posedge clk_i) begin
    if (rst_i) ack_dly_q <= 1'b0;
    else       ack_dly_q <= sel & ~ack_o;
  end

  always_comb begin
    mem_req_o.addr  = {adr_i[DMEM_AW-1:2], lane.offset};
    mem_req_o.mtype = lane.mtype;
    mem_req_o.wr_en = sel & we_i & ~ack_dly_q;
    mem_req_o.rd_en = sel & ~we_i;
    mem_wdata_o     = (dat_i >> (8 * lane.offset)) & size_mask(lane.mtype);
    dat_o           = (mem_rdata_i & size_mask(lane.mtype)) << (8 * lane.offset);
  end

  a_ack_in_cycle: assert property (@(posedge clk_i) disable iff (rst_i)
                                   ack_o |-> (cyc_i && stb_i));
  a_ack_one_wait: assert property (@(posedge clk_i) disable iff (rst_i)
                                   (sel && !ack_o) |=> (!sel || ack_o));

endmodule
