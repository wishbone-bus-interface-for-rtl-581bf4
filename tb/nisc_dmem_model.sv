// Behavioural model of a NISC data-memory controller and its block RAM, for
// simulation only.
//
// Byte-addressed memory of 2**DMEM_AW bytes behind the NISC memory-controller
// protocol: a byte address that need not be aligned, an access-type code, and
// data of byte or half-word size carried in the low bits. Multi-byte values
// are stored little-endian. Writes take effect at the clock edge; read data is
// registered and appears the cycle after rd_en, as from a synchronous RAM.
// Bytes of a read beyond the access size are zero. Memory starts all zero.
module nisc_dmem_model
  import nisc_wb_pkg::*;
(
  input  logic              clk_i,
  input  dmem_req_t         req_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic [DATA_W-1:0] rdata_o
);

  localparam int unsigned BYTES = 1 << DMEM_AW;

  logic [7:0] mem [BYTES];
  int unsigned nbytes;

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    rdata_o = '0;
  end

  always_comb begin
    unique case (req_i.mtype)
      MEM_BYTE: nbytes = 1;
      MEM_HALF: nbytes = 2;
      default:  nbytes = 4;
    endcase
  end

  always @(posedge clk_i) begin
    if (req_i.wr_en)
      for (int b = 0; b < int'(nbytes); b++)
        mem[DMEM_AW'(req_i.addr + DMEM_AW'(b))] <= wdata_i[8*b +: 8];
    if (req_i.rd_en) begin
      logic [DATA_W-1:0] r;
      r = '0;
      for (int b = 0; b < int'(nbytes); b++)
        r[8*b +: 8] = mem[DMEM_AW'(req_i.addr + DMEM_AW'(b))];
      rdata_o <= r;
    end
  end

  // Peek and poke for testbenches, outside the bus protocol.
  function automatic logic [31:0] peek_word(input int unsigned a);
    return {mem[DMEM_AW'(a+3)], mem[DMEM_AW'(a+2)], mem[DMEM_AW'(a+1)], mem[DMEM_AW'(a)]};
  endfunction

endmodule
