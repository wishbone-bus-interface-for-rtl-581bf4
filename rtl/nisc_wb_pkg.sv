// Shared types and constants of the NISC WISHBONE coprocessor interface.
//
// The NISC data-memory controller takes a byte address, an access-type code
// and separate read and write enables; data narrower than 32 bits travels in
// the low bits of the data buses. A WISHBONE master instead addresses 32-bit
// words and marks the active byte lanes with SEL. This package holds the
// request bundle that both sides of the data-memory multiplexer use and the
// function that turns a SEL pattern into an access type and byte offset.
//
// From the original interface design: the 32-bit data bus, the 16-bit
// data-memory address (a 64 KiB data memory) and a type code per access size.
// Chosen here: the numeric type codes, little-endian lane numbering (lane 0,
// DAT[7:0], is the lowest byte address) and the treatment of SEL patterns
// that are not a byte, an aligned half-word or a full word.
package nisc_wb_pkg;

  localparam int unsigned DATA_W  = 32;  // WISHBONE data size and granularity
  localparam int unsigned DMEM_AW = 16;  // data-memory byte address width

  // Access-type code presented to the NISC data-memory controller.
  typedef enum logic [1:0] {
    MEM_BYTE = 2'd0,
    MEM_HALF = 2'd1,
    MEM_WORD = 2'd2
  } mem_type_e;

  // Address and control half of a data-memory port ("ADDR+CTRL").
  typedef struct packed {
    logic [DMEM_AW-1:0] addr;   // byte address, need not be word aligned
    mem_type_e          mtype;  // access size
    logic               rd_en;
    logic               wr_en;
  } dmem_req_t;

  localparam dmem_req_t DMEM_REQ_IDLE = '{addr: '0, mtype: MEM_WORD, rd_en: 1'b0, wr_en: 1'b0};

  // Result of decoding a WISHBONE byte-select pattern.
  typedef struct packed {
    mem_type_e  mtype;
    logic [1:0] offset;  // byte offset inside the addressed word
  } lane_sel_t;

  // SEL_I -> access type and byte offset. Single bytes and aligned half-words
  // map to their size; every other pattern is treated as a full word.
  function automatic lane_sel_t decode_sel(input logic [3:0] sel);
    lane_sel_t r;
    unique case (sel)
      4'b0001: r = '{mtype: MEM_BYTE, offset: 2'd0};
      4'b0010: r = '{mtype: MEM_BYTE, offset: 2'd1};
      4'b0100: r = '{mtype: MEM_BYTE, offset: 2'd2};
      4'b1000: r = '{mtype: MEM_BYTE, offset: 2'd3};
      4'b0011: r = '{mtype: MEM_HALF, offset: 2'd0};
      4'b1100: r = '{mtype: MEM_HALF, offset: 2'd2};
      default: r = '{mtype: MEM_WORD, offset: 2'd0};
    endcase
    return r;
  endfunction

  // Mask keeping the low bits that an access of the given size carries.
  function automatic logic [DATA_W-1:0] size_mask(input mem_type_e t);
    unique case (t)
      MEM_BYTE: return 32'h0000_00FF;
      MEM_HALF: return 32'h0000_FFFF;
      default:  return 32'hFFFF_FFFF;
    endcase
  endfunction

endpackage
