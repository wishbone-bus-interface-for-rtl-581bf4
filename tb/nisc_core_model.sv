// Behavioural model of a generated NISC core running one test application,
// for simulation only.
//
// The application takes two arguments on its external input ports: ARG1 is
// the byte address of an array of 32-bit words in data memory, ARG2 the
// number of words. It sums the words, doubles each word in place, puts the
// sum on its external output port (a register inside the core) and halts.
// Each element costs three cycles: read request, data, write-back.
// While reset is high the core is idle with halt low; halt stays high after
// completion until the next reset.
module nisc_core_model
  import nisc_wb_pkg::*;
(
  input  logic              clk_i,
  input  logic              reset_i,
  output logic              halt_o,
  input  logic [DATA_W-1:0] ext_in_i  [2],
  output logic [DATA_W-1:0] ext_out_o [1],
  output dmem_req_t         mem_req_o,
  output logic [DATA_W-1:0] mem_wdata_o,
  input  logic [DATA_W-1:0] mem_rdata_i
);

  typedef enum logic [2:0] {S_START, S_RD, S_DATA, S_WR, S_DONE} state_e;

  state_e            st;
  logic [DATA_W-1:0] i, sum, elem;
  int unsigned       cycles;  // cycles spent running, for testbenches

  always_ff @(posedge clk_i) begin
    if (reset_i) begin
      st           <= S_START;
      i            <= '0;
      sum          <= '0;
      elem         <= '0;
      halt_o       <= 1'b0;
      ext_out_o[0] <= '0;
      cycles       <= 0;
    end else begin
      if (st != S_DONE) cycles <= cycles + 1;
      unique case (st)
        S_START: begin i <= '0; sum <= '0; st <= S_RD; end
        S_RD:    st <= (i == ext_in_i[1]) ? S_DONE : S_DATA;
        S_DATA:  begin elem <= mem_rdata_i; sum <= sum + mem_rdata_i; st <= S_WR; end
        S_WR:    begin i <= i + 1; st <= S_RD; end
        S_DONE:  begin ext_out_o[0] <= sum; halt_o <= 1'b1; end
        default: st <= S_START;
      endcase
    end
  end

  always_comb begin
    mem_req_o   = DMEM_REQ_IDLE;
    mem_wdata_o = '0;
    mem_req_o.addr = DMEM_AW'(ext_in_i[0] + (i << 2));
    if (!reset_i && st == S_RD && i != ext_in_i[1]) mem_req_o.rd_en = 1'b1;
    if (!reset_i && st == S_WR) begin
      mem_req_o.wr_en = 1'b1;
      mem_wdata_o     = elem << 1;
    end
  end

endmodule
