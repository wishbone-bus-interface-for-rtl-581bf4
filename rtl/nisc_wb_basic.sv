// NISC basic WISHBONE interface: control and shared registers of the
// coprocessor.
//
// A 32-bit WISHBONE classic SLAVE that lets a host processor start and stop
// the NISC core, see when it has finished, enable a completion interrupt, and
// exchange a few 32-bit values with the NISC datapath. Register map (byte
// offsets from the slave's base address, one 32-bit register per word):
//
//   0x00          write bit0: RESET register, 1 holds NISC in reset, 0 lets
//                 it run
//                 read  bit0: HALT, the registered halt output of NISC
//   0x04          INT_EN, bit0, read/write
//   0x08 ...      RESULT 1..N_RESULTS, read only: these are NISC external
//                 output ports, which are registers inside the NISC core
//   then          ARG 1..N_ARGS, read/write: they drive the NISC external
//                 input ports
//
// With the default N_RESULTS = 1 and N_ARGS = 2 this is RESULT at 0x08, ARG1
// at 0x0C and ARG2 at 0x10. Unused addresses read as zero; unused bits of the
// two control words read as zero.
//
// Timing: ACK_O = CYC_I & STB_I, so every access completes in the cycle it is
// presented (no wait states). A write takes effect at the clock edge that ends
// the cycle. HALT is sampled into a register, so a change of the NISC halt
// output shows up one cycle later in a read and on INT_O.
// INT_O = INT_EN & HALT & ~RESET: it rises when NISC halts with interrupts
// enabled, and falls when the host disables interrupts, puts NISC back in
// reset, or restarts it.
// NISC's reset is RST_I OR the RESET register, so a bus reset stops NISC too.
//
// From the original interface design: the register set and map, combinational
// ACK, the registered halt, the AND gate with one inverted input producing
// INT_O, RST_I resetting the registers and NISC, and parameterised argument
// and result counts. Chosen here: RESET comes out of reset at 1, so NISC
// stays stopped until the host starts it; the inverted INT_O input is taken
// to be RESET, so the host clears a pending interrupt by writing 1 to RESET
// (or 0 to INT_EN), and writing 0 to a core that has already halted leaves
// it halted; writes to RESULT are ignored; SEL_I is ignored because the bus
// granularity is 32 bits.
module nisc_wb_basic
  import nisc_wb_pkg::*;
#(
  parameter int unsigned N_ARGS    = 2,  // NISC external input ports
  parameter int unsigned N_RESULTS = 1,  // NISC external output ports
  parameter int unsigned ADDR_W    = 5   // byte address bits seen by the slave
) (
  input  logic              clk_i,
  input  logic              rst_i,
  // WISHBONE slave
  input  logic              cyc_i,
  input  logic              stb_i,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] adr_i,
  input  logic [3:0]        sel_i,
  input  logic [DATA_W-1:0] dat_i,
  output logic [DATA_W-1:0] dat_o,
  output logic              ack_o,
  output logic              int_o,
  // NISC core side
  output logic              nisc_reset_o,
  input  logic              nisc_halt_i,
  output logic [DATA_W-1:0] ext_in_o  [N_ARGS],
  input  logic [DATA_W-1:0] ext_out_i [N_RESULTS]
);

  localparam int unsigned N_REGS   = 2 + N_RESULTS + N_ARGS;
  localparam int unsigned IDX_W    = ADDR_W - 2;
  localparam int unsigned IDX_CTRL = 0;
  localparam int unsigned IDX_INT  = 1;
  localparam int unsigned IDX_RES  = 2;
  localparam int unsigned IDX_ARG  = 2 + N_RESULTS;

  initial begin
    assert (N_ARGS >= 1 && N_RESULTS >= 1)
      else $error("nisc_wb_basic: N_ARGS and N_RESULTS must be at least 1");
    assert (N_REGS <= (1 << IDX_W))
      else $error("nisc_wb_basic: ADDR_W too small for %0d registers", N_REGS);
  end

  logic [IDX_W-1:0]  idx;
  logic              sel;       // this slave addressed
  logic              wr;        // register write strobe
  logic              reset_q;
  logic              halt_q;
  logic              int_en_q;
  logic [DATA_W-1:0] arg_q [N_ARGS];

  // sel_i is unused: 32-bit granularity, every write is a whole word.
  logic unused_sel;
  assign unused_sel = ^sel_i;

  assign idx   = adr_i[ADDR_W-1:2];
  assign sel   = cyc_i & stb_i;
  assign wr    = sel & we_i;
  assign ack_o = sel;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      reset_q  <= 1'b1;
      int_en_q <= 1'b0;
      halt_q   <= 1'b0;
    end else begin
      halt_q <= nisc_halt_i;
      if (wr && idx == IDX_W'(IDX_CTRL)) reset_q  <= dat_i[0];
      if (wr && idx == IDX_W'(IDX_INT))  int_en_q <= dat_i[0];
    end
  end

  for (genvar a = 0; a < N_ARGS; a++) begin : g_arg
    always_ff @(posedge clk_i) begin
      if (rst_i)                                 arg_q[a] <= '0;
      else if (wr && idx == IDX_W'(IDX_ARG + a)) arg_q[a] <= dat_i;
    end
    assign ext_in_o[a] = arg_q[a];
  end

  // Output multiplexer, steered by the address.
  always_comb begin
    dat_o = '0;
    if (idx == IDX_W'(IDX_CTRL)) dat_o[0] = halt_q;
    if (idx == IDX_W'(IDX_INT))  dat_o[0] = int_en_q;
    for (int r = 0; r < N_RESULTS; r++)
      if (idx == IDX_W'(IDX_RES + r)) dat_o = ext_out_i[r];
    for (int a = 0; a < N_ARGS; a++)
      if (idx == IDX_W'(IDX_ARG + a)) dat_o = arg_q[a];
  end

  assign nisc_reset_o = rst_i | reset_q;
  assign int_o        = int_en_q & halt_q & ~reset_q;

  // Handshake rule: ACK only answers an active strobe inside a cycle.
  a_ack_in_cycle: assert property (@(posedge clk_i) disable iff (rst_i)
                                   ack_o |-> (cyc_i && stb_i));

endmodule
