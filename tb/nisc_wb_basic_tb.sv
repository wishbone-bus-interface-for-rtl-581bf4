// Self-checking testbench for nisc_wb_basic at its default size (two
// arguments, one result).
//
// Drives WISHBONE single read and write cycles and a stand-in for the NISC
// core's halt output and result port. Checks the register map, zero-wait ACK,
// the reset register and its reset value, the registered halt status, INT_O
// = INT_EN & HALT & ~RESET, ignored writes to RESULT, zero reads from unused
// addresses, and a run of random accesses against a reference register model.
module nisc_wb_basic_tb;
  import nisc_wb_pkg::*;

  localparam int ADDR_W = 5;

  logic              clk = 1'b0;
  logic              rst;
  logic              cyc, stb, we;
  logic [ADDR_W-1:0] adr;
  logic [3:0]        sel;
  logic [31:0]       dat_w, dat_r;
  logic              ack, int_o, nisc_reset, halt;
  logic [31:0]       ext_in  [2];
  logic [31:0]       ext_out [1];

  int checks = 0, failures = 0;

  nisc_wb_basic dut (
    .clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb), .we_i(we), .adr_i(adr),
    .sel_i(sel), .dat_i(dat_w), .dat_o(dat_r), .ack_o(ack), .int_o(int_o),
    .nisc_reset_o(nisc_reset), .nisc_halt_i(halt), .ext_in_o(ext_in),
    .ext_out_i(ext_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One single cycle; ACK is expected in the first cycle.
  task automatic wb_access(input logic w, input logic [ADDR_W-1:0] a,
                           input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cyc = 1; stb = 1; we = w; adr = a; dat_w = d; sel = 4'hF;
    #1;
    check(ack === 1'b1, $sformatf("ACK in first cycle, addr %0d", a));
    q = dat_r;
    @(posedge clk);
    #1;
    cyc = 0; stb = 0; we = 0;
  endtask

  task automatic wb_write(input logic [ADDR_W-1:0] a, input logic [31:0] d);
    logic [31:0] q;
    wb_access(1'b1, a, d, q);
  endtask

  task automatic wb_read(input logic [ADDR_W-1:0] a, output logic [31:0] q);
    wb_access(1'b0, a, 32'h0, q);
  endtask

  logic [31:0] q;
  logic [31:0] ref_arg [2];
  logic        ref_int_en, ref_reset;

  initial begin
    cyc = 0; stb = 0; we = 0; adr = '0; sel = '0; dat_w = '0;
    halt = 0; ext_out[0] = 32'hCAFE_0001;
    rst = 1;
    repeat (3) @(posedge clk);
    #1;
    check(nisc_reset === 1'b1, "NISC reset during RST_I");
    rst = 0;
    #1;
    check(nisc_reset === 1'b1, "RESET register comes out of reset at 1");

    // No ACK without a strobe, none with CYC alone.
    @(negedge clk);
    check(ack === 1'b0, "no ACK when idle");
    cyc = 1; #1;
    check(ack === 1'b0, "no ACK with CYC only");
    cyc = 0;

    // Initial contents.
    wb_read(5'd0, q);  check(q === 32'h0, "HALT reads 0 after reset");
    wb_read(5'd4, q);  check(q === 32'h0, "INT_EN reads 0 after reset");
    wb_read(5'd12, q); check(q === 32'h0, "ARG1 reads 0 after reset");
    wb_read(5'd16, q); check(q === 32'h0, "ARG2 reads 0 after reset");

    // Arguments reach the external input ports.
    wb_write(5'd12, 32'h1234_5678);
    wb_write(5'd16, 32'h9ABC_DEF0);
    wb_read(5'd12, q); check(q === 32'h1234_5678, "ARG1 readback");
    wb_read(5'd16, q); check(q === 32'h9ABC_DEF0, "ARG2 readback");
    check(ext_in[0] === 32'h1234_5678, "ARG1 on external input 1");
    check(ext_in[1] === 32'h9ABC_DEF0, "ARG2 on external input 2");

    // Result port is read through; writes to it do nothing.
    wb_read(5'd8, q);  check(q === 32'hCAFE_0001, "RESULT reads external output");
    wb_write(5'd8, 32'hFFFF_FFFF);
    wb_read(5'd8, q);  check(q === 32'hCAFE_0001, "RESULT not writable");
    ext_out[0] = 32'h0BAD_F00D;
    wb_read(5'd8, q);  check(q === 32'h0BAD_F00D, "RESULT follows external output");

    // Unused addresses.
    wb_read(5'd20, q); check(q === 32'h0, "unused address 20 reads 0");
    wb_read(5'd28, q); check(q === 32'h0, "unused address 28 reads 0");
    wb_write(5'd24, 32'h5555_5555);
    wb_read(5'd12, q); check(q === 32'h1234_5678, "write to unused address harmless");

    // Start NISC.
    wb_write(5'd0, 32'h0);
    #1 check(nisc_reset === 1'b0, "writing 0 to RESET releases NISC");
    wb_write(5'd4, 32'h1);
    wb_read(5'd4, q); check(q === 32'h1, "INT_EN readback");
    check(int_o === 1'b0, "no interrupt while running");

    // NISC halts: status one cycle later, interrupt raised.
    @(negedge clk); halt = 1;
    #1 check(int_o === 1'b0, "halt is registered before INT_O");
    @(posedge clk); #1;
    check(int_o === 1'b1, "INT_O when halted and enabled");
    wb_read(5'd0, q); check(q === 32'h1, "HALT status reads 1");

    // Interrupt masked by INT_EN.
    wb_write(5'd4, 32'h0);
    #1 check(int_o === 1'b0, "INT_O low with INT_EN cleared");
    wb_write(5'd4, 32'h1);
    #1 check(int_o === 1'b1, "INT_O back with INT_EN set");

    // Interrupt masked by RESET.
    wb_write(5'd0, 32'h1);
    #1 check(nisc_reset === 1'b1 && int_o === 1'b0, "RESET=1 stops NISC and masks INT_O");
    @(negedge clk); halt = 0;
    // Restart: writing 0 acknowledges; halt drops with the new run.
    wb_write(5'd0, 32'h0);
    @(posedge clk); #1;
    check(int_o === 1'b0, "INT_O low after restart");
    wb_read(5'd0, q); check(q === 32'h0, "HALT status reads 0 after restart");

    // Bus reset clears registers and resets NISC.
    @(negedge clk); rst = 1;
    #1 check(nisc_reset === 1'b1, "RST_I resets NISC combinationally");
    @(posedge clk); #1; rst = 0;
    check(ext_in[0] === 32'h0 && ext_in[1] === 32'h0, "RST_I clears arguments");
    wb_read(5'd4, q); check(q === 32'h0, "RST_I clears INT_EN");

    // Random accesses against a reference model.
    ref_arg[0] = 0; ref_arg[1] = 0; ref_int_en = 0; ref_reset = 1;
    for (int n = 0; n < 400; n++) begin
      logic [2:0]  r;
      logic [31:0] d, exp;
      logic        w;
      r = 3'($urandom_range(0, 7));
      d = $urandom;
      w = 1'($urandom);
      if (w) begin
        wb_write({r, 2'b00}, d);
        case (r)
          3'd0: ref_reset  = d[0];
          3'd1: ref_int_en = d[0];
          3'd3: ref_arg[0] = d;
          3'd4: ref_arg[1] = d;
          default: ;
        endcase
        #1 check(nisc_reset === ref_reset, "random: NISC reset");
        check(ext_in[0] === ref_arg[0] && ext_in[1] === ref_arg[1], "random: external inputs");
      end else begin
        wb_read({r, 2'b00}, q);
        case (r)
          3'd0: exp = 32'h0;
          3'd1: exp = {31'h0, ref_int_en};
          3'd2: exp = ext_out[0];
          3'd3: exp = ref_arg[0];
          3'd4: exp = ref_arg[1];
          default: exp = 32'h0;
        endcase
        check(q === exp, $sformatf("random read addr %0d: got %h want %h", {r, 2'b00}, q, exp));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
