// End-to-end testbench for nisc_wb_coprocessor at its default parameters.
//
// The coprocessor interface is connected to a behavioural NISC core (which
// sums an array in data memory, doubles it in place and returns the sum) and
// to a model of the NISC data-memory controller. A host task sequence then
// follows the coprocessor protocol several times with different array sizes:
// stop NISC, pass arguments through the argument registers and the array
// through the data-memory port, start NISC, detect completion by polling HALT
// or by waiting for INT_O, and collect the result register and the array.
//
// Counted mechanisms (each must occur at least once): NISC held in reset by
// the host, argument writes, host data-memory writes and reads while it owns
// the memory, byte and half-word accesses, a host read returning zero and a
// host write being lost while NISC runs, completion seen by polling, INT_O
// raised, INT_O cleared by stopping the core, result reads. Latencies checked: ACK in
// the first cycle on the basic port, in the second on the data-memory port;
// the core's run time of 3 cycles per element plus 2.
module nisc_wb_coprocessor_tb;
  import nisc_wb_pkg::*;

  localparam int ADDR_W = 5;
  localparam logic [ADDR_W-1:0] A_CTRL = 5'd0, A_INT_EN = 5'd4, A_RESULT = 5'd8,
                                A_ARG1 = 5'd12, A_ARG2 = 5'd16;

  logic               clk = 1'b0;
  logic               rst;
  logic               wb_cyc, wb_stb, wb_we, wb_ack, int_o;
  logic [ADDR_W-1:0]  wb_adr;
  logic [3:0]         wb_sel;
  logic [31:0]        wb_dw, wb_dr;
  logic               mem_cyc, mem_stb, mem_we, mem_ack;
  logic [DMEM_AW-1:0] mem_adr;
  logic [3:0]         mem_sel;
  logic [31:0]        mem_dw, mem_dr;
  logic               nisc_reset, nisc_halt;
  logic [31:0]        ext_in [2];
  logic [31:0]        ext_out [1];
  dmem_req_t          nisc_req, mc_req;
  logic [31:0]        nisc_wdata, nisc_rdata, mc_wdata, mc_rdata;

  int checks = 0, failures = 0;

  nisc_wb_coprocessor dut (
    .clk_i(clk), .rst_i(rst),
    .wb_cyc_i(wb_cyc), .wb_stb_i(wb_stb), .wb_we_i(wb_we), .wb_adr_i(wb_adr),
    .wb_sel_i(wb_sel), .wb_dat_i(wb_dw), .wb_dat_o(wb_dr), .wb_ack_o(wb_ack), .int_o(int_o),
    .mem_cyc_i(mem_cyc), .mem_stb_i(mem_stb), .mem_we_i(mem_we), .mem_adr_i(mem_adr),
    .mem_sel_i(mem_sel), .mem_dat_i(mem_dw), .mem_dat_o(mem_dr), .mem_ack_o(mem_ack),
    .nisc_reset_o(nisc_reset), .nisc_halt_i(nisc_halt),
    .nisc_ext_in_o(ext_in), .nisc_ext_out_i(ext_out),
    .nisc_mem_req_i(nisc_req), .nisc_mem_wdata_i(nisc_wdata), .nisc_mem_rdata_o(nisc_rdata),
    .mc_req_o(mc_req), .mc_wdata_o(mc_wdata), .mc_rdata_i(mc_rdata)
  );

  nisc_core_model u_core (
    .clk_i(clk), .reset_i(nisc_reset), .halt_o(nisc_halt), .ext_in_i(ext_in),
    .ext_out_o(ext_out), .mem_req_o(nisc_req), .mem_wdata_o(nisc_wdata),
    .mem_rdata_i(nisc_rdata)
  );

  nisc_dmem_model u_mem (.clk_i(clk), .req_i(mc_req), .wdata_i(mc_wdata), .rdata_o(mc_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Mechanism counters.
  int n_hold_reset, n_arg_write, n_host_mem_write, n_host_mem_read, n_subword;
  int n_blocked_read, n_blocked_write, n_poll_done, n_int_raised, n_int_cleared, n_result;

  task automatic basic_access(input logic w, input logic [ADDR_W-1:0] a, input logic [31:0] d,
                              output logic [31:0] q);
    @(negedge clk);
    wb_cyc = 1; wb_stb = 1; wb_we = w; wb_adr = a; wb_sel = 4'hF; wb_dw = d;
    #1;
    check(wb_ack === 1'b1, "basic port ACK in the first cycle");
    q = wb_dr;
    @(posedge clk); #1;
    wb_cyc = 0; wb_stb = 0; wb_we = 0;
  endtask

  task automatic basic_write(input logic [ADDR_W-1:0] a, input logic [31:0] d);
    logic [31:0] q;
    basic_access(1'b1, a, d, q);
  endtask

  task automatic mem_access(input logic w, input logic [DMEM_AW-1:0] a, input logic [3:0] s,
                            input logic [31:0] d, output logic [31:0] q);
    int n;
    @(negedge clk);
    mem_cyc = 1; mem_stb = 1; mem_we = w; mem_adr = a; mem_sel = s; mem_dw = d;
    n = 1;
    #1;
    while (mem_ack !== 1'b1 && n < 10) begin
      @(negedge clk); #1; n++;
    end
    check(n == 2, "data-memory port ACK in the second cycle");
    q = mem_dr;
    @(posedge clk); #1;
    mem_cyc = 0; mem_stb = 0; mem_we = 0;
  endtask

  // One complete coprocessor call on an array of n words at base.
  task automatic run_call(input int n, input logic [DMEM_AW-1:0] base, input bit use_irq);
    logic [31:0] q, sum, start_cycles;
    logic [31:0] data [];
    int          polls;
    data = new[n];

    // 1. Stop NISC.
    basic_write(A_CTRL, 32'h1);
    #1 check(nisc_reset === 1'b1, "NISC held in reset");
    if (nisc_reset) n_hold_reset++;

    // 2. Send data: array through the data-memory port, arguments to registers.
    sum = 0;
    for (int i = 0; i < n; i++) begin
      data[i] = $urandom;
      sum += data[i];
      mem_access(1'b1, base + DMEM_AW'(4 * i), 4'hF, data[i], q);
      n_host_mem_write++;
    end
    mem_access(1'b0, base, 4'hF, 32'h0, q);
    check(q === data[0], "host reads back first element");
    n_host_mem_read++;
    basic_write(A_ARG1, 32'(base));
    basic_write(A_ARG2, n);
    n_arg_write += 2;
    check(ext_in[0] === 32'(base) && ext_in[1] === n, "arguments on NISC inputs");
    basic_write(A_INT_EN, {31'h0, use_irq});

    // 3. Start.
    basic_write(A_CTRL, 32'h0);
    #1 check(nisc_reset === 1'b0, "NISC released");

    // While it runs the host has no access to the data memory.
    if (!nisc_halt) begin
      mem_access(1'b0, base, 4'hF, 32'h0, q);
      check(q === 32'h0, "host read returns zero while NISC runs");
      if (q === 32'h0 && data[0] != 0) n_blocked_read++;
      mem_access(1'b1, 16'hF000, 4'hF, 32'hFFFF_FFFF, q);
      n_blocked_write++;
    end

    // 4. Detect completion.
    polls = 0;
    if (use_irq) begin
      while (int_o !== 1'b1 && polls < 10000) begin @(posedge clk); polls++; end
      check(int_o === 1'b1, "INT_O raised on completion");
      if (int_o) n_int_raised++;
    end else begin
      q = 0;
      while (q[0] !== 1'b1 && polls < 10000) begin
        basic_access(1'b0, A_CTRL, 32'h0, q);
        polls++;
      end
      check(q[0] === 1'b1, "HALT seen by polling");
      if (q[0]) n_poll_done++;
      check(int_o === 1'b0, "no INT_O with interrupts disabled");
    end
    check(u_core.cycles == 3 * n + 2, $sformatf("NISC run time %0d cycles, expected %0d",
                                                u_core.cycles, 3 * n + 2));

    // 5. Get the results.
    basic_access(1'b0, A_RESULT, 32'h0, q);
    check(q === sum, $sformatf("RESULT %h, expected %h", q, sum));
    n_result++;
    for (int i = 0; i < n; i++) begin
      mem_access(1'b0, base + DMEM_AW'(4 * i), 4'hF, 32'h0, q);
      check(q === data[i] << 1, $sformatf("element %0d: %h, expected %h", i, q, data[i] << 1));
      n_host_mem_read++;
    end
    mem_access(1'b0, 16'hF000, 4'hF, 32'h0, q);
    check(q === 32'h0, "host write made while NISC ran was lost");

    // Byte and half-word access to a returned element.
    mem_access(1'b0, base, 4'b0100, 32'h0, q);
    check(q === ((data[0] << 1) & 32'h00FF_0000), "byte read of lane 2");
    mem_access(1'b1, base, 4'b1100, 32'h5A5A_0000, q);
    mem_access(1'b0, base, 4'hF, 32'h0, q);
    check(q === {16'h5A5A, 16'((data[0] << 1) & 32'hFFFF)}, "half-word write of upper half");
    n_subword += 3;

    if (use_irq) begin
      // Writing 0 to a halted core with RESET already 0 changes nothing; the
      // host clears the interrupt by stopping the core (RESET = 1).
      basic_write(A_CTRL, 32'h0);
      check(int_o === 1'b1, "INT_O stays while the core remains halted");
      basic_write(A_CTRL, 32'h1);
      #1 check(int_o === 1'b0, "INT_O cleared by writing 1 to RESET");
      if (!int_o) n_int_cleared++;
      // A new start keeps it low until the core halts again.
      basic_write(A_CTRL, 32'h0);
      @(posedge clk); #1;
      check(int_o === 1'b0 && nisc_halt === 1'b0, "INT_O low after restart");
      basic_write(A_CTRL, 32'h1);
    end
  endtask

  initial begin
    {n_hold_reset, n_arg_write, n_host_mem_write, n_host_mem_read, n_subword} = '0;
    {n_blocked_read, n_blocked_write, n_poll_done, n_int_raised, n_int_cleared, n_result} = '0;
    wb_cyc = 0; wb_stb = 0; wb_we = 0; wb_adr = '0; wb_sel = '0; wb_dw = '0;
    mem_cyc = 0; mem_stb = 0; mem_we = 0; mem_adr = '0; mem_sel = '0; mem_dw = '0;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(nisc_reset === 1'b1, "NISC stays in reset after bus reset");

    run_call(4,   16'h0100, 1'b0);
    run_call(16,  16'h0400, 1'b1);
    run_call(64,  16'h2000, 1'b0);
    run_call(200, 16'h8000, 1'b1);

    check(n_hold_reset > 0,     "mechanism: NISC held in reset");
    check(n_arg_write > 0,      "mechanism: argument register writes");
    check(n_host_mem_write > 0, "mechanism: host data-memory writes");
    check(n_host_mem_read > 0,  "mechanism: host data-memory reads");
    check(n_subword > 0,        "mechanism: byte/half-word accesses");
    check(n_blocked_read > 0,   "mechanism: host read blocked while running");
    check(n_blocked_write > 0,  "mechanism: host write lost while running");
    check(n_poll_done > 0,      "mechanism: completion by polling");
    check(n_int_raised > 0,     "mechanism: completion interrupt");
    check(n_int_cleared > 0,    "mechanism: interrupt cleared");
    check(n_result > 0,         "mechanism: result register read");
    $display("mechanisms: hold=%0d args=%0d mem_wr=%0d mem_rd=%0d subword=%0d blocked_rd=%0d blocked_wr=%0d poll=%0d irq=%0d irq_clr=%0d result=%0d",
             n_hold_reset, n_arg_write, n_host_mem_write, n_host_mem_read, n_subword,
             n_blocked_read, n_blocked_write, n_poll_done, n_int_raised, n_int_cleared, n_result);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
