// Self-checking testbench for nisc_dmem_mux.
//
// Drives random requests on both sides in all four combinations of NISC reset
// and halt, and checks against the ownership rule: the external side owns the
// memory controller while reset or halt is active; otherwise the NISC side
// does and external reads return zero. Also runs a short scenario with a
// memory model behind the multiplexer: an external write is lost while NISC
// runs and lands once NISC has halted.
module nisc_dmem_mux_tb;
  import nisc_wb_pkg::*;

  logic        clk = 1'b0;
  logic        nisc_reset, nisc_halt;
  dmem_req_t   nisc_req, ext_req, mc_req;
  logic [31:0] nisc_wdata, nisc_rdata, ext_wdata, ext_rdata, mc_wdata, mc_rdata;

  int checks = 0, failures = 0;
  int n_ext_owner = 0, n_nisc_owner = 0;

  nisc_dmem_mux dut (
    .nisc_reset_i(nisc_reset), .nisc_halt_i(nisc_halt),
    .nisc_req_i(nisc_req), .nisc_wdata_i(nisc_wdata), .nisc_rdata_o(nisc_rdata),
    .ext_req_i(ext_req), .ext_wdata_i(ext_wdata), .ext_rdata_o(ext_rdata),
    .mc_req_o(mc_req), .mc_wdata_o(mc_wdata), .mc_rdata_i(mc_rdata)
  );

  // Memory behind the multiplexer, for the scenario at the end.
  logic        use_model;
  logic [31:0] model_rdata;
  nisc_dmem_model u_mem (.clk_i(clk), .req_i(mc_req), .wdata_i(mc_wdata), .rdata_o(model_rdata));

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  function automatic dmem_req_t rand_req();
    dmem_req_t r;
    r.addr  = DMEM_AW'($urandom);
    r.mtype = mem_type_e'($urandom_range(0, 2));
    r.rd_en = 1'($urandom);
    r.wr_en = 1'($urandom);
    return r;
  endfunction

  logic [31:0] mc_rdata_drv;
  always_comb mc_rdata = use_model ? model_rdata : mc_rdata_drv;

  initial begin
    use_model = 0;
    for (int n = 0; n < 2000; n++) begin
      logic ext_owner;
      nisc_reset   = 1'($urandom);
      nisc_halt    = 1'($urandom);
      nisc_req     = rand_req();
      ext_req      = rand_req();
      nisc_wdata   = $urandom;
      ext_wdata    = $urandom;
      mc_rdata_drv = $urandom;
      #1;
      ext_owner = nisc_reset | nisc_halt;
      if (ext_owner) n_ext_owner++; else n_nisc_owner++;
      check(mc_req === (ext_owner ? ext_req : nisc_req), "controller request from owner");
      check(mc_wdata === (ext_owner ? ext_wdata : nisc_wdata), "controller write data from owner");
      check(ext_rdata === (ext_owner ? mc_rdata_drv : 32'h0), "external read data or zero");
      check(nisc_rdata === mc_rdata_drv, "NISC read data wired through");
    end
    check(n_ext_owner > 100 && n_nisc_owner > 100, "both owners exercised");

    // Scenario with the memory model.
    use_model = 1;
    nisc_req = '{addr: '0, mtype: MEM_WORD, rd_en: 1'b0, wr_en: 1'b0};
    @(negedge clk);
    nisc_reset = 0; nisc_halt = 0;                  // NISC running
    ext_req = '{addr: 16'h0040, mtype: MEM_WORD, rd_en: 1'b0, wr_en: 1'b1};
    ext_wdata = 32'hDEAD_BEEF;
    @(negedge clk);
    ext_req.wr_en = 0;
    check(u_mem.peek_word(32'h40) === 32'h0, "external write lost while NISC runs");
    nisc_halt = 1;                                  // NISC halted
    ext_req.wr_en = 1;
    @(negedge clk);
    ext_req.wr_en = 0; ext_req.rd_en = 1;
    check(u_mem.peek_word(32'h40) === 32'hDEAD_BEEF, "external write lands after halt");
    @(negedge clk);
    check(ext_rdata === 32'hDEAD_BEEF, "external read after halt");
    nisc_halt = 0;
    #1 check(ext_rdata === 32'h0, "external read zero once NISC runs again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
