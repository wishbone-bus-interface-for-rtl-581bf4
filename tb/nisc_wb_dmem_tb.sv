// Self-checking testbench for nisc_wb_dmem, connected straight to a model of
// the NISC data-memory controller.
//
// Checks, for byte, half-word and word accesses on every lane: the address
// and type code handed to the memory controller, write data moved down to bit
// 0, read data moved back up to its lane with the other lanes zero, the
// one-cycle ACK delay (ACK exactly in the second cycle of every access, also
// with the strobe held high for back-to-back accesses), and a run of random
// accesses against a byte-array reference.
module nisc_wb_dmem_tb;
  import nisc_wb_pkg::*;

  logic               clk = 1'b0;
  logic               rst;
  logic               cyc, stb, we;
  logic [DMEM_AW-1:0] adr;
  logic [3:0]         sel;
  logic [31:0]        dat_w, dat_r;
  logic               ack;
  dmem_req_t          req;
  logic [31:0]        wdata, rdata;

  int checks = 0, failures = 0;

  nisc_wb_dmem dut (
    .clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb), .we_i(we), .adr_i(adr),
    .sel_i(sel), .dat_i(dat_w), .dat_o(dat_r), .ack_o(ack),
    .mem_req_o(req), .mem_wdata_o(wdata), .mem_rdata_i(rdata)
  );

  nisc_dmem_model u_mem (.clk_i(clk), .req_i(req), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // One single cycle, ACK expected in exactly the second clock cycle.
  // keep = 1 leaves CYC/STB high afterwards (back-to-back accesses).
  task automatic wb_access(input logic w, input logic [DMEM_AW-1:0] a, input logic [3:0] s,
                           input logic [31:0] d, input logic keep, output logic [31:0] q);
    int n;
    @(negedge clk);
    cyc = 1; stb = 1; we = w; adr = a; sel = s; dat_w = d;
    n = 1;
    #1;
    while (ack !== 1'b1 && n < 10) begin
      @(negedge clk); #1; n++;
    end
    check(n == 2, $sformatf("ACK in cycle %0d, expected 2 (addr %h sel %b)", n, a, s));
    q = dat_r;
    @(posedge clk); #1;
    if (!keep) begin cyc = 0; stb = 0; we = 0; end
  endtask

  logic [7:0] ref_mem [1 << DMEM_AW];

  function automatic int unsigned lane_of(input logic [3:0] s);
    for (int l = 0; l < 4; l++) if (s[l]) return l;
    return 0;
  endfunction

  // Expected read data for a select pattern, from the reference memory.
  function automatic logic [31:0] ref_read(input logic [DMEM_AW-1:0] a, input logic [3:0] s);
    logic [31:0] r = '0;
    for (int l = 0; l < 4; l++)
      if (s[l]) r[8*l +: 8] = ref_mem[{a[DMEM_AW-1:2], 2'(l)}];
    return r;
  endfunction

  task automatic ref_write(input logic [DMEM_AW-1:0] a, input logic [3:0] s, input logic [31:0] d);
    for (int l = 0; l < 4; l++)
      if (s[l]) ref_mem[{a[DMEM_AW-1:2], 2'(l)}] = d[8*l +: 8];
  endtask

  localparam logic [3:0] SELS [7] = '{4'b1111, 4'b0011, 4'b1100, 4'b0001, 4'b0010, 4'b0100, 4'b1000};

  logic [31:0] q;
  int          n_req_checked;

  // Check what reaches the memory controller during each first cycle.
  always @(negedge clk) begin
    #2;
    if (cyc && stb && !ack) begin
      automatic lane_sel_t ls = decode_sel(sel);
      checks++;
      n_req_checked++;
      if (req.addr !== {adr[DMEM_AW-1:2], ls.offset} || req.mtype !== ls.mtype ||
          req.wr_en !== we || req.rd_en !== !we ||
          (we && wdata !== ((dat_w >> (8 * ls.offset)) & size_mask(ls.mtype)))) begin
        failures++;
        $display("FAIL: controller request addr %h type %0d we %b rd %b wdata %h for adr %h sel %b",
                 req.addr, req.mtype, req.wr_en, req.rd_en, wdata, adr, sel);
      end
    end
  end

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 8'h00;
    n_req_checked = 0;
    cyc = 0; stb = 0; we = 0; adr = '0; sel = '0; dat_w = '0;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(ack === 1'b0, "no ACK when idle");

    // Directed: a word, then every lane pattern over it.
    wb_access(1'b1, 16'h0100, 4'hF, 32'h4433_2211, 1'b0, q);
    ref_write(16'h0100, 4'hF, 32'h4433_2211);
    check(u_mem.peek_word(32'h100) === 32'h4433_2211, "word stored little-endian");
    foreach (SELS[k]) begin
      wb_access(1'b0, 16'h0100, SELS[k], 32'h0, 1'b0, q);
      check(q === ref_read(16'h0100, SELS[k]),
            $sformatf("read sel %b got %h want %h", SELS[k], q, ref_read(16'h0100, SELS[k])));
    end
    wb_access(1'b1, 16'h0104, 4'b0100, 32'h00AB_0000, 1'b0, q);
    check(u_mem.peek_word(32'h104) === 32'h00AB_0000, "byte write into lane 2 lands at offset 2");
    ref_write(16'h0104, 4'b0100, 32'h00AB_0000);
    wb_access(1'b1, 16'h0104, 4'b1100, 32'hBEEF_0000, 1'b0, q);
    check(u_mem.peek_word(32'h104) === 32'hBEEF_0000, "upper half-word write");
    ref_write(16'h0104, 4'b1100, 32'hBEEF_0000);
    wb_access(1'b1, 16'h0104, 4'b0011, 32'h0000_1234, 1'b0, q);
    check(u_mem.peek_word(32'h104) === 32'hBEEF_1234, "lower half-word write keeps upper half");
    ref_write(16'h0104, 4'b0011, 32'h0000_1234);
    // The two low address bits from the bus are replaced by the lane offset.
    wb_access(1'b0, 16'h0107, 4'b0001, 32'h0, 1'b0, q);
    check(q === 32'h0000_0034, "low address bits ignored, lane 0 read");

    // Back-to-back accesses with the strobe held high.
    wb_access(1'b1, 16'h0200, 4'hF, 32'hA5A5_0001, 1'b1, q);
    wb_access(1'b1, 16'h0204, 4'hF, 32'hA5A5_0002, 1'b1, q);
    wb_access(1'b0, 16'h0200, 4'hF, 32'h0, 1'b1, q);
    check(q === 32'hA5A5_0001, "back-to-back read 1");
    wb_access(1'b0, 16'h0204, 4'hF, 32'h0, 1'b0, q);
    check(q === 32'hA5A5_0002, "back-to-back read 2");
    ref_write(16'h0200, 4'hF, 32'hA5A5_0001);
    ref_write(16'h0204, 4'hF, 32'hA5A5_0002);

    // Random accesses in a small window so reads hit earlier writes.
    for (int n = 0; n < 1500; n++) begin
      logic [DMEM_AW-1:0] a;
      logic [3:0]         s;
      logic [31:0]        d;
      a = DMEM_AW'($urandom_range(0, 63)) | 16'h0400;
      s = SELS[$urandom_range(0, 6)];
      d = $urandom;
      if ($urandom_range(0, 1) == 1) begin
        wb_access(1'b1, a, s, d, 1'($urandom), q);
        ref_write(a, s, d);
      end else begin
        wb_access(1'b0, a, s, 32'h0, 1'($urandom), q);
        check(q === ref_read(a, s), $sformatf("random read %h sel %b got %h want %h",
                                              a, s, q, ref_read(a, s)));
      end
    end
    @(negedge clk); cyc = 0; stb = 0;
    check(n_req_checked > 1000, "controller requests were checked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
