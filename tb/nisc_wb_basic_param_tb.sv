// Testbench for nisc_wb_basic sized for a function with three arguments and
// two results (N_ARGS = 3, N_RESULTS = 2, ADDR_W = 5).
//
// Checks that the register map moves as the sizes change: results at 0x08
// and 0x0C, arguments at 0x10, 0x14 and 0x18, 0x1C unused; that each argument
// register drives its own external input; and that each result address reads
// its own external output.
module nisc_wb_basic_param_tb;
  import nisc_wb_pkg::*;

  localparam int ADDR_W = 5;

  logic              clk = 1'b0;
  logic              rst;
  logic              cyc, stb, we;
  logic [ADDR_W-1:0] adr;
  logic [31:0]       dat_w, dat_r;
  logic              ack, int_o, nisc_reset;
  logic [31:0]       ext_in  [3];
  logic [31:0]       ext_out [2];

  int checks = 0, failures = 0;

  nisc_wb_basic #(.N_ARGS(3), .N_RESULTS(2), .ADDR_W(ADDR_W)) dut (
    .clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb), .we_i(we), .adr_i(adr),
    .sel_i(4'hF), .dat_i(dat_w), .dat_o(dat_r), .ack_o(ack), .int_o(int_o),
    .nisc_reset_o(nisc_reset), .nisc_halt_i(1'b0), .ext_in_o(ext_in),
    .ext_out_i(ext_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  task automatic wb_access(input logic w, input logic [ADDR_W-1:0] a,
                           input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cyc = 1; stb = 1; we = w; adr = a; dat_w = d;
    #1;
    check(ack === 1'b1, "ACK in first cycle");
    q = dat_r;
    @(posedge clk); #1;
    cyc = 0; stb = 0; we = 0;
  endtask

  logic [31:0] q;

  initial begin
    cyc = 0; stb = 0; we = 0; adr = '0; dat_w = '0;
    ext_out[0] = 32'h1111_0000; ext_out[1] = 32'h2222_0000;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    for (int a = 0; a < 3; a++) wb_access(1'b1, ADDR_W'(16 + 4 * a), 32'hA000_0000 + a, q);
    for (int a = 0; a < 3; a++) begin
      check(ext_in[a] === 32'hA000_0000 + a, $sformatf("argument %0d on its input port", a + 1));
      wb_access(1'b0, ADDR_W'(16 + 4 * a), 32'h0, q);
      check(q === 32'hA000_0000 + a, $sformatf("argument %0d readback", a + 1));
    end
    wb_access(1'b0, 5'd8, 32'h0, q);  check(q === 32'h1111_0000, "RESULT1 at 0x08");
    wb_access(1'b0, 5'd12, 32'h0, q); check(q === 32'h2222_0000, "RESULT2 at 0x0C");
    wb_access(1'b1, 5'd12, 32'h0, q);
    check(ext_in[0] === 32'hA000_0000, "write to RESULT2 does not reach ARG1");
    wb_access(1'b0, 5'd28, 32'h0, q); check(q === 32'h0, "0x1C unused");
    check(nisc_reset === 1'b1 && int_o === 1'b0, "core stopped, no interrupt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
