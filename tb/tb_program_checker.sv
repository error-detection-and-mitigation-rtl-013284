// tb_program_checker: self-checking test of program_checker.
// Configures three code regions and the loop watchdog, then runs a program
// model that loops through legal PCs, jumps out of the regions and finally
// stops reaching the loop start. Checks range_err one clock after each PC, the
// per-range flags of the last PC, the watchdog count and the single expiry.
module tb_program_checker;
  import pdtc_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, pc_valid = 0, range_err, wd_err;
  core_cfg_t cfg;
  logic [N-1:0] range_en, last_oor;
  logic [N-1:0][31:0] range_lo, range_hi;
  logic [31:0] pc = 0, wd_count;
  int checks = 0, failures = 0, n_range = 0, n_wd = 0, since_loop = 0;
  always #5 clk = ~clk;

  program_checker #(.N_RANGES(N)) dut (.clk, .rst_n, .cfg, .range_en, .range_lo, .range_hi,
                                       .pc_valid, .pc, .range_err, .wd_err, .last_oor, .wd_count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (range_err) n_range++;
    if (wd_err) n_wd++;
  end

  task automatic trace_pc(input logic [31:0] a, input logic exp_err);
    logic [N-1:0] exp_oor;
    @(negedge clk); pc_valid = 1; pc = a;
    for (int i = 0; i < N; i++) exp_oor[i] = (a < range_lo[i]) || (a > range_hi[i]);
    @(negedge clk); pc_valid = 0;
    checks += 2;
    if (range_err !== exp_err) begin failures++; $display("FAIL pc=%h range_err=%b exp=%b", a, range_err, exp_err); end
    if (last_oor !== exp_oor) begin failures++; $display("FAIL pc=%h last_oor=%b exp=%b", a, last_oor, exp_oor); end
  endtask

  initial begin
    cfg = '0; range_en = '0; range_lo = '0; range_hi = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    range_lo[0] = 32'h0010_0000; range_hi[0] = 32'h0010_0FFC;   // main code
    range_lo[1] = 32'h0010_2000; range_hi[1] = 32'h0010_20FC;   // driver
    range_lo[5] = 32'h0000_0000; range_hi[5] = 32'h0000_001C;   // vectors
    range_lo[6] = 32'h0020_0000; range_hi[6] = 32'h0020_FFFC;   // disabled
    range_en = 8'b0010_0011;
    cfg.prog_en = 1; cfg.wd_en = 1; cfg.wd_loop_pc = 32'h0010_0100; cfg.wd_timeout = 100;
    for (int it = 0; it < 10; it++) begin
      trace_pc(32'h0010_0100, 0);
      since_loop = 0;
      trace_pc(32'h0010_0200 + 4 * it, 0);
      trace_pc(32'h0010_2004, 0);
      trace_pc(32'h0000_0008, 0);
      if (it == 3) trace_pc(32'h0010_1000, 1);   // just past region 0
      if (it == 5) trace_pc(32'h0020_0010, 1);   // disabled region
      if (it == 7) trace_pc(32'h8000_0000, 1);
      repeat (20) @(negedge clk);
      checks++;
      if (wd_count < 20 || wd_count > 40) begin failures++; $display("FAIL wd_count=%0d", wd_count); end
    end
    checks++;
    if (n_range != 3 || n_wd != 0) begin failures++; $display("FAIL counts range=%0d wd=%0d", n_range, n_wd); end
    // range checking disabled: no error
    cfg.prog_en = 0;
    trace_pc(32'h8000_0000, 0);
    // loop stops coming round: one expiry
    repeat (150) @(negedge clk);
    checks++;
    if (n_wd != 1 || wd_count != 100) begin failures++; $display("FAIL wd n=%0d count=%0d", n_wd, wd_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
