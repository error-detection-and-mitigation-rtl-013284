// tb_pdtc_regs: self-checking test of pdtc_regs.
// Writes and reads back every configuration register through APB, checks the
// configuration outputs, the read-only registers, pslverr on unmapped
// addresses, sticky status bits set by event pulses, write-1-to-clear, the
// priority of an event over a clear in the same cycle and the event counter.
module tb_pdtc_regs;
  import pdtc_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  core_cfg_t cfg;
  logic [N-1:0] range_en;
  logic [N-1:0][31:0] range_lo, range_hi;
  logic [N_EVENTS-1:0] event_pulse = 0, status;
  logic [31:0] last_pc = 32'h1234_5678, wd_count = 32'd77;
  logic [N-1:0] last_oor = 8'hA5;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pdtc_regs #(.N_RANGES(N)) dut (.clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .pready, .pslverr, .cfg, .range_en, .range_lo, .range_hi, .event_pulse, .last_pc, .wd_count,
    .last_oor, .status);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb_write(input logic [7:0] a, input logic [31:0] d, input logic exp_err = 0);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1; checks++;
    if (pready !== 1 || pslverr !== exp_err) begin failures++; $display("FAIL write %h pslverr=%b", a, pslverr); end
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d, input logic exp_err = 0);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    #1; d = prdata; checks++;
    if (pready !== 1 || pslverr !== exp_err) begin failures++; $display("FAIL read %h pslverr=%b", a, pslverr); end
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    logic [N-1:0][31:0] lo, hi;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_read(REG_CTRL, d);       expect_eq("ctrl reset", d, 0);
    apb_write(REG_CTRL, 32'h5);  apb_read(REG_CTRL, d); expect_eq("ctrl", d, 5);
    expect_eq("cfg bits", {cfg.data_en, cfg.wd_en, cfg.prog_en}, 3'b101);
    apb_write(REG_RANGE_EN, 32'h3C);    expect_eq("range_en", range_en, 8'h3C);
    apb_write(REG_WD_LOOP_PC, 32'h0010_0100); expect_eq("loop pc", cfg.wd_loop_pc, 32'h0010_0100);
    apb_write(REG_WD_TIMEOUT, 32'd5000);      expect_eq("timeout", cfg.wd_timeout, 5000);
    for (int i = 0; i < N; i++) begin
      lo[i] = $urandom; hi[i] = $urandom;
      apb_write(REG_RANGE_BASE + 8'(8 * i), lo[i]);
      apb_write(REG_RANGE_BASE + 8'(8 * i + 4), hi[i]);
    end
    for (int i = 0; i < N; i++) begin
      expect_eq("range_lo out", range_lo[i], lo[i]);
      expect_eq("range_hi out", range_hi[i], hi[i]);
      apb_read(REG_RANGE_BASE + 8'(8 * i), d);     expect_eq("range_lo rd", d, lo[i]);
      apb_read(REG_RANGE_BASE + 8'(8 * i + 4), d); expect_eq("range_hi rd", d, hi[i]);
    end
    apb_read(REG_WD_LOOP_PC, d); expect_eq("loop pc rd", d, 32'h0010_0100);
    apb_read(REG_WD_TIMEOUT, d); expect_eq("timeout rd", d, 5000);
    apb_read(REG_RANGE_EN, d);   expect_eq("range_en rd", d, 32'h3C);
    apb_read(REG_LAST_PC, d);    expect_eq("last pc", d, 32'h1234_5678);
    apb_read(REG_WD_COUNT, d);   expect_eq("wd count", d, 77);
    apb_read(REG_LAST_OOR, d);   expect_eq("last oor", d, 32'hA5);
    apb_read(8'h40, d, 1);
    apb_write(8'hC0, 32'h1, 1);
    apb_read(8'h81, d, 1);
    // events
    @(negedge clk); event_pulse = 4'b0101;
    @(negedge clk); event_pulse = 4'b0010;
    @(negedge clk); event_pulse = 4'b0000;
    expect_eq("status set", status, 4'b0111);
    apb_read(REG_STATUS, d);    expect_eq("status rd", d, 7);
    apb_read(REG_EVENT_CNT, d); expect_eq("event cnt", d, 3);
    apb_write(REG_STATUS, 32'h1);
    expect_eq("status w1c", status, 4'b0110);
    // event in the same cycle as the clearing write wins
    @(negedge clk); psel = 1; pwrite = 1; paddr = REG_STATUS; pwdata = 32'hF;
    @(negedge clk); penable = 1; event_pulse = 4'b1000;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0; event_pulse = 0;
    expect_eq("event beats clear", status, 4'b1000);
    apb_read(REG_EVENT_CNT, d); expect_eq("event cnt 2", d, 4);
    // reset clears everything
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    expect_eq("reset status", status, 0);
    expect_eq("reset range_en", range_en, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
