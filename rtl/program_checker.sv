// program_checker: checks the program flow seen in the trace.
//
// Every PC decoded from the program trace goes to two checks in parallel: the
// range checker (is the PC inside one of the enabled code regions?) and the
// loop watchdog (is the main loop's first instruction reached before its
// timeout?). Their configuration comes from the register block. The two checks
// and eight ranges follow the checker's block diagram. The configuration
// bundle is shared with the data checker, so its data_en bit is not used here.
//
// last_oor keeps the per-range results of the last PC and wd_count the
// watchdog count, both for reading through the registers.
//
// Timing: both error outputs are one-cycle registered pulses; range_err
// follows its pc_valid by one clock.
module program_checker
  import pdtc_pkg::*;
#(
  parameter int unsigned N_RANGES = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  core_cfg_t                  cfg,
  input  logic [N_RANGES-1:0]        range_en,
  input  logic [N_RANGES-1:0][31:0]  range_lo,
  input  logic [N_RANGES-1:0][31:0]  range_hi,
  input  logic                       pc_valid,
  input  logic [31:0]                pc,
  output logic                       range_err,
  output logic                       wd_err,
  output logic [N_RANGES-1:0]        last_oor,   // out-of-range flags of the last PC
  output logic [31:0]                wd_count    // watchdog cycles since the loop PC
);

  logic [N_RANGES-1:0] out_of_range;

  always_ff @(posedge clk) begin
    if (!rst_n)        last_oor <= '0;
    else if (pc_valid) last_oor <= out_of_range;
  end

  range_checker #(.N_RANGES(N_RANGES)) u_range (
    .clk, .rst_n,
    .enable   (cfg.prog_en),
    .range_en, .range_lo, .range_hi,
    .pc_valid, .pc,
    .out_of_range,
    .range_err
  );

  loop_watchdog #(.CNT_W(32)) u_wd (
    .clk, .rst_n,
    .enable   (cfg.wd_en),
    .loop_pc  (cfg.wd_loop_pc),
    .timeout  (cfg.wd_timeout),
    .pc_valid, .pc,
    .wd_err,
    .count    (wd_count)
  );

endmodule
