// pdtc: Program & Data Trace Checker, the top of the design.
//
// An on-line error detector that sits beside a processor and watches its
// debug trace. The trace port deformatter unpacks the frames of the
// processor's trace port into bytes tagged with their source, and the trace
// decoder turns them into executed
// PC addresses (program trace) and data values the software exported
// (instrumentation trace). The program checker compares each PC with up to
// eight allowed code regions and runs a loop watchdog that expects the start
// of the main loop within a configured number of cycles. The data checker
// compares exported control data with a golden value and exported triplicated
// data (the three redundant SIMD lanes of a hardened result) with each other.
// Every detected error raises a sticky flag that software clears through the
// configuration registers. The checks run in parallel with the processor and
// add no delay to it.
//
// The block structure (trace decoder, program checker with x8 range checks and
// loop watchdog, data checker with dual and triple value checks) follows the
// checker's architecture. The 8-bit trace port, the APB3 register
// interface, the register map and the stimulus-port assignment are this
// design's choices.
//
// Interface: 8-bit trace port sampled on the checker clock, at most one byte
// per clock; APB3 slave. Timing: a trace frame is unpacked during the 15
// clocks after its last port byte; a PC leaves the decoder one clock after
// the last byte of its packet and a range error pulses one clock after that,
// visible on err_range one clock later; a data error pulses two clocks after
// the decoder output of the completing write, plus one for the flag.
module pdtc
  import pdtc_pkg::*;
#(
  parameter int unsigned N_RANGES         = N_RANGES_DEF,
  parameter logic [6:0]  PTM_ID           = 7'd1,
  parameter logic [6:0]  ITM_ID           = 7'd2,
  parameter logic [4:0]  DUAL_REF_PORT    = 5'd0,
  parameter logic [4:0]  DUAL_CHK_PORT    = 5'd1,
  parameter logic [4:0]  TRIPLE_BASE_PORT = 5'd2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // trace port
  input  logic                 trace_valid,
  input  logic [7:0]           trace_data,
  output logic                 trace_synced,
  // configuration
  input  logic                 psel,
  input  logic                 penable,
  input  logic                 pwrite,
  input  logic [7:0]           paddr,
  input  logic [31:0]          pwdata,
  output logic [31:0]          prdata,
  output logic                 pready,
  output logic                 pslverr,
  // errors
  output logic                 err_range,
  output logic                 err_watchdog,
  output logic                 err_control,
  output logic                 err_triple,
  output logic                 error,
  output logic [N_EVENTS-1:0]  event_pulse,
  output logic [2:0]           triple_neq,
  output logic                 check_done
);

  logic        atb_valid;
  logic [6:0]  atb_id;
  logic [7:0]  atb_data;
  logic        pc_valid;
  logic [31:0] pc, last_pc;
  logic        itm_valid;
  logic [4:0]  itm_port;
  logic [31:0] itm_data;

  core_cfg_t                  cfg;
  logic [N_RANGES-1:0]        range_en, last_oor;
  logic [N_RANGES-1:0][31:0]  range_lo, range_hi;
  logic [31:0]                wd_count;
  logic [N_EVENTS-1:0]        status;
  logic                       range_err, wd_err, ctrl_err, triple_err;

  tpiu_deformatter u_deform (
    .clk, .rst_n,
    .port_valid (trace_valid),
    .port_data  (trace_data),
    .out_valid  (atb_valid),
    .out_id     (atb_id),
    .out_data   (atb_data),
    .synced     (trace_synced)
  );

  trace_decoder #(.PTM_ID(PTM_ID), .ITM_ID(ITM_ID)) u_dec (
    .clk, .rst_n,
    .atb_valid, .atb_id, .atb_data,
    .pc_valid, .pc,
    .itm_valid, .itm_port, .itm_data
  );

  program_checker #(.N_RANGES(N_RANGES)) u_prog (
    .clk, .rst_n,
    .cfg, .range_en, .range_lo, .range_hi,
    .pc_valid, .pc,
    .range_err, .wd_err,
    .last_oor, .wd_count
  );

  data_checker #(
    .DUAL_REF_PORT(DUAL_REF_PORT), .DUAL_CHK_PORT(DUAL_CHK_PORT),
    .TRIPLE_BASE_PORT(TRIPLE_BASE_PORT)
  ) u_data (
    .clk, .rst_n,
    .enable (cfg.data_en),
    .itm_valid, .itm_port, .itm_data,
    .ctrl_err, .triple_err, .triple_neq, .check_done
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        last_pc <= '0;
    else if (pc_valid) last_pc <= pc;
  end

  always_comb begin
    event_pulse              = '0;
    event_pulse[EV_RANGE]    = range_err;
    event_pulse[EV_WATCHDOG] = wd_err;
    event_pulse[EV_CONTROL]  = ctrl_err;
    event_pulse[EV_TRIPLE]   = triple_err;
  end

  pdtc_regs #(.N_RANGES(N_RANGES)) u_regs (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .cfg, .range_en, .range_lo, .range_hi,
    .event_pulse, .last_pc, .wd_count, .last_oor,
    .status
  );

  assign err_range    = status[EV_RANGE];
  assign err_watchdog = status[EV_WATCHDOG];
  assign err_control  = status[EV_CONTROL];
  assign err_triple   = status[EV_TRIPLE];
  assign error        = |status;

endmodule
