// pdtc_regs: configuration and status registers of the trace checker.
//
// The processor configures the checker through these registers before the
// application starts: the valid code regions (N_RANGES low/high pairs and an
// enable bit each), the watchdog's loop start PC and timeout, and the enables
// of the three checks. The registers also collect the error events: each event
// pulse sets a sticky status bit that stays set until software writes a 1 to
// it, and counts in an event counter. That configurable ranges and watchdog
// registers exist follows the method; the bus, the map (see pdtc_pkg) and the
// write-1-to-clear status are this design's choices.
//
// Interface: AMBA APB3 slave, 8-bit byte address, 32-bit data, no wait states
// (pready is always 1); an access to an unmapped address completes with
// pslverr. Timing: writes take effect at the clock edge that ends the access
// phase; prdata is valid during the access phase. An event pulse in the same
// cycle as a clearing write wins over the clear.
module pdtc_regs
  import pdtc_pkg::*;
#(
  parameter int unsigned N_RANGES = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // APB3
  input  logic                       psel,
  input  logic                       penable,
  input  logic                       pwrite,
  input  logic [7:0]                 paddr,
  input  logic [31:0]                pwdata,
  output logic [31:0]                prdata,
  output logic                       pready,
  output logic                       pslverr,
  // to the checkers
  output core_cfg_t                  cfg,
  output logic [N_RANGES-1:0]        range_en,
  output logic [N_RANGES-1:0][31:0]  range_lo,
  output logic [N_RANGES-1:0][31:0]  range_hi,
  // from the checkers
  input  logic [N_EVENTS-1:0]        event_pulse,
  input  logic [31:0]                last_pc,
  input  logic [31:0]                wd_count,
  input  logic [N_RANGES-1:0]        last_oor,
  output logic [N_EVENTS-1:0]        status
);

  logic [31:0] event_cnt;
  logic        wr, rd;
  logic        hit_range;     // paddr addresses a range bound
  logic [7:0]  roff;          // offset inside the range block
  logic        map_ok;        // paddr is mapped

  assign wr = psel && penable && pwrite;
  assign rd = psel && penable && !pwrite;
  assign pready = 1'b1;
  assign roff = paddr - REG_RANGE_BASE;
  assign hit_range = (paddr >= REG_RANGE_BASE) && (32'(roff) < 32'(8 * N_RANGES)) &&
                     (paddr[1:0] == 2'b00);

  always_comb begin
    unique case (paddr)
      REG_CTRL, REG_STATUS, REG_RANGE_EN, REG_WD_LOOP_PC, REG_WD_TIMEOUT,
      REG_LAST_PC, REG_EVENT_CNT, REG_WD_COUNT, REG_LAST_OOR: map_ok = 1'b1;
      default: map_ok = hit_range;
    endcase
  end
  assign pslverr = psel && penable && !map_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg       <= '0;
      range_en  <= '0;
      range_lo  <= '0;
      range_hi  <= '0;
      status    <= '0;
      event_cnt <= '0;
    end else begin
      if (wr) begin
        unique case (paddr)
          REG_CTRL:       {cfg.data_en, cfg.wd_en, cfg.prog_en} <= pwdata[2:0];
          REG_STATUS:     status <= status & ~pwdata[N_EVENTS-1:0];
          REG_RANGE_EN:   range_en <= pwdata[N_RANGES-1:0];
          REG_WD_LOOP_PC: cfg.wd_loop_pc <= pwdata;
          REG_WD_TIMEOUT: cfg.wd_timeout <= pwdata;
          default: begin
            if (hit_range) begin
              if (roff[2]) range_hi[roff[7:3]] <= pwdata;
              else         range_lo[roff[7:3]] <= pwdata;
            end
          end
        endcase
      end
      // events set their flags after any clear of this cycle
      for (int i = 0; i < N_EVENTS; i++)
        if (event_pulse[i]) status[i] <= 1'b1;
      event_cnt <= event_cnt + 32'($countones(event_pulse));
    end
  end

  always_comb begin
    prdata = '0;
    if (rd) begin
      unique case (paddr)
        REG_CTRL:       prdata = {29'd0, cfg.data_en, cfg.wd_en, cfg.prog_en};
        REG_STATUS:     prdata = 32'(status);
        REG_RANGE_EN:   prdata = 32'(range_en);
        REG_WD_LOOP_PC: prdata = cfg.wd_loop_pc;
        REG_WD_TIMEOUT: prdata = cfg.wd_timeout;
        REG_LAST_PC:    prdata = last_pc;
        REG_EVENT_CNT:  prdata = event_cnt;
        REG_WD_COUNT:   prdata = wd_count;
        REG_LAST_OOR:   prdata = 32'(last_oor);
        default:        prdata = hit_range ? (roff[2] ? range_hi[roff[7:3]] : range_lo[roff[7:3]]) : '0;
      endcase
    end
  end

  // APB rule: an access phase is always preceded by a setup phase with the
  // same select; penable never rises without psel.
  property p_enable_needs_sel;
    @(posedge clk) disable iff (!rst_n) penable |-> psel;
  endproperty
  a_enable_needs_sel: assert property (p_enable_needs_sel)
    else $error("APB: penable without psel");

endmodule
