// range_checker: flags execution outside the allowed code regions.
//
// The checker holds N_RANGES address ranges, each with an enable bit and
// inclusive low and high bounds, set through the configuration registers. The
// enabled ranges are the valid code regions. For every traced PC each range
// answers "out of range #i?"; when the PC lies outside every enabled range,
// execution has reached a forbidden or unexpected region and range_err pulses.
// Eight ranges and the per-range comparison follow the checker's block diagram;
// inclusive bounds and "no range enabled means nothing is checked" are this
// design's choices.
//
// Timing: out_of_range is combinational on pc; range_err is registered and
// pulses one clock after pc_valid.
module range_checker #(
  parameter int unsigned N_RANGES = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enable,
  input  logic [N_RANGES-1:0]        range_en,
  input  logic [N_RANGES-1:0][31:0]  range_lo,
  input  logic [N_RANGES-1:0][31:0]  range_hi,
  input  logic                       pc_valid,
  input  logic [31:0]                pc,
  output logic [N_RANGES-1:0]        out_of_range,
  output logic                       range_err
);

  always_comb begin
    for (int i = 0; i < N_RANGES; i++)
      out_of_range[i] = (pc < range_lo[i]) || (pc > range_hi[i]);
  end

  // the PC is legal when at least one enabled range contains it
  logic in_some_range;
  assign in_some_range = |(range_en & ~out_of_range);

  always_ff @(posedge clk) begin
    if (!rst_n) range_err <= 1'b0;
    else        range_err <= enable && pc_valid && (|range_en) && !in_some_range;
  end

endmodule
