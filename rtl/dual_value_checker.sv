// dual_value_checker: compares one exported value with a golden value.
//
// Used for the control lane of the hardened data: the control data follow a
// sequence of operations fixed at compile time, so their final value is known
// in advance (the golden value). When check is high, value is compared with
// golden and err pulses on a mismatch.
//
// Timing: err is registered, one clock after check.
module dual_value_checker #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         check,
  input  logic [W-1:0] value,
  input  logic [W-1:0] golden,
  output logic         err
);

  always_ff @(posedge clk) begin
    if (!rst_n) err <= 1'b0;
    else        err <= check && (value != golden);
  end

endmodule
