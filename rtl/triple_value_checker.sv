// triple_value_checker: checks three copies of a value for equality.
//
// Used for the three redundant data lanes of the hardened data (the data and
// its two copies). When check is high the copies are compared pairwise,
// D1 != D2, D1 != D3 and D2 != D3; neq reports which pairs differ and err
// pulses if any does. With a single upset lane two of the three bits are set,
// which also names the faulty copy.
//
// Timing: neq and err are registered, one clock after check; neq holds its
// value until the next check.
module triple_value_checker #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         check,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2,
  input  logic [W-1:0] d3,
  output logic [2:0]   neq,   // {D2!=D3, D1!=D3, D1!=D2}
  output logic         err
);

  logic [2:0] cmp;
  assign cmp = {d2 != d3, d1 != d3, d1 != d2};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      neq <= '0;
      err <= 1'b0;
    end else begin
      err <= check && (|cmp);
      if (check) neq <= cmp;
    end
  end

endmodule
