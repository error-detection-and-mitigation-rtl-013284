// loop_watchdog: detects a main loop that stops coming round.
//
// A program whose main loop runs forever has a known maximum time per
// iteration. The watchdog is given the PC of the loop's first instruction and
// that maximum time. It counts clock cycles; every traced PC equal to the loop
// PC clears the count. If the count reaches the timeout first, wd_err pulses
// once and the counter stops until the loop PC is seen again, so each missed
// loop gives one error. Detection latency is therefore at most one loop time.
// The loop-PC/timeout rule follows the method; counting in clock cycles,
// starting on enable and stopping after an expiry are this design's choices.
//
// Timing: wd_err is registered. With timeout = T and no loop PC seen, it
// pulses on the clock edge at which the count reaches T (T cycles after
// enable or after the last loop PC). timeout = 0 disables expiry.
module loop_watchdog #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [31:0]      loop_pc,
  input  logic [CNT_W-1:0] timeout,
  input  logic             pc_valid,
  input  logic [31:0]      pc,
  output logic             wd_err,
  output logic [CNT_W-1:0] count
);

  logic expired;   // counter stopped after an expiry
  logic hit;
  assign hit = pc_valid && (pc == loop_pc);

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      count   <= '0;
      expired <= 1'b0;
      wd_err  <= 1'b0;
    end else begin
      wd_err <= 1'b0;
      if (hit) begin
        count   <= '0;
        expired <= 1'b0;
      end else if (!expired && timeout != '0) begin
        if (count + 1'b1 >= timeout) begin
          wd_err  <= 1'b1;
          expired <= 1'b1;
          count   <= timeout;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
