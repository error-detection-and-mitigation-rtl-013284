// tb_loop_watchdog: self-checking test of loop_watchdog.
// Models a main loop whose start PC is traced at varying intervals. Intervals
// shorter than the timeout must never fire; a late or missing loop PC must
// fire exactly once, on the cycle the count reaches the timeout, then stay
// quiet until the loop PC returns. Also checks disable and timeout = 0.
module tb_loop_watchdog;
  logic clk = 0, rst_n = 0, enable = 0, pc_valid = 0, wd_err;
  logic [31:0] loop_pc = 32'h0010_0040, timeout = 0, pc = 0, count;
  int checks = 0, failures = 0, fires = 0;
  int model_cnt, model_exp;
  always #5 clk = ~clk;

  loop_watchdog #(.CNT_W(32)) dut (.clk, .rst_n, .enable, .loop_pc, .timeout, .pc_valid, .pc,
                                   .wd_err, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, evaluated with the same inputs the DUT samples
  always @(posedge clk) begin
    logic exp_err;
    exp_err = 0;
    if (!rst_n || !enable) begin
      model_cnt = 0; model_exp = 0;
    end else if (pc_valid && pc == loop_pc) begin
      model_cnt = 0; model_exp = 0;
    end else if (!model_exp && timeout != 0) begin
      model_cnt++;
      if (model_cnt >= timeout) begin exp_err = 1; model_exp = 1; model_cnt = timeout; end
    end
    #1;
    if (rst_n) begin
      checks++;
      if (wd_err !== exp_err || count !== model_cnt) begin
        failures++;
        $display("FAIL t=%0t wd_err=%b exp=%b count=%0d exp=%0d", $time, wd_err, exp_err, count, model_cnt);
      end
      if (wd_err) fires++;
    end
  end

  task automatic trace_pc(input logic [31:0] a);
    @(negedge clk); pc_valid = 1; pc = a;
    @(negedge clk); pc_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    timeout = 50;
    @(negedge clk); enable = 1;
    // loop comes round in time: other PCs traced, loop PC every 30..45 cycles
    for (int it = 0; it < 20; it++) begin
      repeat ($urandom_range(28, 43)) @(negedge clk);
      trace_pc(loop_pc + 4);
      trace_pc(loop_pc);
    end
    if (fires != 0) begin failures++; $display("FAIL fired while loop on time"); end
    checks++;
    // loop stops: must fire once, 50 cycles after the last loop PC
    t0 = fires;
    repeat (200) @(negedge clk);
    checks++;
    if (fires - t0 != 1) begin failures++; $display("FAIL expected one expiry, got %0d", fires - t0); end
    // loop PC again re-arms it
    trace_pc(loop_pc);
    repeat (60) @(negedge clk);
    checks++;
    if (fires - t0 != 2) begin failures++; $display("FAIL expected re-armed expiry"); end
    // disabled: never fires
    enable = 0; t0 = fires;
    repeat (120) @(negedge clk);
    // timeout 0: never fires
    enable = 1; timeout = 0;
    repeat (120) @(negedge clk);
    checks++;
    if (fires != t0) begin failures++; $display("FAIL fired while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
