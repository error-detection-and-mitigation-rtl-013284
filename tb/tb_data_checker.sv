// tb_data_checker: self-checking test of data_checker.
// Plays the role of a program exporting hardened results through stimulus
// ports: a golden control value, then per result its control lane and its
// three data lanes, some of them corrupted. Checks that the control check and
// the triple check fire exactly for the corrupted results, two clocks after
// the triggering write, and that writes with the checker disabled or to
// unrelated ports do nothing.
module tb_data_checker;
  logic clk = 0, rst_n = 0, enable = 0, itm_valid = 0;
  logic [4:0] itm_port = 0;
  logic [31:0] itm_data = 0;
  logic ctrl_err, triple_err, check_done;
  logic [2:0] triple_neq;
  int checks = 0, failures = 0, n_ctrl = 0, n_triple = 0, exp_ctrl = 0, exp_triple = 0;
  always #5 clk = ~clk;

  data_checker dut (.clk, .rst_n, .enable, .itm_valid, .itm_port, .itm_data,
                    .ctrl_err, .triple_err, .triple_neq, .check_done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (ctrl_err) n_ctrl++;
    if (triple_err) n_triple++;
  end

  task automatic wr(input logic [4:0] p, input logic [31:0] d);
    @(negedge clk); itm_valid = 1; itm_port = p; itm_data = d;
    @(negedge clk); itm_valid = 0;
  endtask

  initial begin
    logic [31:0] gold, v, c1, c2, c3;
    int kind, c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    gold = 32'h0CA5_432B;
    wr(0, gold);
    for (int n = 0; n < 200; n++) begin
      v = $urandom; c1 = v; c2 = v; c3 = v;
      kind = $urandom_range(0, 5);
      if (kind == 1) c1 ^= 32'h0000_0100;
      if (kind == 2) c2 ^= 32'h8000_0000;
      if (kind == 3) c3 ^= 32'h0000_0001;
      // control lane
      c0 = n_ctrl;
      wr(1, (kind == 4) ? gold + 1 : gold);
      if (kind == 4) exp_ctrl++;
      @(posedge clk); #1;   // two clocks after the write cycle
      checks++;
      if (n_ctrl != c0 + (kind == 4)) begin failures++; $display("FAIL ctrl n=%0d", n); end
      // data lanes, in varying order
      c0 = n_triple;
      if (n % 2 == 0) begin wr(2, c1); wr(3, c2); wr(5, 32'hDEAD); wr(4, c3); end
      else            begin wr(4, c3); wr(2, c1); wr(3, c2); end
      if (kind >= 1 && kind <= 3) exp_triple++;
      @(posedge clk); #1;
      checks++;
      if (n_triple != c0 + (kind >= 1 && kind <= 3)) begin failures++; $display("FAIL triple n=%0d kind=%0d", n, kind); end
      if (kind >= 1 && kind <= 3) begin
        checks++;
        if (triple_neq != (kind == 1 ? 3'b011 : kind == 2 ? 3'b101 : 3'b110)) begin
          failures++; $display("FAIL neq=%b kind=%0d", triple_neq, kind);
        end
      end
    end
    // fewer than three fresh copies: no check
    c0 = n_triple;
    wr(2, 1); wr(3, 2);
    repeat (4) @(negedge clk);
    checks++;
    if (n_triple != c0) begin failures++; $display("FAIL check on two copies"); end
    wr(4, 3);
    repeat (3) @(negedge clk);
    checks++;
    if (n_triple != c0 + 1) begin failures++; $display("FAIL no check on third copy"); end
    // disabled
    enable = 0; c0 = n_ctrl;
    wr(1, ~gold);
    repeat (4) @(negedge clk);
    checks++;
    if (n_ctrl != c0) begin failures++; $display("FAIL check while disabled"); end
    checks++;
    if (n_ctrl != exp_ctrl || n_triple != exp_triple + 1) begin failures++; $display("FAIL totals"); end
    $display("control errors %0d, triple errors %0d", exp_ctrl, exp_triple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
