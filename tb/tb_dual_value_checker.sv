// tb_dual_value_checker: self-checking test of dual_value_checker.
// Drives random value/golden pairs (half of them equal), with and without
// check, and compares err one clock later with the expected mismatch flag.
module tb_dual_value_checker;
  logic clk = 0, rst_n = 0, check = 0, err;
  logic [31:0] value = 0, golden = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dual_value_checker #(.W(32)) dut (.clk, .rst_n, .check, .value, .golden, .err);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      check  = ($urandom_range(0, 3) != 0);
      golden = $urandom;
      value  = ($urandom_range(0, 1) != 0) ? golden : golden ^ (32'h1 << $urandom_range(0, 31));
      exp    = check && (value != golden);
      @(posedge clk); #1;
      checks++;
      if (err !== exp) begin
        failures++;
        $display("FAIL n=%0d check=%b value=%h golden=%h err=%b", n, check, value, golden, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
