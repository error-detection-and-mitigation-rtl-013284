// tb_triple_value_checker: self-checking test of triple_value_checker.
// Applies equal triples and triples with one or two corrupted copies, and
// checks err and the pairwise neq flags one clock later against a model, and
// that neq holds when check is low.
module tb_triple_value_checker;
  logic clk = 0, rst_n = 0, check = 0, err;
  logic [31:0] d1 = 0, d2 = 0, d3 = 0;
  logic [2:0] neq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  triple_value_checker #(.W(32)) dut (.clk, .rst_n, .check, .d1, .d2, .d3, .neq, .err);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_neq, held;
    logic exp_err;
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    held = 3'b000;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      check = ($urandom_range(0, 3) != 0);
      d1 = $urandom; d2 = d1; d3 = d1;
      bad = $urandom_range(0, 4);   // 0/4: clean, 1..3: that copy upset
      if (bad == 1) d1 ^= 32'h1 << $urandom_range(0, 31);
      if (bad == 2) d2 ^= 32'h1 << $urandom_range(0, 31);
      if (bad == 3) d3 ^= 32'h1 << $urandom_range(0, 31);
      if (n % 50 == 7) d3 = ~d2;   // two copies differ from each other
      exp_neq = {d2 != d3, d1 != d3, d1 != d2};
      exp_err = check && (exp_neq != 0);
      if (check) held = exp_neq;
      @(posedge clk); #1;
      checks += 2;
      if (err !== exp_err) begin failures++; $display("FAIL err n=%0d", n); end
      if (neq !== held) begin failures++; $display("FAIL neq n=%0d got %b exp %b", n, neq, held); end
    end
    // a single upset copy is named by the two flags that involve it
    @(negedge clk); check = 1; d1 = 5; d2 = 5; d3 = 7;
    @(posedge clk); #1; checks++;
    if (neq !== 3'b110) begin failures++; $display("FAIL d3 upset neq=%b", neq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
