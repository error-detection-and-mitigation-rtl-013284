// tb_range_checker: self-checking test of range_checker with 8 ranges.
// Programs random disjoint and overlapping ranges with random enables, feeds
// PCs inside, on the bounds of and outside them, and checks the per-range
// out_of_range flags and the registered range_err pulse against a model.
module tb_range_checker;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, enable = 0, pc_valid = 0, range_err;
  logic [N-1:0] range_en = 0, out_of_range;
  logic [N-1:0][31:0] range_lo = '0, range_hi = '0;
  logic [31:0] pc = 0;
  int checks = 0, failures = 0;
  int n_out = 0, n_in = 0;
  always #5 clk = ~clk;

  range_checker #(.N_RANGES(N)) dut (.clk, .rst_n, .enable, .range_en, .range_lo, .range_hi,
                                     .pc_valid, .pc, .out_of_range, .range_err);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic model_err(logic en, logic v, logic [31:0] p);
    logic hit_any = 0;
    for (int i = 0; i < N; i++)
      if (range_en[i] && p >= range_lo[i] && p <= range_hi[i]) hit_any = 1;
    return en && v && (range_en != 0) && !hit_any;
  endfunction

  initial begin
    logic exp;
    logic [N-1:0] exp_oor;
    int r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 20; cfg++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        range_lo[i] = $urandom_range(0, 32'h0010_0000) & ~32'h3;
        range_hi[i] = range_lo[i] + $urandom_range(0, 32'h0000_4000);
      end
      range_en = (cfg == 3) ? '0 : N'($urandom);
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        enable   = (n % 17 != 5);
        pc_valid = (n % 9 != 4);
        r = $urandom_range(0, N - 1);
        case ($urandom_range(0, 4))
          0: pc = range_lo[r];
          1: pc = range_hi[r];
          2: pc = range_hi[r] + 1;
          3: pc = range_lo[r] - 1;
          default: pc = $urandom_range(0, 32'h0011_0000);
        endcase
        #1;
        for (int i = 0; i < N; i++) exp_oor[i] = (pc < range_lo[i]) || (pc > range_hi[i]);
        checks++;
        if (out_of_range !== exp_oor) begin failures++; $display("FAIL oor pc=%h", pc); end
        exp = model_err(enable, pc_valid, pc);
        if (exp) n_out++; else if (pc_valid && enable) n_in++;
        @(posedge clk); #1;
        checks++;
        if (range_err !== exp) begin
          failures++;
          $display("FAIL cfg=%0d n=%0d pc=%h en=%b err=%b exp=%b", cfg, n, pc, range_en, range_err, exp);
        end
      end
    end
    checks++;
    if (n_out < 10 || n_in < 10) begin failures++; $display("FAIL coverage out=%0d in=%0d", n_out, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
