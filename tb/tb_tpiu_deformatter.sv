// tb_tpiu_deformatter: self-checking test of tpiu_deformatter.
// Random bytes of five source IDs, in runs of random length, are packed into
// frames by the formatter model and sent on the 8-bit port back to back, with
// sync packets at the start and between some frames and garbage before the
// first sync. The scoreboard checks that every non-null byte comes out once,
// in order, with its ID, and that a frame's bytes leave within 16 clocks of
// its last byte.
module tb_tpiu_deformatter;
  import trace_port_pkg::*;
  logic clk = 0, rst_n = 0, port_valid = 0, out_valid, synced;
  logic [7:0] port_data = 0, out_data;
  logic [6:0] out_id;
  int checks = 0, failures = 0, n_out = 0, last_frame_cyc = 0, cyc = 0;
  tbyte_t exp_q[$];
  tpiu_formatter fmt;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  tpiu_deformatter dut (.clk, .rst_n, .port_valid, .port_data, .out_valid, .out_id, .out_data, .synced);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid && out_id != 7'h00) begin
      n_out++;
      checks += 2;
      if (exp_q.size() == 0 || out_id !== exp_q[0].id || out_data !== exp_q[0].data) begin
        failures++;
        $display("FAIL out id=%h data=%h exp id=%h data=%h", out_id, out_data, exp_q[0].id, exp_q[0].data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      if (cyc - last_frame_cyc > 16) begin failures++; $display("FAIL late byte"); end
    end
  end

  task automatic port(input logic [7:0] b);
    @(negedge clk); port_valid = 1; port_data = b;
  endtask
  task automatic sync();
    port(8'hFF); port(8'hFF); port(8'hFF); port(8'h7F);
  endtask

  initial begin
    logic [7:0] f[16];
    logic [6:0] ids[5] = '{7'h01, 7'h02, 7'h10, 7'h3A, 7'h7C};
    fmt = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // garbage before the first sync is dropped
    port(8'h12); port(8'h00); port(8'hFF); port(8'h34);
    sync();
    for (int run = 0; run < 600; run++) begin
      logic [6:0] id;
      int len;
      id  = ids[$urandom_range(0, 4)];
      len = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(1, 12);
      for (int i = 0; i < len; i++) begin
        logic [7:0] d;
        d = 8'($urandom);
        fmt.push(id, d);
        exp_q.push_back('{id: id, data: d});
      end
      while (fmt.pending() >= 15 || (run == 599 && fmt.pending() > 0)) begin
        fmt.frame(f);
        for (int i = 0; i < 16; i++) port(f[i]);
        last_frame_cyc = cyc + 1;
        if ($urandom_range(0, 9) == 0) sync();
        if ($urandom_range(0, 4) == 0) begin @(negedge clk); port_valid = 0; end
      end
    end
    @(negedge clk); port_valid = 0;
    repeat (20) @(negedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bytes missing", exp_q.size()); end
    if (!synced) begin failures++; $display("FAIL never synced"); end
    if (fmt.n_delayed == 0 || fmt.n_immediate == 0) begin failures++; $display("FAIL ID change forms not both used"); end
    $display("frames %0d, bytes %0d, immediate ID changes %0d, delayed %0d",
             fmt.n_frames, n_out, fmt.n_immediate, fmt.n_delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
