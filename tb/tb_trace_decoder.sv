// tb_trace_decoder: self-checking test of trace_decoder.
// An encoder in the testbench builds a program-trace stream (I-sync packets,
// branch packets compressed against the previous address, atoms, A-sync) and
// an instrumentation stream (1/2/4-byte stimulus writes, hardware-source
// packets, protocol packets with continuation bytes), plus bytes of a third
// source. The streams are interleaved at random with idle cycles. A scoreboard
// checks the decoded PCs and port writes, in order, against what was encoded,
// and that each leaves one clock after the last byte of its packet.
module tb_trace_decoder;
  localparam logic [6:0] PTM = 7'd1, ITM = 7'd2, OTHER = 7'd9;
  logic clk = 0, rst_n = 0, atb_valid = 0;
  logic [6:0] atb_id = 0;
  logic [7:0] atb_data = 0;
  logic pc_valid, itm_valid;
  logic [31:0] pc, itm_data;
  logic [4:0] itm_port;
  int checks = 0, failures = 0;
  int n_isync = 0, n_branch[1:5], n_itm_size[1:4];
  always #5 clk = ~clk;

  trace_decoder #(.PTM_ID(PTM), .ITM_ID(ITM)) dut (.clk, .rst_n, .atb_valid, .atb_id, .atb_data,
    .pc_valid, .pc, .itm_valid, .itm_port, .itm_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte streams; a flag marks the last byte of a packet that must produce output
  logic [7:0]  ptm_q[$], itm_q[$], oth_q[$];
  bit          ptm_last[$], itm_last[$];
  logic [31:0] exp_pc[$];
  logic [36:0] exp_itm[$];   // {port, data}
  int          pending_pc = 0, pending_itm = 0;   // outputs due next clock

  function automatic void enc_isync(logic [31:0] a);
    logic [7:0] b[6] = '{8'h08, a[7:0], a[15:8], a[23:16], a[31:24], 8'h00};
    foreach (b[i]) begin ptm_q.push_back(b[i]); ptm_last.push_back(i == 5); end
    exp_pc.push_back(a); n_isync++;
  endfunction

  function automatic void enc_branch(logic [31:0] a, logic [31:0] prev, int extra);
    int n;
    logic [7:0] b[5];
    if (a[31:29] != prev[31:29]) n = 5;
    else if (a[28:22] != prev[28:22]) n = 4;
    else if (a[21:15] != prev[21:15]) n = 3;
    else if (a[14:8] != prev[14:8]) n = 2;
    else n = 1;
    n = (n + extra > 5) ? 5 : n + extra;
    b[0] = {1'b0, a[7:2], 1'b1};
    b[1] = {1'b0, a[14:8]};
    b[2] = {1'b0, a[21:15]};
    b[3] = {1'b0, a[28:22]};
    b[4] = {5'b0, a[31:29]};
    for (int i = 0; i < n; i++) begin
      if (i < n - 1) b[i][7] = 1'b1;
      ptm_q.push_back(b[i]); ptm_last.push_back(i == n - 1);
    end
    exp_pc.push_back(a); n_branch[n]++;
  endfunction

  function automatic void enc_noise_ptm(int k);
    if (k == 0) begin   // atom
      ptm_q.push_back(8'h84); ptm_last.push_back(0);
    end else begin      // A-sync
      repeat (5) begin ptm_q.push_back(8'h00); ptm_last.push_back(0); end
      ptm_q.push_back(8'h80); ptm_last.push_back(0);
    end
  endfunction

  function automatic void enc_sw(logic [4:0] port, logic [31:0] d, int sz);
    int nb = (sz == 3) ? 4 : sz;
    logic [31:0] m = (nb == 4) ? d : (d & ((32'h1 << (8 * nb)) - 1));
    itm_q.push_back({port, 1'b0, 2'(sz)}); itm_last.push_back(0);
    for (int i = 0; i < nb; i++) begin itm_q.push_back(m[8*i +: 8]); itm_last.push_back(i == nb - 1); end
    exp_itm.push_back({port, m}); n_itm_size[nb]++;
  endfunction

  function automatic void enc_noise_itm(int k);
    if (k == 0) begin   // hardware source, 2 bytes, skipped
      itm_q.push_back(8'h0E); itm_q.push_back(8'h12); itm_q.push_back(8'h34);
      repeat (3) itm_last.push_back(0);
    end else begin      // protocol packet with continuation
      itm_q.push_back(8'hC0); itm_q.push_back(8'h85); itm_q.push_back(8'h03);
      repeat (3) itm_last.push_back(0);
    end
  endfunction

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    int due_pc, due_itm;
    due_pc = pending_pc; due_itm = pending_itm;
    #1;
    checks += 2;
    if (pc_valid !== (due_pc != 0)) begin failures++; $display("FAIL pc_valid=%b due=%0d t=%0t", pc_valid, due_pc, $time); end
    if (itm_valid !== (due_itm != 0)) begin failures++; $display("FAIL itm_valid=%b due=%0d t=%0t", itm_valid, due_itm, $time); end
    if (pc_valid) begin
      checks++;
      if (exp_pc.size() == 0 || pc !== exp_pc[0]) begin failures++; $display("FAIL pc=%h exp=%h", pc, exp_pc[0]); end
      if (exp_pc.size() != 0) void'(exp_pc.pop_front());
    end
    if (itm_valid) begin
      checks++;
      if (exp_itm.size() == 0 || {itm_port, itm_data} !== exp_itm[0]) begin
        failures++; $display("FAIL itm port=%0d data=%h exp=%h", itm_port, itm_data, exp_itm[0]);
      end
      if (exp_itm.size() != 0) void'(exp_itm.pop_front());
    end
  end

  initial begin
    logic [31:0] prev, a;
    int src;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // build streams
    prev = 32'h0010_0000;
    enc_isync(prev);
    for (int n = 0; n < 400; n++) begin
      case ($urandom_range(0, 9))
        0: a = {$urandom} & ~32'h3;                        // far jump
        1: a = prev ^ (32'h1 << $urandom_range(22, 28));
        2: a = prev ^ (32'h1 << $urandom_range(15, 21));
        3, 4: a = prev ^ (32'h1 << $urandom_range(8, 14));
        default: a = {prev[31:8], 6'($urandom), 2'b00};    // short jump
      endcase
      if (n % 50 == 25) begin enc_isync(a); end
      else enc_branch(a, prev, (n % 7 == 3) ? 1 : 0);
      prev = a;
      if (n % 5 == 0) enc_noise_ptm(n % 3 == 0);
    end
    for (int n = 0; n < 300; n++) begin
      enc_sw(5'($urandom_range(0, 31)), $urandom, $urandom_range(1, 3));
      if (n % 4 == 1) enc_noise_itm(n % 8 == 1);
    end
    repeat (200) oth_q.push_back(8'($urandom) | 8'h01);
    // play them interleaved
    while (ptm_q.size() + itm_q.size() + oth_q.size() > 0) begin
      @(negedge clk);
      pending_pc = 0; pending_itm = 0;
      src = $urandom_range(0, 4);
      atb_valid = 1;
      if (src <= 1 && ptm_q.size() > 0) begin
        atb_id = PTM; atb_data = ptm_q.pop_front(); pending_pc = ptm_last.pop_front();
      end else if ((src == 2 || src == 3) && itm_q.size() > 0) begin
        atb_id = ITM; atb_data = itm_q.pop_front(); pending_itm = itm_last.pop_front();
      end else if (src == 4 && oth_q.size() > 0) begin
        atb_id = OTHER; atb_data = oth_q.pop_front();
      end else begin
        atb_valid = 0; atb_id = PTM; atb_data = 8'h01;   // idle: data must be ignored
      end
    end
    @(negedge clk); atb_valid = 0; pending_pc = 0; pending_itm = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_pc.size() != 0 || exp_itm.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    for (int i = 1; i <= 5; i++) begin
      checks++;
      if (n_branch[i] == 0) begin failures++; $display("FAIL no %0d-byte branch", i); end
    end
    $display("isync %0d, branch by length %0d %0d %0d %0d %0d, itm by size %0d %0d %0d",
             n_isync, n_branch[1], n_branch[2], n_branch[3], n_branch[4], n_branch[5],
             n_itm_size[1], n_itm_size[2], n_itm_size[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
