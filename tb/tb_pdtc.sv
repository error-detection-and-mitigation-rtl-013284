// tb_pdtc: end-to-end test of the trace checker at its default parameters.
//
// The testbench plays the processor side of the hardened matrix-multiplication
// benchmark. Every matrix element is a hardened word of four 32-bit lanes:
// lane 0 control data, lanes 1..3 the value and two copies. A, B and the
// control values are random; a first multiplication gives the golden matrix.
// Then the benchmark loop repeats: trace the loop start PC, multiply, and for
// every result element trace a PC inside the code and export the golden
// control lane (port 0), the result's control lane (port 1) and its three data
// lanes (ports 2..4) as instrumentation writes. Program and instrumentation
// trace bytes are packed into trace port frames by a formatter model and sent
// on the 8-bit trace port, with sync packets every 32 frames.
//
// Phase 1 runs an 8x8 matrix and injects each kind of error the checker
// detects: an upset data lane (triple check), an upset control lane (control
// check), a jump outside the code regions (range check, latency also
// checked) and a hang of the main loop (watchdog). Each flag is read and
// cleared through APB. Phase 2 runs the benchmark at the matrix sizes
// 8, 16, 32, 64 and 128 with one upset data lane per run and checks that
// exactly the injected errors are reported. Every mechanism must have fired.
module tb_pdtc;
  import pdtc_pkg::*;
  import trace_port_pkg::*;
  localparam logic [6:0] PTM = 7'd1, ITM = 7'd2;
  localparam logic [31:0] CODE_LO = 32'h0010_0000, CODE_HI = 32'h0010_0FFC;
  localparam logic [31:0] LOOP_PC = 32'h0010_0100, BODY_PC = 32'h0010_0180;
  localparam int MAXD = 128;

  logic clk = 0, rst_n = 0;
  logic trace_valid = 0, trace_synced;
  logic [7:0] trace_data = 0;
  tpiu_formatter fmt = new();
  bit flush_req = 0, sending = 0;
  int last_frame_cyc = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic err_range, err_watchdog, err_control, err_triple, error, check_done;
  logic [N_EVENTS-1:0] event_pulse;
  logic [2:0] triple_neq;
  int checks = 0, failures = 0;
  int n_ev[N_EVENTS];
  int n_checks_run = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  pdtc dut (.clk, .rst_n, .trace_valid, .trace_data, .trace_synced,
            .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
            .err_range, .err_watchdog, .err_control, .err_triple, .error,
            .event_pulse, .triple_neq, .check_done);

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    for (int i = 0; i < N_EVENTS; i++) if (event_pulse[i]) n_ev[i]++;
    if (check_done) n_checks_run++;
  end

  // ---------------- processor-side helpers ----------------
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  // trace bytes go to the formatter; a background process frames and sends them
  function automatic void send(input logic [6:0] id, input logic [7:0] b);
    fmt.push(id, b);
  endfunction

  task automatic port(input logic [7:0] b);
    @(negedge clk); trace_valid = 1; trace_data = b;
  endtask

  initial begin : sender
    logic [7:0] f[16];
    int nf = 0;
    wait (rst_n);
    forever begin
      if (nf % 32 == 0) begin port(8'hFF); port(8'hFF); port(8'hFF); port(8'h7F); end
      if (fmt.pending() >= 15 || (flush_req && fmt.pending() > 0)) begin
        sending = 1;
        fmt.frame(f);
        for (int i = 0; i < 16; i++) port(f[i]);
        last_frame_cyc = cyc + 1;
        nf++;
        sending = 0;
      end else begin
        @(negedge clk); trace_valid = 0;
        if (nf % 32 == 0) nf++;
      end
    end
  end

  // send everything queued and let the checker finish with it
  task automatic drain();
    flush_req = 1;
    while (fmt.pending() != 0 || sending) @(negedge clk);
    flush_req = 0;
    repeat (20) @(negedge clk);
  endtask

  // program trace: full address (I-sync) and compressed branch (2 bytes, same upper bits)
  task automatic trace_isync(input logic [31:0] a);
    send(PTM, 8'h08); send(PTM, a[7:0]); send(PTM, a[15:8]); send(PTM, a[23:16]);
    send(PTM, a[31:24]); send(PTM, 8'h00);
  endtask
  task automatic trace_branch_near(input logic [31:0] a);
    send(PTM, {1'b1, a[7:2], 1'b1}); send(PTM, {1'b0, a[14:8]});
  endtask
  task automatic itm_write(input logic [4:0] port, input logic [31:0] d);
    send(ITM, {port, 3'b011}); send(ITM, d[7:0]); send(ITM, d[15:8]);
    send(ITM, d[23:16]); send(ITM, d[31:24]);
  endtask

  // ---------------- benchmark model ----------------
  hardened_word_t A[MAXD][MAXD], B[MAXD][MAXD], C[MAXD][MAXD], G[MAXD][MAXD];

  function automatic hardened_word_t hmac(hardened_word_t acc, hardened_word_t a, hardened_word_t b);
    hardened_word_t r;   // one SIMD multiply-accumulate over all four lanes
    r.control = acc.control + a.control * b.control;
    r.data    = acc.data    + a.data    * b.data;
    r.copy1   = acc.copy1   + a.copy1   * b.copy1;
    r.copy2   = acc.copy2   + a.copy2   * b.copy2;
    return r;
  endfunction

  function automatic void init_mats(int dim);
    for (int i = 0; i < dim; i++)
      for (int j = 0; j < dim; j++) begin
        logic [31:0] va = $urandom_range(0, 1000), vb = $urandom_range(0, 1000);
        A[i][j] = '{copy2: va, copy1: va, data: va, control: $urandom};
        B[i][j] = '{copy2: vb, copy1: vb, data: vb, control: $urandom};
      end
  endfunction

  function automatic void matmul(int dim, output hardened_word_t R[MAXD][MAXD]);
    for (int i = 0; i < dim; i++)
      for (int j = 0; j < dim; j++) begin
        R[i][j] = '0;
        for (int k = 0; k < dim; k++) R[i][j] = hmac(R[i][j], A[i][k], B[k][j]);
      end
  endfunction

  // export one result element, optionally upset: 1 data lane, 2 copy, 3 control
  task automatic export_elem(input int i, input int j, input int upset);
    hardened_word_t c = C[i][j];
    if (upset == 1) c.data    ^= 32'h0000_0400;
    if (upset == 2) c.copy2   ^= 32'h0100_0000;
    if (upset == 3) c.control ^= 32'h0000_0010;
    trace_branch_near(BODY_PC + 32'(4 * (j % 8)));
    itm_write(5'd0, G[i][j].control);
    itm_write(5'd1, c.control);
    itm_write(5'd2, c.data);
    itm_write(5'd3, c.copy1);
    itm_write(5'd4, c.copy2);
  endtask

  task automatic expect_flags(input string what, input logic [3:0] exp);
    logic [31:0] d;
    drain();
    apb_read(REG_STATUS, d);
    checks += 2;
    if (d[3:0] !== exp) begin failures++; $display("FAIL %s: status=%b exp=%b", what, d[3:0], exp); end
    if ({err_triple, err_control, err_watchdog, err_range} !== exp) begin
      failures++; $display("FAIL %s: error pins", what);
    end
    if (d[3:0] != 0) apb_write(REG_STATUS, 32'(d[3:0]));
  endtask

  task automatic configure(input int timeout);
    apb_write(REG_RANGE_BASE + 8'd0, CODE_LO);
    apb_write(REG_RANGE_BASE + 8'd4, CODE_HI);
    apb_write(REG_RANGE_BASE + 8'd8, 32'h0000_0000);   // exception vectors
    apb_write(REG_RANGE_BASE + 8'd12, 32'h0000_001C);
    apb_write(REG_RANGE_EN, 32'h3);
    apb_write(REG_WD_LOOP_PC, LOOP_PC);
    apb_write(REG_WD_TIMEOUT, 32'(timeout));
    apb_write(REG_CTRL, 32'h7);
  endtask

  // one pass of the benchmark loop; returns after all elements are exported
  task automatic bench_iteration(input int dim, input int up_i, input int up_j, input int upset);
    trace_isync(LOOP_PC);
    matmul(dim, C);
    for (int i = 0; i < dim; i++)
      for (int j = 0; j < dim; j++)
        export_elem(i, j, (i == up_i && j == up_j) ? upset : 0);
  endtask

  initial begin
    logic [31:0] d;
    int t0, e0[N_EVENTS], per_elem, c0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------- phase 1: each mechanism at 8x8 ----------
    init_mats(8);
    matmul(8, G);
    per_elem = 2 * (2 + 5 * 5);                  // twice the trace bytes of one element
    configure(8 * 8 * per_elem + 200);
    bench_iteration(8, -1, -1, 0);
    expect_flags("clean run", 4'b0000);
    c0 = n_checks_run;
    bench_iteration(8, 2, 3, 1);
    expect_flags("data lane upset", 4'b1000);
    checks++;
    if (triple_neq !== 3'b011 && triple_neq !== 3'b000) begin failures++; $display("FAIL neq=%b", triple_neq); end
    bench_iteration(8, 5, 1, 2);
    expect_flags("copy upset", 4'b1000);
    bench_iteration(8, 7, 7, 3);
    expect_flags("control upset", 4'b0100);
    checks++;
    if (n_checks_run - c0 < 3 * 2 * 64) begin failures++; $display("FAIL too few data checks %0d", n_checks_run - c0); end
    // jump outside the code: detected within a frame time plus two clocks
    trace_isync(LOOP_PC);
    drain();
    trace_isync(32'h0800_0000);
    fork
      drain();
      begin
        wait (event_pulse[EV_RANGE]);
        checks++;
        $display("range error %0d clocks after the frame's last port byte", cyc - last_frame_cyc);
        if (cyc - last_frame_cyc > 17) begin failures++; $display("FAIL range latency %0d", cyc - last_frame_cyc); end
      end
    join
    expect_flags("wild jump", 4'b0001);
    apb_read(REG_LAST_PC, d);
    checks++;
    if (d !== 32'h0800_0000) begin failures++; $display("FAIL last pc %h", d); end
    // loop hang: nothing traced, watchdog fires once
    drain();
    for (int i = 0; i < N_EVENTS; i++) e0[i] = n_ev[i];
    repeat (8 * 8 * per_elem + 400) @(negedge clk);
    checks++;
    if (n_ev[EV_WATCHDOG] - e0[EV_WATCHDOG] != 1) begin failures++; $display("FAIL watchdog fired %0d times", n_ev[EV_WATCHDOG] - e0[EV_WATCHDOG]); end
    expect_flags("loop hang", 4'b0010);
    // recovered loop runs clean again
    bench_iteration(8, -1, -1, 0);
    expect_flags("after recovery", 4'b0000);

    // ---------- phase 2: benchmark sizes ----------
    foreach (n_ev[i]) e0[i] = n_ev[i];
    for (int dim = 8; dim <= MAXD; dim *= 2) begin
      init_mats(dim);
      matmul(dim, G);
      configure(dim * dim * per_elem + 200);
      bench_iteration(dim, -1, -1, 0);
      bench_iteration(dim, dim / 2, dim - 1, 1);
      expect_flags($sformatf("matmul %0dx%0d", dim, dim), 4'b1000);
      $display("matmul %0dx%0d: two iterations, one injected upset detected, cycle %0d", dim, dim, cyc);
    end
    checks++;
    if (n_ev[EV_TRIPLE] - e0[EV_TRIPLE] != 5 || n_ev[EV_RANGE] != e0[EV_RANGE] ||
        n_ev[EV_CONTROL] != e0[EV_CONTROL] || n_ev[EV_WATCHDOG] != e0[EV_WATCHDOG]) begin
      failures++; $display("FAIL phase 2 event counts");
    end
    checks++;
    if (fmt.n_delayed == 0 || fmt.n_immediate == 0) begin failures++; $display("FAIL a trace ID change form never used"); end
    checks++;
    if (!trace_synced) begin failures++; $display("FAIL trace port never synced"); end
    $display("events: range %0d, watchdog %0d, control %0d, triple %0d; data checks run %0d",
             n_ev[EV_RANGE], n_ev[EV_WATCHDOG], n_ev[EV_CONTROL], n_ev[EV_TRIPLE], n_checks_run);
    $display("trace frames %0d, ID changes immediate %0d, delayed %0d",
             fmt.n_frames, fmt.n_immediate, fmt.n_delayed);
    for (int i = 0; i < N_EVENTS; i++) begin
      checks++;
      if (n_ev[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
