// data_checker: checks data values the program exports through the
// instrumentation trace.
//
// The program writes the values to check into stimulus ports; each port is one
// data register of the checker, tied to a check:
//   DUAL_REF_PORT          golden control value (kept until rewritten)
//   DUAL_CHK_PORT          control data; every write is compared with golden
//   TRIPLE_BASE_PORT+0..2  D1, D2, D3: the data and its two copies; when all
//                          three have been written since the last check they
//                          are compared pairwise.
// So to check one hardened result the program writes its control lane to
// DUAL_CHK_PORT and its three data lanes to the triple ports. Dual and triple
// equality checks follow the checker's block diagram; the port numbers and the
// "all three written" trigger are this design's choices.
//
// Timing: ctrl_err pulses two clocks after the ITM write of the control data,
// triple_err two clocks after the write that completes D1..D3 (one clock to
// latch the register, one in the comparator). Writes to other ports are ignored.
module data_checker #(
  parameter logic [4:0] DUAL_REF_PORT    = 5'd0,
  parameter logic [4:0] DUAL_CHK_PORT    = 5'd1,
  parameter logic [4:0] TRIPLE_BASE_PORT = 5'd2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        itm_valid,
  input  logic [4:0]  itm_port,
  input  logic [31:0] itm_data,
  output logic        ctrl_err,
  output logic        triple_err,
  output logic [2:0]  triple_neq,
  output logic        check_done     // a dual or triple check ran this cycle
);

  logic [31:0]      golden, ctrl_val;
  logic [2:0][31:0] d;
  logic [2:0]       d_fresh;         // written since the last triple check
  logic             dual_go, triple_go;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      golden    <= '0;
      ctrl_val  <= '0;
      d         <= '0;
      d_fresh   <= '0;
      dual_go   <= 1'b0;
      triple_go <= 1'b0;
    end else begin
      dual_go   <= 1'b0;
      triple_go <= 1'b0;
      if (enable && itm_valid) begin
        if (itm_port == DUAL_REF_PORT) golden <= itm_data;
        if (itm_port == DUAL_CHK_PORT) begin
          ctrl_val <= itm_data;
          dual_go  <= 1'b1;
        end
        for (int i = 0; i < 3; i++) begin
          if (itm_port == TRIPLE_BASE_PORT + 5'(i)) begin
            d[i] <= itm_data;
            if ((d_fresh | (3'b001 << i)) == 3'b111) begin
              triple_go <= 1'b1;
              d_fresh   <= '0;
            end else begin
              d_fresh[i] <= 1'b1;
            end
          end
        end
      end
    end
  end

  dual_value_checker #(.W(32)) u_dual (
    .clk, .rst_n,
    .check  (dual_go),
    .value  (ctrl_val),
    .golden (golden),
    .err    (ctrl_err)
  );

  triple_value_checker #(.W(32)) u_triple (
    .clk, .rst_n,
    .check (triple_go),
    .d1    (d[0]),
    .d2    (d[1]),
    .d3    (d[2]),
    .neq   (triple_neq),
    .err   (triple_err)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) check_done <= 1'b0;
    else        check_done <= dual_go || triple_go;
  end

endmodule
