// ptm_decoder: recovers executed PC addresses from a Program Trace Macrocell
// byte stream.
//
// The checker needs only the addresses the program flow reaches, so a reduced
// subset of the ARM program-flow trace protocol is decoded (ARM state only):
//   A-sync   0x00 .. 0x00 0x80        resynchronises, no PC
//   I-sync   0x08 A0 A1 A2 A3 INFO    full 32-bit PC, little endian (bit 0 of A0
//                                     is the Thumb flag and is dropped)
//   Branch   B0 [B1 [B2 [B3 [B4]]]]   B0[0]=1; bit 7 of B0..B3 says another byte
//                                     follows; B0[6:1]=PC[7:2], B1..B3[6:0] give
//                                     PC[14:8], PC[21:15], PC[28:22], B4[2:0]
//                                     gives PC[31:29]; bits not sent are kept
//                                     from the previous PC (address compression)
//   other    any other byte is a one-byte packet (atoms, ...) and is ignored.
// The packet formats are general protocol knowledge, not taken from the method
// description, and cover no exception bytes, cycle counts or context IDs.
//
// Interface: one byte per cycle on in_valid/in_data. Timing: pc_valid pulses
// for one cycle, the clock after the last byte of an I-sync or branch packet.
module ptm_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        pc_valid,
  output logic [31:0] pc
);

  typedef enum logic [1:0] {S_IDLE, S_ISYNC, S_BRANCH, S_ASYNC} state_e;

  state_e      state;
  logic [2:0]  idx;        // byte index inside the current packet
  logic [31:0] last_pc;    // last full PC, base for compressed branches
  logic [31:0] acc;        // address being assembled

  // Merge branch byte number idx into an address.
  function automatic logic [31:0] merge_branch(input logic [31:0] base, input logic [2:0] i,
                                               input logic [7:0] b);
    logic [31:0] a;
    a = base;
    case (i)
      3'd0: a[7:2]   = b[6:1];
      3'd1: a[14:8]  = b[6:0];
      3'd2: a[21:15] = b[6:0];
      3'd3: a[28:22] = b[6:0];
      default: a[31:29] = b[2:0];
    endcase
    a[1:0] = 2'b00;
    return a;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      idx      <= '0;
      last_pc  <= '0;
      acc      <= '0;
      pc_valid <= 1'b0;
      pc       <= '0;
    end else begin
      pc_valid <= 1'b0;
      if (in_valid) begin
        unique case (state)
          S_IDLE: begin
            if (in_data == 8'h00) begin
              state <= S_ASYNC;
            end else if (in_data == 8'h08) begin
              state <= S_ISYNC;
              idx   <= '0;
            end else if (in_data[0]) begin
              if (in_data[7]) begin
                state <= S_BRANCH;
                idx   <= 3'd1;
                acc   <= merge_branch(last_pc, 3'd0, in_data);
              end else begin
                pc_valid <= 1'b1;
                pc       <= merge_branch(last_pc, 3'd0, in_data);
                last_pc  <= merge_branch(last_pc, 3'd0, in_data);
              end
            end
          end
          S_ASYNC: begin
            // a run of zeros ends with 0x80; anything else abandons the sync
            if (in_data != 8'h00) state <= S_IDLE;
          end
          S_ISYNC: begin
            idx <= idx + 3'd1;
            unique case (idx)
              3'd0: acc[7:0]   <= {in_data[7:1], 1'b0};
              3'd1: acc[15:8]  <= in_data;
              3'd2: acc[23:16] <= in_data;
              3'd3: acc[31:24] <= in_data;
              default: begin  // information byte closes the packet
                state    <= S_IDLE;
                pc_valid <= 1'b1;
                pc       <= acc;
                last_pc  <= acc;
              end
            endcase
          end
          S_BRANCH: begin
            idx <= idx + 3'd1;
            if (idx == 3'd4 || !in_data[7]) begin
              state    <= S_IDLE;
              pc_valid <= 1'b1;
              pc       <= merge_branch(acc, idx, in_data);
              last_pc  <= merge_branch(acc, idx, in_data);
            end else begin
              acc <= merge_branch(acc, idx, in_data);
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
