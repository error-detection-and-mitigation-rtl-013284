// itm_decoder: recovers software stimulus-port writes from an Instrumentation
// Trace Macrocell byte stream.
//
// The program exports the values to be checked by writing them to ITM stimulus
// ports; each write appears in the trace as a source packet:
//   header  H[1:0] = payload size (1: 1 byte, 2: 2 bytes, 3: 4 bytes),
//           H[2]   = 0 for a software (stimulus port) source, 1 for hardware,
//           H[7:3] = port number;
//   payload little endian, zero-extended to 32 bits.
// A header with H[1:0] = 0 is a protocol packet (sync, overflow, timestamp):
// continuation bytes follow while bit 7 of the last byte is set, and are
// skipped, as are zero bytes and hardware-source payloads. The packet format is
// general protocol knowledge, not taken from the method description.
//
// Interface: one byte per cycle on in_valid/in_data. Timing: out_valid pulses
// for one cycle, the clock after the last payload byte.
module itm_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  output logic [4:0]  out_port,
  output logic [31:0] out_data
);

  typedef enum logic [1:0] {S_HDR, S_PAYLOAD, S_CONT} state_e;

  state_e      state;
  logic [1:0]  idx;       // payload byte index
  logic [1:0]  last_idx;  // index of the last payload byte
  logic        hw_src;    // payload belongs to a hardware source
  logic [4:0]  port;
  logic [31:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_HDR;
      idx       <= '0;
      last_idx  <= '0;
      hw_src    <= 1'b0;
      port      <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_port  <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        unique case (state)
          S_HDR: begin
            if (in_data[1:0] != 2'b00) begin
              state    <= S_PAYLOAD;
              idx      <= '0;
              last_idx <= (in_data[1:0] == 2'd3) ? 2'd3 : in_data[1:0] - 2'd1;
              hw_src   <= in_data[2];
              port     <= in_data[7:3];
              acc      <= '0;
            end else if (in_data != 8'h00 && in_data[7]) begin
              state <= S_CONT;
            end
          end
          S_PAYLOAD: begin
            idx <= idx + 2'd1;
            acc[8*idx +: 8] <= in_data;
            if (idx == last_idx) begin
              state <= S_HDR;
              if (!hw_src) begin
                out_valid <= 1'b1;
                out_port  <= port;
                out_data  <= acc;
                out_data[8*idx +: 8] <= in_data;
              end
            end
          end
          S_CONT: begin
            if (!in_data[7]) state <= S_HDR;
          end
          default: state <= S_HDR;
        endcase
      end
    end
  end

endmodule
