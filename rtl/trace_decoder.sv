// trace_decoder: front end of the trace checker.
//
// The trace of the processor arrives as one stream of bytes, each tagged with
// the ID of the trace source that produced it (CoreSight ATB style, after the
// trace port frames have been unpacked). Bytes from the program trace source
// (PTM_ID) go to ptm_decoder, which outputs executed PC addresses for the
// program checker; bytes from the instrumentation source (ITM_ID) go to
// itm_decoder, which outputs stimulus-port writes for the data checker. Bytes
// of any other source are dropped. The split into a program path and a data
// path follows the checker's block diagram; the byte interface and the IDs are
// this design's choice.
//
// Timing: a PC or data write leaves one clock after the last byte of its packet.
module trace_decoder #(
  parameter logic [6:0] PTM_ID = 7'd1,
  parameter logic [6:0] ITM_ID = 7'd2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        atb_valid,
  input  logic [6:0]  atb_id,
  input  logic [7:0]  atb_data,
  output logic        pc_valid,
  output logic [31:0] pc,
  output logic        itm_valid,
  output logic [4:0]  itm_port,
  output logic [31:0] itm_data
);

  logic ptm_in, itm_in;
  assign ptm_in = atb_valid && (atb_id == PTM_ID);
  assign itm_in = atb_valid && (atb_id == ITM_ID);

  ptm_decoder u_ptm (
    .clk, .rst_n,
    .in_valid (ptm_in),
    .in_data  (atb_data),
    .pc_valid,
    .pc
  );

  itm_decoder u_itm (
    .clk, .rst_n,
    .in_valid  (itm_in),
    .in_data   (atb_data),
    .out_valid (itm_valid),
    .out_port  (itm_port),
    .out_data  (itm_data)
  );

endmodule
