// trace_port_pkg: testbench model of the trace port formatter.
//
// The class tpiu_formatter packs (source ID, byte) pairs into 16-byte trace
// port frames the way the processor's trace port unit does: ID changes at
// even positions, data bytes at even positions carry their bit 0 in the
// auxiliary byte 15, and an ID change followed by one more byte of the old ID
// uses the delayed form (auxiliary bit 1). pad() fills the open frame with
// null-ID (0) bytes so that everything pushed can be sent. It is the
// independent reference the deformatter is checked against.
package trace_port_pkg;

  typedef struct packed {
    logic [6:0] id;
    logic [7:0] data;
  } tbyte_t;

  class tpiu_formatter;
    tbyte_t     q[$];       // bytes waiting to be framed
    logic [6:0] cur_id = 7'h00;
    int         n_delayed = 0, n_immediate = 0, n_frames = 0;

    function void push(logic [6:0] id, logic [7:0] d);
      q.push_back('{id: id, data: d});
    endfunction

    // number of bytes still waiting
    function int pending();
      return q.size();
    endfunction

    // Build one frame from the queue; pad with null bytes if it runs out.
    function void frame(output logic [7:0] f[16]);
      logic [7:0] aux = '0;
      int p = 0;
      while (p < 15) begin
        tbyte_t x, y;
        bit have_x = q.size() > 0, have_y = q.size() > 1;
        if (!have_x) begin
          // pad: switch to the null ID and fill with ignored bytes
          if (p % 2 == 0) begin
            if (cur_id != 7'h00) begin f[p] = 8'h01; cur_id = 7'h00; end
            else f[p] = 8'h00;
          end else f[p] = 8'h00;
          p++;
          continue;
        end
        x = q[0];
        if (have_y) y = q[1];
        if (p % 2 == 1) begin
          // odd: always data, guaranteed to be of cur_id by the even slot before
          f[p] = x.data; void'(q.pop_front()); p++;
        end else if (x.id != cur_id) begin
          f[p] = {x.id, 1'b1}; aux[p/2] = 1'b0; cur_id = x.id; n_immediate++; p++;
          if (p < 15) begin f[p] = x.data; void'(q.pop_front()); p++; end
        end else if (p < 14 && have_y && y.id != cur_id) begin
          // delayed ID change: x (old ID) goes in the odd slot after the ID byte
          f[p] = {y.id, 1'b1}; aux[p/2] = 1'b1; p++;
          f[p] = x.data; void'(q.pop_front()); p++;
          cur_id = y.id; n_delayed++;
        end else if (p < 14 && !have_y) begin
          // last byte: restate the ID so that it lands in the odd slot
          f[p] = {cur_id, 1'b1}; aux[p/2] = 1'b0; p++;
          f[p] = x.data; void'(q.pop_front()); p++;
        end else begin
          f[p] = {x.data[7:1], 1'b0}; aux[p/2] = x.data[0]; void'(q.pop_front()); p++;
        end
      end
      f[15] = aux;
      n_frames++;
    endfunction
  endclass

endpackage
