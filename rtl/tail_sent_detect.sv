// tail_sent_detect: the Tail and Sent blocks at the crossbar outputs.
//
// data_sent[o] is high while output o carries a flit (a non-zero Next-Port
// field); tail_sent[o] is high while that flit is a tail flit (bit 0 set).
// Both go back to the switch allocator: tail_sent frees the output for the
// next packet, data_sent holds off the next grant for a cycle. Purely
// combinational. Detecting a flit from its Next-Port field is this design's
// convention; the published diagram shows only the two blocks and their
// 7-bit outputs.
module tail_sent_detect
  import noc3d_pkg::*;
(
  input  flit_t     data_out  [NPORTS],
  output port_vec_t data_sent,
  output port_vec_t tail_sent
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      data_sent[o] = flit_valid(data_out[o]);
      tail_sent[o] = flit_valid(data_out[o]) && data_out[o].tail;
    end
  end

endmodule
