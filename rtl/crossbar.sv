// crossbar: the 7x7 switch of the router (crossbar traversal stage).
//
// control[o] is the one-hot input that output o takes, as produced by the
// switch allocator. One multiplexer per output picks that input's flit from
// data_in (7 x 81 = 567 bits) and the result is registered: the selected
// flits appear on data_out one clock after the grant, and an output whose
// control is all zero carries an idle (all-zero) flit. The published circuit
// registers the 49-bit control word; here the selected flits are registered
// instead, which keeps each flit aligned with its control word after the
// input FIFO has moved on. The reset value is this design's choice.
module crossbar
  import noc3d_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  port_vec_t control  [NPORTS],
  input  flit_t     data_in  [NPORTS],
  output flit_t     data_out [NPORTS]
);

  for (genvar o = 0; o < NPORTS; o++) begin : g_mux
    flit_t sel;

    always_comb begin
      sel = IDLE_FLIT;
      for (int i = 0; i < NPORTS; i++) begin
        if (control[o][i]) sel = data_in[i];
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) data_out[o] <= IDLE_FLIT;
      else        data_out[o] <= sel;
    end
  end

endmodule
