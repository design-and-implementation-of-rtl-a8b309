// noc3d_router: seven-port wormhole router for a 3D mesh network-on-chip.
//
// Ports, in index order: Local (the attached processing element), South,
// North, West, East, Up and Down (the vertical neighbours in the layers above
// and below). Each input_port buffers up to four 81-bit flits and works out,
// by look-ahead XYZ routing, the output the flit will take at the next router.
// The switch_allocator grants each output to one input for a whole packet,
// with round-robin arbitration among competing inputs, and the crossbar moves
// the granted flits to the outputs, where tail_sent_detect watches for tails.
//
// Timing: a flit written at clock edge t (data_in valid in the cycle before)
// can be granted in the cycle after t and appears on data_out one edge later,
// so it crosses the router in two cycles when nothing competes for it. A
// single output then carries at most one flit every second cycle.
// Flow control is Stall-and-Go: stop_out[p] is high while input p's buffer is
// full, and a router must not send on output o while stop_in[o] is high.
// An idle link carries an all-zero flit. xaddr/yaddr/zaddr give this router's
// position in the mesh. The pipeline (buffer write, routing and switch
// allocation, crossbar traversal) follows the published design; the
// two-cycle timing follows from the choices recorded in each submodule.
module noc3d_router
  import noc3d_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  coord_t    xaddr,
  input  coord_t    yaddr,
  input  coord_t    zaddr,
  input  flit_t     data_in  [NPORTS],
  input  port_vec_t stop_in,
  output flit_t     data_out [NPORTS],
  output port_vec_t stop_out
);

  flit_t     port_data [NPORTS];
  port_vec_t port_req  [NPORTS];
  port_vec_t sw_cntrl  [NPORTS];
  port_vec_t sw_req;
  port_vec_t sw_grant;
  port_vec_t data_sent;
  port_vec_t tail_sent;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port #(.DEPTH(DEPTH)) u_in (
      .clk      (clk),
      .rst_n    (rst_n),
      .xaddr    (xaddr),
      .yaddr    (yaddr),
      .zaddr    (zaddr),
      .data_in  (data_in[p]),
      .sw_grant (sw_grant[p]),
      .data_out (port_data[p]),
      .stop_out (stop_out[p]),
      .sw_req   (sw_req[p]),
      .port_req (port_req[p])
    );
  end

  switch_allocator u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .sw_req    (sw_req),
    .port_req  (port_req),
    .stop_in   (stop_in),
    .data_sent (data_sent),
    .tail_sent (tail_sent),
    .sw_cntrl  (sw_cntrl),
    .grant_out (sw_grant)
  );

  crossbar u_xbar (
    .clk      (clk),
    .rst_n    (rst_n),
    .control  (sw_cntrl),
    .data_in  (port_data),
    .data_out (data_out)
  );

  tail_sent_detect u_ts (
    .data_out  (data_out),
    .data_sent (data_sent),
    .tail_sent (tail_sent)
  );

  // Stall-and-Go: a flit may leave on output o only if stop_in[o] was low
  // in the cycle it was granted, the cycle before it appears.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_stop_respected: assert property (@(posedge clk) disable iff (!rst_n)
                                       stop_in[o] |=> !flit_valid(data_out[o]))
      else $error("noc3d_router: flit sent on output %0d against stop", o);
  end

endmodule
