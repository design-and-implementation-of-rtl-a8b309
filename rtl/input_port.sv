// input_port: one of the router's seven input ports (buffer writing and
// routing calculation stages).
//
// An arriving flit (any flit with a non-zero Next-Port field) is written into
// a four-entry flit_fifo. While the FIFO holds a flit the port raises sw_req
// and presents the head flit's Next-Port field on port_req: that is the
// output it asks the switch allocator for. data_out is the head flit with its
// Next-Port field replaced by the New-Next-Port that route_xyz computes for
// the next router (look-ahead routing); it is all zero while the FIFO is
// empty. sw_grant removes the head flit at the next clock edge.
// stop_out is the Stall-and-Go signal to the upstream router: it is high
// while the FIFO is full. Every flit of a packet carries the packet's
// Next-Port and destination fields, so body flits request the same output as
// the head; that, and the use of a non-zero Next-Port as the arrival signal,
// are this design's reading of the published port diagram.
module input_port
  import noc3d_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  coord_t    xaddr,
  input  coord_t    yaddr,
  input  coord_t    zaddr,
  input  flit_t     data_in,
  input  logic      sw_grant,
  output flit_t     data_out,
  output logic      stop_out,
  output logic      sw_req,
  output port_vec_t port_req
);

  flit_t     fifo_out;
  logic      empty, full;
  logic      enque;
  port_vec_t new_next_port;

  assign enque = flit_valid(data_in);

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (enque),
    .wr_data (data_in),
    .rd_en   (sw_grant),
    .rd_data (fifo_out),
    .empty   (empty),
    .full    (full)
  );

  route_xyz u_route (
    .xaddr         (xaddr),
    .yaddr         (yaddr),
    .zaddr         (zaddr),
    .out_port      (fifo_out.next_port),
    .xdest         (fifo_out.xdest),
    .ydest         (fifo_out.ydest),
    .zdest         (fifo_out.zdest),
    .new_next_port (new_next_port)
  );

  always_comb begin
    data_out = IDLE_FLIT;
    if (!empty) begin
      data_out           = fifo_out;
      data_out.next_port = new_next_port;
    end
  end

  // A flit names exactly one output; an idle link names none.
  a_next_port_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(data_in.next_port))
    else $error("input_port: arriving flit with several Next-Port bits set");

  assign sw_req   = !empty;
  assign port_req = empty ? '0 : fifo_out.next_port;
  assign stop_out = full;

endmodule
