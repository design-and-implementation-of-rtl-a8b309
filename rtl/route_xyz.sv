// route_xyz: look-ahead XYZ dimension-order routing calculation.
//
// The Next-Port field of a flit names the output it takes at the router that
// holds it; that field was computed one router earlier. This unit computes
// the New-Next-Port, the output the flit will take at the following router,
// so the downstream router can request its switch without a routing stage.
// It first works out the address of the neighbour that out_port leads to
// (present address plus or minus one in one dimension), then applies the
// published rules to that address: X first (East if the destination X is
// larger, West if smaller), then Y (North / South), then Z (Up / Down), and
// Local (SELF) when all three are equal. A flit leaving on the Local port
// keeps Local. Purely combinational.
module route_xyz
  import noc3d_pkg::*;
(
  input  coord_t    xaddr,
  input  coord_t    yaddr,
  input  coord_t    zaddr,
  input  port_vec_t out_port,     // one-hot output at this router
  input  coord_t    xdest,
  input  coord_t    ydest,
  input  coord_t    zdest,
  output port_vec_t new_next_port // one-hot output at the next router
);

  coord_t xn, yn, zn;

  always_comb begin
    xn = xaddr;
    yn = yaddr;
    zn = zaddr;
    if      (out_port[PORT_E]) xn = xaddr + 1'b1;
    else if (out_port[PORT_W]) xn = xaddr - 1'b1;
    else if (out_port[PORT_N]) yn = yaddr + 1'b1;
    else if (out_port[PORT_S]) yn = yaddr - 1'b1;
    else if (out_port[PORT_U]) zn = zaddr + 1'b1;
    else if (out_port[PORT_D]) zn = zaddr - 1'b1;

    if (out_port[PORT_L])    new_next_port = port_onehot(PORT_L);
    else if (xdest > xn)     new_next_port = port_onehot(PORT_E);
    else if (xdest < xn)     new_next_port = port_onehot(PORT_W);
    else if (ydest > yn)     new_next_port = port_onehot(PORT_N);
    else if (ydest < yn)     new_next_port = port_onehot(PORT_S);
    else if (zdest > zn)     new_next_port = port_onehot(PORT_U);
    else if (zdest < zn)     new_next_port = port_onehot(PORT_D);
    else                     new_next_port = port_onehot(PORT_L);
  end

endmodule
