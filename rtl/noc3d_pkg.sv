// noc3d_pkg: types and constants shared by the 3D mesh router.
//
// A flit is 81 bits. Bit 0 is the tail flag, bits 7:1 a one-hot Next-Port
// field, bits 10:8, 13:11 and 16:14 the X, Y and Z destination and bits
// 80:17 a 64-bit payload. This layout follows the published flit format.
// A flit whose Next-Port field is all zero is an idle link cycle: that is the
// design's own convention, since the format has no separate valid bit.
//
// Port indices follow the order of the router's block diagram: Local, South,
// North, West, East, Up, Down. Next-Port bit (1+p) selects port p.
package noc3d_pkg;

  localparam int unsigned NPORTS     = 7;
  localparam int unsigned COORD_W    = 3;
  localparam int unsigned PAYLOAD_W  = 64;
  localparam int unsigned FLIT_W     = 81;

  typedef logic [NPORTS-1:0]  port_vec_t;
  typedef logic [COORD_W-1:0] coord_t;

  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_S = 3'd1,
    PORT_N = 3'd2,
    PORT_W = 3'd3,
    PORT_E = 3'd4,
    PORT_U = 3'd5,
    PORT_D = 3'd6
  } port_e;

  // Packed MSB first, so tail lands on bit 0 and payload on bits 80:17.
  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;
    coord_t               zdest;
    coord_t               ydest;
    coord_t               xdest;
    port_vec_t            next_port;
    logic                 tail;
  } flit_t;

  localparam flit_t IDLE_FLIT = '0;

  function automatic port_vec_t port_onehot(port_e p);
    return port_vec_t'(1) << p;
  endfunction

  function automatic logic flit_valid(flit_t f);
    return |f.next_port;
  endfunction

endpackage
