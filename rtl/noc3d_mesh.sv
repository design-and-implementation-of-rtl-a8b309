// noc3d_mesh: a 3D mesh network-on-chip of XDIM x YDIM x ZDIM routers
// (2 x 2 x 4 by default, the network size the design targets).
//
// Router (x,y,z) is node n = x + XDIM*(y + YDIM*z) and gets its own
// coordinates as its address. Its East output feeds the West input of
// router (x+1,y,z), North feeds South of (x,y+1,z), Up feeds Down of
// (x,y,z+1), and the other way round; the vertical (Up/Down) links stand for
// the through-silicon vias between stacked layers and are plain registered
// links like the others. Each Stall-and-Go stop signal runs against its data
// link. Links at the faces of the mesh are tied idle: XYZ routing never sends
// a flit there.
//
// The Local port of every router is brought out (local_in / local_out with
// their stop signals) for the processing elements or network interfaces.
// A flit injected on local_in[n] must already carry in its Next-Port field
// the output it takes at router n (look-ahead routing); the routers fill in
// that field for every later hop, and a flit leaves the network on
// local_out[d] of its destination d. The mesh size and the tying-off of the
// faces are this design's choices; coordinates are 3 bits, so each dimension
// may have up to 8 routers.
module noc3d_mesh
  import noc3d_pkg::*;
#(
  parameter int unsigned XDIM  = 2,
  parameter int unsigned YDIM  = 2,
  parameter int unsigned ZDIM  = 4,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned NN   = XDIM * YDIM * ZDIM
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t local_in       [NN],
  input  logic  local_stop_in  [NN],  // PE n cannot take a flit
  output flit_t local_out      [NN],
  output logic  local_stop_out [NN]   // router n's Local buffer is full
);

  flit_t     r_in   [NN][NPORTS];
  flit_t     r_out  [NN][NPORTS];
  port_vec_t r_stop_in  [NN];
  port_vec_t r_stop_out [NN];

  for (genvar z = 0; z < ZDIM; z++) begin : g_z
    for (genvar y = 0; y < YDIM; y++) begin : g_y
      for (genvar x = 0; x < XDIM; x++) begin : g_x
        localparam int unsigned N  = x + XDIM * (y + YDIM * z);
        localparam int unsigned NE = N + 1;
        localparam int unsigned NW = N - 1;
        localparam int unsigned NNo = N + XDIM;
        localparam int unsigned NS = N - XDIM;
        localparam int unsigned NU = N + XDIM * YDIM;
        localparam int unsigned ND = N - XDIM * YDIM;

        assign r_in[N][PORT_L] = local_in[N];
        assign r_stop_in[N][PORT_L]    = local_stop_in[N];
        assign local_out[N]            = r_out[N][PORT_L];
        assign local_stop_out[N]       = r_stop_out[N][PORT_L];

        if (x + 1 < XDIM) begin : g_e
          assign r_in[N][PORT_E]      = r_out[NE][PORT_W];
          assign r_stop_in[N][PORT_E] = r_stop_out[NE][PORT_W];
        end else begin : g_e_edge
          assign r_in[N][PORT_E]      = IDLE_FLIT;
          assign r_stop_in[N][PORT_E] = 1'b0;
        end
        if (x > 0) begin : g_w
          assign r_in[N][PORT_W]      = r_out[NW][PORT_E];
          assign r_stop_in[N][PORT_W] = r_stop_out[NW][PORT_E];
        end else begin : g_w_edge
          assign r_in[N][PORT_W]      = IDLE_FLIT;
          assign r_stop_in[N][PORT_W] = 1'b0;
        end
        if (y + 1 < YDIM) begin : g_n
          assign r_in[N][PORT_N]      = r_out[NNo][PORT_S];
          assign r_stop_in[N][PORT_N] = r_stop_out[NNo][PORT_S];
        end else begin : g_n_edge
          assign r_in[N][PORT_N]      = IDLE_FLIT;
          assign r_stop_in[N][PORT_N] = 1'b0;
        end
        if (y > 0) begin : g_s
          assign r_in[N][PORT_S]      = r_out[NS][PORT_N];
          assign r_stop_in[N][PORT_S] = r_stop_out[NS][PORT_N];
        end else begin : g_s_edge
          assign r_in[N][PORT_S]      = IDLE_FLIT;
          assign r_stop_in[N][PORT_S] = 1'b0;
        end
        if (z + 1 < ZDIM) begin : g_u
          assign r_in[N][PORT_U]      = r_out[NU][PORT_D];
          assign r_stop_in[N][PORT_U] = r_stop_out[NU][PORT_D];
        end else begin : g_u_edge
          assign r_in[N][PORT_U]      = IDLE_FLIT;
          assign r_stop_in[N][PORT_U] = 1'b0;
        end
        if (z > 0) begin : g_d
          assign r_in[N][PORT_D]      = r_out[ND][PORT_U];
          assign r_stop_in[N][PORT_D] = r_stop_out[ND][PORT_U];
        end else begin : g_d_edge
          assign r_in[N][PORT_D]      = IDLE_FLIT;
          assign r_stop_in[N][PORT_D] = 1'b0;
        end

        noc3d_router #(.DEPTH(DEPTH)) u_router (
          .clk      (clk),
          .rst_n    (rst_n),
          .xaddr    (COORD_W'(x)),
          .yaddr    (COORD_W'(y)),
          .zaddr    (COORD_W'(z)),
          .data_in  (r_in[N]),
          .stop_in  (r_stop_in[N]),
          .data_out (r_out[N]),
          .stop_out (r_stop_out[N])
        );
      end
    end
  end

  initial begin
    assert (XDIM <= 8 && YDIM <= 8 && ZDIM <= 8)
      else $error("noc3d_mesh: each dimension is limited to 8 by the 3-bit coordinates");
  end

endmodule
