// tb_route_xyz: self-checking test of look-ahead XYZ routing.
// For random present addresses, one-hot outputs and destinations the
// New-Next-Port is compared with a reference that first steps to the
// neighbour and then applies X-, Y-, Z-order routing. Directed cases check
// each of the seven results once.
module tb_route_xyz;
  import noc3d_pkg::*;

  coord_t xaddr, yaddr, zaddr, xdest, ydest, zdest;
  port_vec_t out_port, new_next_port;
  int checks = 0, failures = 0;
  int seen [NPORTS];

  route_xyz dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic port_vec_t ref_route(int x, int y, int z, int p, int xd, int yd, int zd);
    int xn = x, yn = y, zn = z;
    if (p == PORT_L) return port_vec_t'(1) << PORT_L;
    case (p)
      PORT_E: xn = (x + 1) % 8;
      PORT_W: xn = (x + 7) % 8;
      PORT_N: yn = (y + 1) % 8;
      PORT_S: yn = (y + 7) % 8;
      PORT_U: zn = (z + 1) % 8;
      PORT_D: zn = (z + 7) % 8;
      default: ;
    endcase
    if (xd > xn) return port_vec_t'(1) << PORT_E;
    if (xd < xn) return port_vec_t'(1) << PORT_W;
    if (yd > yn) return port_vec_t'(1) << PORT_N;
    if (yd < yn) return port_vec_t'(1) << PORT_S;
    if (zd > zn) return port_vec_t'(1) << PORT_U;
    if (zd < zn) return port_vec_t'(1) << PORT_D;
    return port_vec_t'(1) << PORT_L;
  endfunction

  task automatic run(int x, int y, int z, int p, int xd, int yd, int zd);
    port_vec_t exp;
    xaddr = coord_t'(x); yaddr = coord_t'(y); zaddr = coord_t'(z);
    xdest = coord_t'(xd); ydest = coord_t'(yd); zdest = coord_t'(zd);
    out_port = port_vec_t'(1) << p;
    #1;
    exp = ref_route(x, y, z, p, xd, yd, zd);
    checks++;
    if (new_next_port !== exp) begin
      failures++;
      $display("FAIL addr=(%0d,%0d,%0d) port=%0d dest=(%0d,%0d,%0d): got %b expected %b",
               x, y, z, p, xd, yd, zd, new_next_port, exp);
    end
    for (int k = 0; k < NPORTS; k++) if (exp[k]) seen[k]++;
  endtask

  initial begin
    // Directed: from (1,1,1) leaving East to (2,1,1) the flit is at its destination.
    run(1, 1, 1, PORT_E, 2, 1, 1);   // Local
    run(1, 1, 1, PORT_E, 4, 0, 0);   // East
    run(1, 1, 1, PORT_W, 0, 3, 3);   // at (0,1,1): North
    run(1, 1, 1, PORT_N, 1, 0, 1);   // at (1,2,1): South
    run(1, 1, 1, PORT_U, 1, 1, 5);   // at (1,1,2): Up
    run(1, 1, 1, PORT_D, 1, 1, 0);   // at (1,1,0): Local
    run(2, 2, 2, PORT_S, 2, 1, 0);   // at (2,1,2): Down
    run(2, 2, 2, PORT_L, 0, 0, 0);   // ejecting: stays Local
    run(2, 2, 2, PORT_E, 0, 0, 0);   // at (3,2,2): West
    for (int n = 0; n < 20000; n++) begin
      int x = $urandom_range(1, 6), y = $urandom_range(1, 6), z = $urandom_range(1, 6);
      run(x, y, z, $urandom_range(0, NPORTS - 1), $urandom_range(0, 7), $urandom_range(0, 7),
          $urandom_range(0, 7));
    end
    for (int k = 0; k < NPORTS; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL: result %0d never produced", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
