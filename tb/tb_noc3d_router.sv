// tb_noc3d_router: self-checking test of one seven-port router at (2,2,2).
// 1. Latency: a lone one-flit packet written at a clock edge must appear on
//    its output after the next edge (two cycles through the router).
// 1b. Rate: a four-flit packet entering on consecutive cycles leaves one
//    flit every second cycle (the allocator waits for each flit's tail status).
// 2. Random traffic: every input injects packets of 1..4 flits to random
//    destinations within 0..4 in each dimension, with Next-Port set to the
//    XYZ output at this router. Outputs see random downstream stops. Each flit
//    out is matched to the packet it belongs to: right output, rewritten
//    Next-Port equal to the reference look-ahead route, flits of a packet in
//    order and never interleaved with another packet on the same output.
// The test counts output contention, downstream stops and full input
// buffers (stop_out), and fails if any of them never happened. No flit may
// leave on an output in the cycle after that output's stop_in was high.
module tb_noc3d_router;
  import noc3d_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t xaddr = 3'd2, yaddr = 3'd2, zaddr = 3'd2;
  flit_t data_in [NPORTS], data_out [NPORTS];
  port_vec_t stop_in = '0, stop_out;
  int checks = 0, failures = 0;
  int n_contention = 0, n_stop_in = 0, n_stop_out = 0, n_flits = 0;

  noc3d_router dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xyz_port(int x, int y, int z, int xd, int yd, int zd);
    if (xd > x) return PORT_E;
    if (xd < x) return PORT_W;
    if (yd > y) return PORT_N;
    if (yd < y) return PORT_S;
    if (zd > z) return PORT_U;
    if (zd < z) return PORT_D;
    return PORT_L;
  endfunction

  function automatic int look_ahead(int p, int xd, int yd, int zd);
    int x = 2, y = 2, z = 2;
    if (p == PORT_L) return PORT_L;
    if (p == PORT_E) x++;
    if (p == PORT_W) x--;
    if (p == PORT_N) y++;
    if (p == PORT_S) y--;
    if (p == PORT_U) z++;
    if (p == PORT_D) z--;
    return xyz_port(x, y, z, xd, yd, zd);
  endfunction

  // Payload tag: [63:56] input, [55:32] packet id, [31:24] flit index, [23:16] length.
  function automatic flit_t make_flit(int in, int id, int k, int len, int xd, int yd, int zd);
    flit_t f;
    f.payload   = {8'(in), 24'(id), 8'(k), 8'(len), 16'($urandom())};
    f.xdest     = coord_t'(xd);
    f.ydest     = coord_t'(yd);
    f.zdest     = coord_t'(zd);
    f.next_port = port_vec_t'(1) << xyz_port(2, 2, 2, xd, yd, zd);
    f.tail      = (k == len - 1);
    return f;
  endfunction

  flit_t src_q [NPORTS][$];       // flits waiting to enter each input
  flit_t exp_q [NPORTS][$];       // flits expected, per input, in order
  int    out_in  [NPORTS];        // input whose packet is in progress on output o
  int    pkt_cnt [NPORTS];

  task automatic check_outputs();
    for (int o = 0; o < NPORTS; o++) begin
      flit_t f;
      f = data_out[o];
      if (f.next_port != 0) begin
        int in;
        flit_t e;
        in = int'(f.payload[63:56]);
        n_flits++;
        checks++;
        if (in >= NPORTS || exp_q[in].size() == 0) begin
          failures++; $display("FAIL: unexpected flit %h on output %0d", f, o);
          continue;
        end
        e = exp_q[in].pop_front();
        e.next_port = port_vec_t'(1) << look_ahead(xyz_port(2, 2, 2, e.xdest, e.ydest, e.zdest),
                                                   e.xdest, e.ydest, e.zdest);
        // A flit on output o was granted in the cycle before, when stop_in[o] had to be low.
        if (f !== e || o != xyz_port(2, 2, 2, e.xdest, e.ydest, e.zdest) || stop_in[o] ||
            (out_in[o] >= 0 && out_in[o] != in)) begin
          failures++;
          $display("FAIL output %0d: got %h expected %h (owner %0d, stop %0b)", o, f, e, out_in[o], stop_in[o]);
        end
        out_in[o] = f.tail ? -1 : in;
      end
    end
  endtask

  initial begin
    int t0, lat;
    for (int p = 0; p < NPORTS; p++) begin data_in[p] = IDLE_FLIT; out_in[p] = -1; pkt_cnt[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- 1. latency of a lone flit from South to Up ----
    @(negedge clk);
    data_in[PORT_S] = make_flit(PORT_S, 0, 0, 1, 2, 2, 4);
    exp_q[PORT_S].push_back(data_in[PORT_S]);
    @(posedge clk); t0 = $time;
    @(negedge clk); data_in[PORT_S] = IDLE_FLIT;
    lat = 0;
    while (data_out[PORT_U].next_port == 0 && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 1) begin failures++; $display("FAIL: lone flit appeared after %0d extra cycles, expected 1", lat); end
    check_outputs();
    // ---- 1b. rate: a four-flit packet written on four consecutive edges
    //          leaves its output one flit every second cycle ----
    begin
      int seen_at [4];
      int k_out;
      k_out = 0;
      // Negedge t = 0..3 drives flit t; flit 0 is written at the next edge and
      // is expected on the East output at negedge 2, then every 2 cycles.
      for (int t = 0; t < 16 && k_out < 4; t++) begin
        @(negedge clk);
        if (data_out[PORT_E].next_port != 0) begin seen_at[k_out] = t; k_out++; end
        check_outputs();
        if (t < 4) begin
          data_in[PORT_W] = make_flit(PORT_W, 1, t, 4, 4, 2, 2);
          exp_q[PORT_W].push_back(data_in[PORT_W]);
        end else begin
          data_in[PORT_W] = IDLE_FLIT;
        end
      end
      checks++;
      if (k_out != 4 || seen_at[0] != 2 || seen_at[1] != 4 || seen_at[2] != 6 || seen_at[3] != 8) begin
        failures++;
        $display("FAIL: four-flit packet out at %0d,%0d,%0d,%0d (expected 2,4,6,8), %0d flits",
                 seen_at[0], seen_at[1], seen_at[2], seen_at[3], k_out);
      end
    end
    // ---- 2. random traffic ----
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      check_outputs();
            // Two inputs whose oldest buffered flits head for the same output.
      for (int o = 0; o < NPORTS; o++) begin
        int r;
        r = 0;
        for (int i = 0; i < NPORTS; i++)
          if (exp_q[i].size() > src_q[i].size() && exp_q[i][0].next_port[o]) r++;
        if (r > 1) n_contention++;
      end
      if (stop_out != 0) n_stop_out++;
      // New packets.
      for (int i = 0; i < NPORTS; i++) begin
        if (n < 7000 && src_q[i].size() < 8 && $urandom_range(0, 5) == 0) begin
          int len, xd, yd, zd;
          len = $urandom_range(1, 4);
          xd = $urandom_range(0, 4); yd = $urandom_range(0, 4); zd = $urandom_range(0, 4);
          for (int k = 0; k < len; k++) begin
            flit_t f;
            f = make_flit(i, pkt_cnt[i], k, len, xd, yd, zd);
            src_q[i].push_back(f);
            exp_q[i].push_back(f);
          end
          pkt_cnt[i]++;
        end
        // Stall-and-Go: send only while the input is not full.
        if (src_q[i].size() > 0 && !stop_out[i] && $urandom_range(0, 3) != 0)
          data_in[i] = src_q[i].pop_front();
        else
          data_in[i] = IDLE_FLIT;
      end
      stop_in = (n < 6000) ? port_vec_t'($urandom() & $urandom()) : '0;
      if (stop_in != 0) n_stop_in++;
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) data_in[i] = IDLE_FLIT;
      check_outputs();
    end
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (exp_q[i].size() != 0 || src_q[i].size() != 0) begin
        failures++; $display("FAIL: input %0d has %0d flits undelivered", i, exp_q[i].size());
      end
    end
    checks += 3;
    if (n_contention == 0) begin failures++; $display("FAIL: no output contention"); end
    if (n_stop_in == 0)    begin failures++; $display("FAIL: no downstream stop"); end
    if (n_stop_out == 0)   begin failures++; $display("FAIL: no input buffer filled"); end
    $display("flits=%0d contention=%0d stop_in=%0d stop_out=%0d", n_flits, n_contention, n_stop_in, n_stop_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
