// tb_noc3d_mesh: end-to-end test of the 2x2x4 mesh at its default size.
// 1. Zero-load latency: lone packets cross an empty network; a packet that
//    passes R routers must reach its destination's local output 2*R cycles
//    after it is put on the source's local input.
// 2. Random traffic with hot spots: every node sends packets of 1..4 flits
//    to random destinations (half of them to two hot-spot nodes), obeying
//    the Stall-and-Go signal of its local input; destinations refuse flits
//    at random (local_stop_in). Every packet must arrive whole at its own
//    destination, with Next-Port Local, flits in order, never interleaved
//    with another packet, packets of one source-destination pair in order,
//    and never faster than the zero-load latency.
// Counted mechanisms, each of which must occur: multi-flit wormhole
// packets, packets crossing layers over the vertical links, a full local
// input buffer (stop to the source), ejection stops, and packets delayed
// beyond zero-load latency by contention or stops.
module tb_noc3d_mesh;
  import noc3d_pkg::*;
  localparam int XD = 2, YD = 2, ZD = 4, NN = XD * YD * ZD;

  logic  clk = 0, rst_n = 0;
  flit_t local_in [NN], local_out [NN];
  logic  local_stop_in [NN], local_stop_out [NN];
  int checks = 0, failures = 0;
  int cyc = 0;

  noc3d_mesh dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nx(int n); return n % XD; endfunction
  function automatic int ny(int n); return (n / XD) % YD; endfunction
  function automatic int nz(int n); return n / (XD * YD); endfunction
  function automatic int hops(int s, int d);
    int h = 0;
    h += (nx(s) > nx(d)) ? nx(s) - nx(d) : nx(d) - nx(s);
    h += (ny(s) > ny(d)) ? ny(s) - ny(d) : ny(d) - ny(s);
    h += (nz(s) > nz(d)) ? nz(s) - nz(d) : nz(d) - nz(s);
    return h;
  endfunction
  function automatic int first_port(int s, int d);
    if (nx(d) > nx(s)) return PORT_E;
    if (nx(d) < nx(s)) return PORT_W;
    if (ny(d) > ny(s)) return PORT_N;
    if (ny(d) < ny(s)) return PORT_S;
    if (nz(d) > nz(s)) return PORT_U;
    if (nz(d) < nz(s)) return PORT_D;
    return PORT_L;
  endfunction

  // Packet bookkeeping, keyed by src*2^24 + id.
  int pkt_dest [int];
  int pkt_len  [int];
  int pkt_inj  [int];
  int pkt_got  [int];
  int next_id  [NN];
  int last_id  [NN][NN];
  int cur_key  [NN];          // packet in progress at each destination, -1 none
  flit_t src_q [NN][$];
  int injected = 0, delivered = 0, flits_out = 0;
  int n_multi = 0, n_vertical = 0, n_stop_out = 0, n_stop_in = 0, n_delayed = 0;
  logic stop_mode = 0;

  function automatic flit_t make_flit(int s, int d, int id, int k, int len);
    flit_t f;
    f.payload   = {8'(s), 24'(id), 8'(k), 8'(len), 16'($urandom())};
    f.xdest     = coord_t'(nx(d));
    f.ydest     = coord_t'(ny(d));
    f.zdest     = coord_t'(nz(d));
    f.next_port = port_vec_t'(1) << first_port(s, d);
    f.tail      = (k == len - 1);
    return f;
  endfunction

  task automatic new_packet(int s, int d, int len);
    int key;
    key = s * (1 << 24) + next_id[s];
    pkt_dest[key] = d; pkt_len[key] = len; pkt_inj[key] = -1; pkt_got[key] = 0;
    for (int k = 0; k < len; k++) src_q[s].push_back(make_flit(s, d, next_id[s], k, len));
    next_id[s]++;
    injected++;
    if (len > 1) n_multi++;
    if (nz(s) != nz(d)) n_vertical++;
  endtask

  // Drive sources at the negative edge; returns after one cycle.
  task automatic drive_sources(bit allow);
    for (int s = 0; s < NN; s++) begin
      local_in[s] = IDLE_FLIT;
      if (allow && src_q[s].size() > 0 && !local_stop_out[s]) begin
        flit_t f;
        f = src_q[s].pop_front();
        local_in[s] = f;
        if (f.payload[31:24] == 0) pkt_inj[s * (1 << 24) + int'(f.payload[55:32])] = cyc;
      end
    end
  endtask

  task automatic check_sinks();
    for (int d = 0; d < NN; d++) begin
      flit_t f;
      f = local_out[d];
      if (f.next_port != 0) begin
        int s, id, k, key;
        s = int'(f.payload[63:56]); id = int'(f.payload[55:32]); k = int'(f.payload[31:24]);
        key = s * (1 << 24) + id;
        flits_out++;
        checks++;
        if (!pkt_dest.exists(key)) begin
          failures++; $display("FAIL: unknown flit %h at node %0d", f, d); continue;
        end
        if (pkt_dest[key] != d || f.next_port != port_onehot(PORT_L) ||
            f.xdest != coord_t'(nx(d)) || f.ydest != coord_t'(ny(d)) || f.zdest != coord_t'(nz(d)) ||
            k != pkt_got[key] || f.tail != (k == pkt_len[key] - 1) ||
            (cur_key[d] >= 0 && cur_key[d] != key)) begin
          failures++;
          $display("FAIL at node %0d: flit %h (src %0d id %0d flit %0d) out of place", d, f, s, id, k);
        end
        if (k == 0) begin
          int lat, zl;
          lat = cyc - pkt_inj[key];
          zl = 2 * (hops(s, d) + 1);
          checks++;
          if (lat < zl || id <= last_id[s][d]) begin
            failures++;
            $display("FAIL: packet %0d->%0d id %0d latency %0d (zero-load %0d), last id %0d",
                     s, d, id, lat, zl, last_id[s][d]);
          end
          if (lat > zl) n_delayed++;
          last_id[s][d] = id;
        end
        pkt_got[key]++;
        cur_key[d] = f.tail ? -1 : key;
        if (f.tail) delivered++;
      end
    end
  endtask

  task automatic cycle(bit allow, bit stops);
    @(negedge clk);
    check_sinks();
    drive_sources(allow);
    for (int d = 0; d < NN; d++) begin
      local_stop_in[d] = stops && stop_mode && ($urandom_range(0, 2) == 0);
      if (local_stop_in[d]) n_stop_in++;
      if (local_stop_out[d]) n_stop_out++;
    end
  endtask

  initial begin
    for (int n = 0; n < NN; n++) begin
      local_in[n] = IDLE_FLIT; local_stop_in[n] = 0; cur_key[n] = -1; next_id[n] = 0;
      for (int m = 0; m < NN; m++) last_id[n][m] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. zero-load latency ----
    begin
      int pairs [4][2] = '{'{0, NN - 1}, '{NN - 1, 0}, '{NN / 2, NN / 2}, '{XD - 1, NN - XD}};
      for (int p = 0; p < 4; p++) begin
        int s, d, key, t_end;
        s = pairs[p][0]; d = pairs[p][1];
        key = s * (1 << 24) + next_id[s];
        new_packet(s, d, 1);
        cycle(1, 0);
        t_end = cyc + 40;
        while (pkt_got[key] == 0 && cyc < t_end) cycle(0, 0);
        checks++;
        if (pkt_got[key] != 1 || cyc - pkt_inj[key] != 2 * (hops(s, d) + 1)) begin
          failures++;
          $display("FAIL: lone packet %0d->%0d latency %0d, expected %0d", s, d,
                   cyc - pkt_inj[key], 2 * (hops(s, d) + 1));
        end
      end
    end

    // ---- 2. random traffic with hot spots ----
    for (int n = 0; n < 6000; n++) begin
      stop_mode = (n % 1000) < 300;
      for (int s = 0; s < NN; s++) begin
        if (n < 5000 && src_q[s].size() < 12 && $urandom_range(0, 7) == 0) begin
          int d;
          d = ($urandom_range(0, 1) == 0) ? (($urandom_range(0, 1) == 0) ? XD - 1 : NN - XD)
                                          : $urandom_range(0, NN - 1);
          new_packet(s, d, $urandom_range(1, 4));
        end
      end
      cycle(1, 1);
    end
    for (int n = 0; n < 3000 && delivered < injected; n++) cycle(1, 0);

    checks++;
    if (delivered != injected) begin
      failures++; $display("FAIL: %0d of %0d packets delivered", delivered, injected);
    end
    checks += 5;
    if (n_multi == 0)    begin failures++; $display("FAIL: no multi-flit packet"); end
    if (n_vertical == 0) begin failures++; $display("FAIL: no packet crossed layers"); end
    if (n_stop_out == 0) begin failures++; $display("FAIL: no local input buffer filled"); end
    if (n_stop_in == 0)  begin failures++; $display("FAIL: no ejection stop"); end
    if (n_delayed == 0)  begin failures++; $display("FAIL: no packet delayed by contention"); end
    $display("packets=%0d flits=%0d multi=%0d vertical=%0d stop_out=%0d stop_in=%0d delayed=%0d",
             delivered, flits_out, n_multi, n_vertical, n_stop_out, n_stop_in, n_delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
