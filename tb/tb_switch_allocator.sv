// tb_switch_allocator: self-checking test of the switch allocator.
// Phase 1 is directed: two inputs compete for one output (round-robin
// winner, then the output is held until the winner's tail comes back on
// tail_sent), a stop from downstream withholds grants, a flit on the output
// (data_sent) withholds the next grant for one cycle, and two inputs heading
// for different outputs are granted in the same cycle.
// Phase 2 is random: seven input queues of random packets are served by the
// allocator while the test plays the crossbar (a granted flit appears on the
// output one cycle later, driving data_sent and tail_sent) and a random
// downstream stop. Every grant is checked against the wormhole rules, and
// every packet must come out whole, in order, on the output it asked for.
module tb_switch_allocator;
  import noc3d_pkg::*;
  logic clk = 0, rst_n = 0;
  port_vec_t sw_req, stop_in, data_sent, tail_sent, grant_out;
  port_vec_t port_req [NPORTS];
  port_vec_t sw_cntrl [NPORTS];
  int checks = 0, failures = 0;

  switch_allocator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    sw_req = '0; stop_in = '0; data_sent = '0; tail_sent = '0;
    for (int i = 0; i < NPORTS; i++) port_req[i] = '0;
  endtask

  task automatic expect_grant(string tag, int o, int i);
    checks++;
    if (sw_cntrl[o] !== ((i < 0) ? port_vec_t'(0) : port_vec_t'(1) << i)) begin
      failures++;
      $display("FAIL %s: output %0d selects %b, expected input %0d", tag, o, sw_cntrl[o], i);
    end
  endtask

  // ---------------- random phase model ----------------
  typedef struct { int out; int len; int id; } pkt_t;
  pkt_t   q [NPORTS][$];     // packets waiting at each input
  int     sent_in_pkt [NPORTS];
  int     next_id [NPORTS];
  int     out_owner [NPORTS];  // -1 when no packet in progress on output
  int     out_pkt   [NPORTS];
  int     delivered = 0, total = 0;
  logic   link_valid [NPORTS];
  logic   link_tail  [NPORTS];

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Directed 1: inputs 1 and 3 both want East; pointer starts at 0 -> input 1.
    @(negedge clk);
    sw_req = 7'b0001010;
    port_req[1] = port_onehot(PORT_E);
    port_req[3] = port_onehot(PORT_E);
    #1 expect_grant("compete", PORT_E, 1);
    checks++;
    if (grant_out !== 7'b0000010) begin failures++; $display("FAIL grant_out=%b", grant_out); end
    // Body flit on the link: blocked this cycle.
    @(negedge clk); data_sent = port_onehot(PORT_E);
    #1 expect_grant("data_sent blocks", PORT_E, -1);
    // Link idle: output held by input 1 although input 3 still asks.
    @(negedge clk); data_sent = '0;
    #1 expect_grant("held by owner", PORT_E, 1);
    // Downstream stop withholds the grant.
    @(negedge clk); data_sent = port_onehot(PORT_E); @(negedge clk); data_sent = '0;
    stop_in = port_onehot(PORT_E);
    #1 expect_grant("stop", PORT_E, -1);
    stop_in = '0;
    #1 expect_grant("stop released", PORT_E, 1);
    // Tail comes back: output freed, next cycle input 3 wins.
    @(negedge clk); data_sent = port_onehot(PORT_E); tail_sent = port_onehot(PORT_E);
    #1 expect_grant("tail cycle", PORT_E, -1);
    @(negedge clk); data_sent = '0; tail_sent = '0;
    #1 expect_grant("round robin", PORT_E, 3);
    // Parallel grants: input 0 to Up while input 3 holds East.
    sw_req[0] = 1'b1; port_req[0] = port_onehot(PORT_U);
    #1 expect_grant("parallel U", PORT_U, 0);
    expect_grant("parallel E", PORT_E, 3);
    checks++;
    if (grant_out !== 7'b0001001) begin failures++; $display("FAIL parallel grant_out=%b", grant_out); end
    // Clean up: send tails on both outputs.
    @(negedge clk); idle_inputs(); data_sent = 7'b0110000; tail_sent = 7'b0110000;
    @(negedge clk); idle_inputs();
    #1 for (int o = 0; o < NPORTS; o++) expect_grant("idle", o, -1);

    // ---------------- random phase ----------------
    for (int i = 0; i < NPORTS; i++) begin
      sent_in_pkt[i] = 0; next_id[i] = 0;
      out_owner[i] = -1; out_pkt[i] = -1;
      link_valid[i] = 0; link_tail[i] = 0;
    end
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // New packets.
      for (int i = 0; i < NPORTS; i++) begin
        if (q[i].size() < 3 && $urandom_range(0, 9) == 0) begin
          pkt_t p;
          p.out = $urandom_range(0, NPORTS - 1);
          p.len = $urandom_range(1, 4);
          p.id  = next_id[i]++;
          q[i].push_back(p);
          total++;
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        sw_req[i]   = (q[i].size() > 0);
        port_req[i] = (q[i].size() > 0) ? port_vec_t'(1) << q[i][0].out : '0;
      end
      for (int o = 0; o < NPORTS; o++) begin
        data_sent[o] = link_valid[o];
        tail_sent[o] = link_valid[o] && link_tail[o];
        stop_in[o]   = ($urandom_range(0, 4) == 0);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        link_valid[o] = 0; link_tail[o] = 0;
        if (sw_cntrl[o] != 0) begin
          int i;
          i = $clog2(sw_cntrl[o]);
          checks++;
          if (!$onehot(sw_cntrl[o]) || stop_in[o] || data_sent[o] || q[i].size() == 0 ||
              q[i][0].out != o || !grant_out[i] ||
              (out_owner[o] >= 0 && (out_owner[o] != i || out_pkt[o] != q[i][0].id))) begin
            failures++;
            $display("FAIL random cycle %0d: output %0d granted %b illegally", n, o, sw_cntrl[o]);
          end else begin
            out_owner[o] = i; out_pkt[o] = q[i][0].id;
            sent_in_pkt[i]++;
            link_valid[o] = 1;
            if (sent_in_pkt[i] == q[i][0].len) begin
              link_tail[o] = 1;
              sent_in_pkt[i] = 0;
              void'(q[i].pop_front());
              out_owner[o] = -1;
              delivered++;
            end
          end
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        int hits;
        hits = 0;
        for (int o = 0; o < NPORTS; o++) if (sw_cntrl[o][i]) hits++;
        checks++;
        if (grant_out[i] !== (hits == 1) || hits > 1) begin
          failures++; $display("FAIL random cycle %0d: grant_out[%0d] inconsistent", n, i);
        end
      end
    end
    // Drain without new packets or stops.
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        sw_req[i]   = (q[i].size() > 0);
        port_req[i] = (q[i].size() > 0) ? port_vec_t'(1) << q[i][0].out : '0;
      end
      for (int o = 0; o < NPORTS; o++) begin
        data_sent[o] = link_valid[o];
        tail_sent[o] = link_valid[o] && link_tail[o];
        stop_in[o]   = 0;
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        link_valid[o] = 0; link_tail[o] = 0;
        if (sw_cntrl[o] != 0) begin
          int i;
          i = $clog2(sw_cntrl[o]);
          sent_in_pkt[i]++;
          link_valid[o] = 1;
          if (sent_in_pkt[i] == q[i][0].len) begin
            link_tail[o] = 1; sent_in_pkt[i] = 0; void'(q[i].pop_front()); delivered++;
          end
        end
      end
    end
    checks++;
    if (delivered != total) begin
      failures++; $display("FAIL: %0d of %0d packets delivered", delivered, total);
    end
    $display("packets delivered: %0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
