// switch_allocator: decides which input port may use which output port, and
// when (switch allocation stage).
//
// For each output o, the inputs requesting it are those with sw_req high and
// bit o set in port_req. A free output picks one of them with its own
// round-robin arbiter (rr_arbiter) and is then held by that input for the
// whole packet (wormhole switching): while held, only the owning input is
// granted, and only when its head flit still asks for o. The hold ends when
// the crossbar reports the packet's tail on that output (tail_sent).
// An output is Blocked in a cycle when the downstream router signals stop
// (Stall-and-Go) or when a flit was on the output in the previous cycle
// (data_sent): the allocator learns whether that flit was the tail only from
// tail_sent one cycle later, so it waits for it before granting the output
// again. One flit therefore leaves an output at most every second cycle.
// Outputs: sw_cntrl[o] is the one-hot input that output o takes this cycle
// (all zero for none; 7x7 = 49 bits), and grant_out[i] tells input i that
// its head flit leaves now. Both are combinational from the inputs and the
// hold registers. The hold register per output and the exact use of the
// Blocked signal are this design's reading of the published allocator
// diagram, which prints the signals but not the logic between them.
module switch_allocator
  import noc3d_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  port_vec_t sw_req,               // per input: holds a flit
  input  port_vec_t port_req  [NPORTS],   // per input: one-hot output wanted
  input  port_vec_t stop_in,              // per output: downstream stop
  input  port_vec_t data_sent,            // per output: flit on the output
  input  port_vec_t tail_sent,            // per output: tail on the output
  output port_vec_t sw_cntrl  [NPORTS],   // per output: one-hot input select
  output port_vec_t grant_out             // per input: head flit dequeued
);

  port_vec_t locked;
  port_vec_t owner     [NPORTS];
  port_vec_t arb_req   [NPORTS];
  port_vec_t arb_grant [NPORTS];
  port_vec_t blocked;

  assign blocked = stop_in | data_sent;

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NPORTS; i++) begin
        arb_req[o][i] = sw_req[i] && port_req[i][o];
      end
    end

    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (locked[o] ? '0 : arb_req[o]),
      .advance (!locked[o] && !blocked[o]),
      .grant   (arb_grant[o])
    );

    always_comb begin
      if (blocked[o])     sw_cntrl[o] = '0;
      else if (locked[o]) sw_cntrl[o] = owner[o] & arb_req[o];
      else                sw_cntrl[o] = arb_grant[o];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
      end else if (locked[o]) begin
        if (tail_sent[o]) begin
          locked[o] <= 1'b0;
          owner[o]  <= '0;
        end
      end else if (|sw_cntrl[o]) begin
        locked[o] <= 1'b1;
        owner[o]  <= sw_cntrl[o];
      end
    end
  end

  always_comb begin
    grant_out = '0;
    for (int o = 0; o < NPORTS; o++) begin
      grant_out |= sw_cntrl[o];
    end
  end

  // Each output takes at most one input, and each input leaves on at most one output.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_onehot_out: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sw_cntrl[o]))
      else $error("switch_allocator: output %0d selects several inputs", o);
  end

endmodule
