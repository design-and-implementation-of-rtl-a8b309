// tb_tail_sent_detect: self-checking test of the Tail and Sent detectors.
// Random flits, some idle, some tails, are checked against the rule:
// sent = Next-Port non-zero, tail = sent and bit 0.
module tb_tail_sent_detect;
  import noc3d_pkg::*;
  flit_t data_out [NPORTS];
  port_vec_t data_sent, tail_sent;
  int checks = 0, failures = 0;

  tail_sent_detect dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      port_vec_t es, et;
      for (int o = 0; o < NPORTS; o++) begin
        data_out[o] = flit_t'({$urandom(), $urandom(), $urandom()});
        if ($urandom_range(0, 2) == 0) data_out[o].next_port = '0;
        es[o] = (data_out[o].next_port != 0);
        et[o] = es[o] && data_out[o].tail;
      end
      #1;
      checks++;
      if (data_sent !== es || tail_sent !== et) begin
        failures++;
        $display("FAIL sent=%b/%b tail=%b/%b", data_sent, es, tail_sent, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
