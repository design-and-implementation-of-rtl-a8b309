// tb_crossbar: self-checking test of the registered 7x7 crossbar.
// Random permutations (each output takes at most one input) are applied and
// each output is checked one clock later against the selected input flit,
// or the idle flit when the output was not selected.
module tb_crossbar;
  import noc3d_pkg::*;
  logic clk = 0, rst_n = 0;
  port_vec_t control [NPORTS];
  flit_t data_in [NPORTS], data_out [NPORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t exp [NPORTS];
    for (int o = 0; o < NPORTS; o++) begin control[o] = '0; data_in[o] = IDLE_FLIT; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (data_out[o] !== IDLE_FLIT) begin failures++; $display("FAIL: output %0d not idle after reset", o); end
    end
    for (int n = 0; n < 3000; n++) begin
      int perm [NPORTS];
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < NPORTS; i++) data_in[i] = flit_t'({$urandom(), $urandom(), $urandom()});
      for (int o = 0; o < NPORTS; o++) begin
        if ($urandom_range(0, 3) == 0) begin
          control[o] = '0; exp[o] = IDLE_FLIT;
        end else begin
          control[o] = port_vec_t'(1) << perm[o]; exp[o] = data_in[perm[o]];
        end
      end
      @(posedge clk);
      @(negedge clk);
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (data_out[o] !== exp[o]) begin
          failures++;
          $display("FAIL output %0d: %h expected %h", o, data_out[o], exp[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
