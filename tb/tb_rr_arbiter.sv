// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request vectors and advance strobes are compared with a pointer
// model; a directed phase with all seven requesters active checks that
// they are served in turn 0,1,...,6,0.
module tb_rr_arbiter;
  localparam int N = 7;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [N-1:0] req = '0, grant;
  int checks = 0, failures = 0;
  int ptr_m = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_winner(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  task automatic step(logic [N-1:0] r, logic adv);
    int w;
    @(negedge clk);
    req = r; advance = adv;
    #1;
    w = model_winner(r, ptr_m);
    checks++;
    if (grant !== ((w < 0) ? '0 : (N'(1) << w))) begin
      failures++;
      $display("FAIL req=%b ptr=%0d grant=%b expected winner %0d", r, ptr_m, grant, w);
    end
    @(posedge clk);
    if (adv && w >= 0) ptr_m = (w + 1) % N;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2 * N; n++) step('1, 1'b1);
    for (int n = 0; n < 5000; n++) step(N'($urandom()), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
