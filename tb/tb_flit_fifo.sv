// tb_flit_fifo: self-checking test of the four-entry flit FIFO.
// Random writes and reads (never writing when full or reading when empty)
// are compared with a queue model: head data, empty, full, and first-word
// fall-through. A directed phase fills the FIFO to check the depth of four.
module tb_flit_fifo;
  localparam int W = 81;
  localparam int D = 4;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic         empty, full;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_word();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  task automatic check_state(string tag);
    checks++;
    if (empty !== (model.size() == 0) || full !== (model.size() == D)) begin
      failures++;
      $display("FAIL %s: empty=%0b full=%0b model size=%0d", tag, empty, full, model.size());
    end
    if (model.size() != 0) begin
      checks++;
      if (rd_data !== model[0]) begin
        failures++;
        $display("FAIL %s: head %h expected %h", tag, rd_data, model[0]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state("after reset");
    // Fill to the depth, then one more cycle must show full.
    for (int i = 0; i < D; i++) begin
      wr_en = 1; wr_data = rnd_word();
      @(posedge clk); model.push_back(wr_data);
      @(negedge clk); wr_en = 0;
      check_state("fill");
    end
    checks++;
    if (!full) begin failures++; $display("FAIL: not full after %0d writes", D); end
    // Simultaneous read and write while full keeps it full.
    wr_en = 1; rd_en = 1; wr_data = rnd_word();
    @(posedge clk); void'(model.pop_front()); model.push_back(wr_data);
    @(negedge clk); wr_en = 0; rd_en = 0;
    check_state("rw when full");
    // Random traffic.
    for (int n = 0; n < 3000; n++) begin
      wr_en = ($urandom_range(0, 1) == 1) && (model.size() < D);
      rd_en = ($urandom_range(0, 1) == 1) && (model.size() > 0);
      wr_data = rnd_word();
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      check_state("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
