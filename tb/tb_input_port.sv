// tb_input_port: self-checking test of one router input port.
// The port sits at (2,2,2). Random flits (random Next-Port, destination and
// payload) are written while the port is not full and removed by random
// grants. Each cycle the test checks sw_req, port_req (the head's Next-Port),
// stop_out (high exactly when four flits are held) and data_out: the head
// flit with its Next-Port replaced by the reference look-ahead XYZ route.
// Idle input flits (Next-Port zero) must not be stored.
module tb_input_port;
  import noc3d_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t xaddr = 3'd2, yaddr = 3'd2, zaddr = 3'd2;
  flit_t data_in = IDLE_FLIT, data_out;
  logic sw_grant = 0, stop_out, sw_req;
  port_vec_t port_req;
  int checks = 0, failures = 0, stops = 0;
  flit_t model [$];

  input_port dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic port_vec_t ref_route(flit_t f);
    int xn = xaddr, yn = yaddr, zn = zaddr;
    if (f.next_port[PORT_L]) return port_vec_t'(1) << PORT_L;
    if (f.next_port[PORT_E]) xn++;
    if (f.next_port[PORT_W]) xn--;
    if (f.next_port[PORT_N]) yn++;
    if (f.next_port[PORT_S]) yn--;
    if (f.next_port[PORT_U]) zn++;
    if (f.next_port[PORT_D]) zn--;
    if (f.xdest > xn) return port_vec_t'(1) << PORT_E;
    if (f.xdest < xn) return port_vec_t'(1) << PORT_W;
    if (f.ydest > yn) return port_vec_t'(1) << PORT_N;
    if (f.ydest < yn) return port_vec_t'(1) << PORT_S;
    if (f.zdest > zn) return port_vec_t'(1) << PORT_U;
    if (f.zdest < zn) return port_vec_t'(1) << PORT_D;
    return port_vec_t'(1) << PORT_L;
  endfunction

  task automatic check(string tag);
    flit_t exp;
    checks++;
    if (sw_req !== (model.size() > 0) || stop_out !== (model.size() == 4)) begin
      failures++;
      $display("FAIL %s: sw_req=%0b stop_out=%0b held=%0d", tag, sw_req, stop_out, model.size());
    end
    if (stop_out) stops++;
    if (model.size() > 0) begin
      exp = model[0];
      exp.next_port = ref_route(model[0]);
      checks++;
      if (port_req !== model[0].next_port || data_out !== exp) begin
        failures++;
        $display("FAIL %s: port_req=%b exp %b data_out=%h exp %h", tag, port_req,
                 model[0].next_port, data_out, exp);
      end
    end else begin
      checks++;
      if (port_req !== '0 || data_out !== IDLE_FLIT) begin
        failures++; $display("FAIL %s: empty port not idle", tag);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset");
    for (int n = 0; n < 4000; n++) begin
      flit_t f;
      f = flit_t'({$urandom(), $urandom(), $urandom()});
      f.next_port = port_vec_t'(1) << $urandom_range(0, NPORTS - 1);
      f.xdest = coord_t'($urandom_range(0, 4));
      f.ydest = coord_t'($urandom_range(0, 4));
      f.zdest = coord_t'($urandom_range(0, 4));
      if ($urandom_range(0, 3) == 0) f.next_port = '0;      // idle link cycle
      // Writes outrun reads in the first half so the buffer fills up.
      if (model.size() == 4 || $urandom_range(0, 2) == 0) f = IDLE_FLIT;
      data_in  = f;
      sw_grant = (model.size() > 0) && ($urandom_range(0, 9) < ((n < 2000) ? 3 : 7));
      @(posedge clk);
      if (sw_grant) void'(model.pop_front());
      if (f.next_port != 0) model.push_back(f);
      @(negedge clk);
      data_in = IDLE_FLIT; sw_grant = 0;
      check("random");
    end
    checks++;
    if (stops == 0) begin failures++; $display("FAIL: buffer never filled"); end
    $display("stop_out high in %0d cycles", stops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
