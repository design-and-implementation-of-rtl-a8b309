// flit_fifo: the input buffer of one router port.
//
// A first-word-fall-through FIFO of DEPTH entries, WIDTH bits each (four
// 81-bit flits by default, the published buffer size). rd_data always shows
// the oldest entry; rd_en removes it at the next clock edge. wr_en stores
// wr_data at the next edge. Writing and reading in the same cycle is allowed,
// also when the FIFO is full. full and empty come from a registered count,
// so they change one cycle after the write or read that causes them.
// The register-array storage with wrapping read and write pointers and the
// active-low synchronous reset are this design's choices.
module flit_fifo #(
  parameter int unsigned WIDTH = 81,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  wire do_wr = wr_en && (!full || rd_en);
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  assign rd_data = mem[rd_ptr];
  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));

  // Stall-and-Go must keep the upstream router from writing into a full buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("flit_fifo: write into full buffer");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("flit_fifo: read from empty buffer");

endmodule
