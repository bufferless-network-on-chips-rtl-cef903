// dec_inj_queue: one network-interface injection queue (first in, first out)
// of DEPTH flits, one per subnetwork. push writes a flit at the tail; the
// head is visible on head/head_valid and leaves on pop (the router's
// injection grant). Push and pop may happen in the same cycle. count is the
// number of flits held. Storage is a plain register array.
//
// One queue per subnetwork follows the original design; the depth is this
// design's choice.
module dec_inj_queue
  import dec_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  flit_t                  din,
  input  logic                   pop,
  output flit_t                  head,
  output logic                   head_valid,
  output logic                   full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;

  assign head_valid = (count != '0);
  assign full       = (count == ($clog2(DEPTH+1))'(DEPTH));

  always_comb begin
    head       = mem[rd_ptr];
    head.valid = head_valid;
  end

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop && head_valid) rd_ptr <= inc(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(push && !full)
                     - ($clog2(DEPTH+1))'(pop && head_valid);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full));

endmodule
