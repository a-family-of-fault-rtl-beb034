// ruft_flit_fifo: input buffer of one switch port.
//
// A synchronous first-in first-out queue of flits. The network sizes it to
// hold two whole packets, the buffer size used for every port of every
// topology; because flow control is credit based, the writer never pushes
// into a full queue (an assertion checks this). The head entry is shown
// combinationally on rd_flit while rd_valid is high, and rd_pop removes it at
// the clock edge. A pushed flit is visible on the next cycle. Reset
// (synchronous, active low) empties the queue.
module ruft_flit_fifo
  import ruft_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_valid,
  input  flit_t wr_flit,
  output logic  rd_valid,
  output flit_t rd_flit,
  input  logic  rd_pop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t          mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [CW-1:0]  count;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  logic do_pop;
  assign do_pop   = rd_pop && rd_valid;
  assign rd_valid = (count != '0);
  assign rd_flit  = mem[rp];

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wp] <= wr_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_valid) wp <= inc(wp);
      if (do_pop)   rp <= inc(rp);
      count <= count + CW'(wr_valid) - CW'(do_pop);
    end
  end

  // Credit flow control must never overrun the buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_valid |-> (count != CW'(DEPTH)) || do_pop);

endmodule
