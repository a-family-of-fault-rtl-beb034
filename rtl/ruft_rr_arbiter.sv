// ruft_rr_arbiter: round-robin arbiter used by every switch output port.
//
// Grants one of N requesters (one-hot grant, combinational). The requester
// just after the last winner has the highest priority, so every requester is
// served within N grants. The priority pointer moves only when update is
// high and some request was granted. Synchronous active-low reset.
module ruft_rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // index of the previous winner

  always_comb begin
    int unsigned idx;
    grant = '0;
    for (int unsigned off = 1; off <= N; off++) begin
      idx = (int'(last) + off) % N;
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last <= IW'(N - 1);
    end else if (update && grant != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last <= IW'(i);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
