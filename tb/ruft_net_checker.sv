// ruft_net_checker: traffic source and scoreboard for ft_ruft_network tests.
//
// After start, every end node offers PKTS packets (one offer attempt per
// cycle with probability RATE/100) to destinations drawn from the synthetic
// pattern PATTERN: 0 uniform (any other node), 1 hot-spot (15% of packets to
// one hot node, the rest uniform), 2 complement (all address bits
// inverted), 3 shuffle (address rotated left by one bit). The head payload
// carries the source node; the scoreboard counts packets per source and
// destination and checks, as they are delivered, that no packet arrives at a
// node it was not sent to, that the interface saw no framing error, and at
// the end that every packet arrived exactly once. done rises when all
// packets are delivered or TIMEOUT cycles have passed after start.
module ruft_net_checker
  import ruft_pkg::*;
#(
  parameter int unsigned NNODE   = 8,
  parameter int unsigned PATTERN = 0,
  parameter int unsigned PKTS    = 4,
  parameter int unsigned RATE    = 20,
  parameter int unsigned TIMEOUT = 20000,
  parameter int unsigned HOT     = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              tx_valid [NNODE],
  output logic [NODE_W-1:0] tx_dest  [NNODE],
  output logic [DATA_W-1:0] tx_data  [NNODE],
  input  logic              tx_ready [NNODE],
  input  logic              tx_link  [NNODE],
  input  logic              rx_valid [NNODE][2],
  input  logic [DATA_W-1:0] rx_data  [NNODE][2],
  input  logic              rx_err   [NNODE][2],
  output logic              done,
  output int                checks,
  output int                failures,
  output int                n_sent,
  output int                n_recv,
  output int                n_inj_link1,
  output int                n_ej_link1,
  output int                cycles
);

  localparam int unsigned NB = $clog2(NNODE);

  int  left [NNODE];
  int  sent [NNODE][NNODE];
  int  recv [NNODE][NNODE];
  bit  running;
  bit  taken [NNODE];

  function automatic int pick_dest(int src);
    int d;
    case (PATTERN)
      1: begin
        if ($urandom % 100 < 15) d = HOT;
        else d = int'($urandom % NNODE);
      end
      2: d = int'(~src & (NNODE - 1));
      3: d = ((src << 1) | (src >> (NB - 1))) & (NNODE - 1);
      default: d = int'($urandom % NNODE);
    endcase
    if (d == src && PATTERN != 2 && PATTERN != 3) d = (d + 1) % NNODE;
    return d;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0; n_sent = 0; n_recv = 0;
    n_inj_link1 = 0; n_ej_link1 = 0; cycles = 0; running = 0;
    for (int p = 0; p < int'(NNODE); p++) begin
      tx_valid[p] = 0; tx_dest[p] = '0; tx_data[p] = '0; left[p] = PKTS; taken[p] = 0;
      for (int q = 0; q < int'(NNODE); q++) begin sent[p][q] = 0; recv[p][q] = 0; end
    end
  end

  always @(posedge clk) begin
    if (rst_n && start && !done) begin
      running = 1;
      cycles++;
      // bookkeeping of the previous offers
      for (int p = 0; p < int'(NNODE); p++) begin
        if (tx_valid[p] && tx_ready[p]) begin
          sent[p][int'(tx_dest[p])]++;
          n_sent++;
          left[p]--;
          if (tx_link[p]) n_inj_link1++;
          taken[p] = 1;
        end
        for (int c = 0; c < 2; c++)
          if (rx_valid[p][c]) begin
            int s;
            s = int'(rx_data[p][c]) % NNODE;
            checks++;
            n_recv++;
            if (c == 1) n_ej_link1++;
            if (rx_err[p][c]) begin
              failures++; $display("FAIL: framing error at node %0d link %0d", p, c);
            end
            recv[s][p]++;
            if (recv[s][p] > sent[s][p]) begin
              failures++; $display("FAIL: node %0d got an unexpected packet from %0d", p, s);
            end
          end
      end
      // accepted offers are withdrawn and new ones made just after the edge
      #1;
      for (int p = 0; p < int'(NNODE); p++)
        if (taken[p]) begin
          tx_valid[p] = 0;
          taken[p]    = 0;
        end
      for (int p = 0; p < int'(NNODE); p++)
        if (!tx_valid[p] && left[p] > 0 && ($urandom % 100) < RATE) begin
          tx_valid[p] = 1;
          tx_dest[p]  = NODE_W'(pick_dest(p));
          tx_data[p]  = DATA_W'(p);
        end
      if ((n_recv == int'(NNODE * PKTS)) || cycles >= int'(TIMEOUT)) begin
        for (int p = 0; p < int'(NNODE); p++) tx_valid[p] = 0;
        for (int p = 0; p < int'(NNODE); p++)
          for (int q = 0; q < int'(NNODE); q++) begin
            checks++;
            if (sent[p][q] != recv[p][q]) begin
              failures++;
              $display("FAIL: %0d->%0d sent %0d received %0d", p, q, sent[p][q], recv[p][q]);
            end
          end
        checks++;
        if (n_sent != int'(NNODE * PKTS)) begin
          failures++; $display("FAIL: only %0d of %0d packets injected", n_sent, NNODE * PKTS);
        end
        done = 1;
      end
    end
  end

endmodule
