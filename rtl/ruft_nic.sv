// ruft_nic: network interface of one end node, with two injection links and
// two ejection links.
//
// Transmit: the node offers a packet (tx_valid, tx_dest, tx_data) and the
// interface accepts it (tx_ready high in the same cycle) when at least one
// injection link is idle, not faulty on the way to tx_dest (inj_reach) and
// has room for the whole packet in the switch input buffer it feeds (credit
// count). Among such links it takes the one with more free buffer, and picks
// one at random (LFSR) when both have the same room. The packet then leaves
// as PKT_FLITS flits, one per cycle, starting the cycle after acceptance;
// the two links send independently, so a node can inject up to two flits per
// cycle. The head flit carries tx_data, flit f carries tx_data + f.
//
// Receive: both ejection links are sunk at full rate and every flit returns a
// credit. When a tail flit arrives, rx_valid[c] pulses for one cycle with the
// head flit's payload in rx_data[c]; rx_err[c] flags a packet that was not
// addressed to this node, did not have PKT_FLITS flits or had no head.
//
// The dual injection, the most-free-buffer choice and the random tie break
// follow the topology description; framing, payload format and checks are
// this design's choices.
module ruft_nic
  import ruft_pkg::*;
#(
  parameter int unsigned NODE      = 0,
  parameter int unsigned NNODE     = 64,
  parameter int unsigned PKT_FLITS = 16,
  parameter int unsigned BUF_PKTS  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // node side, transmit
  input  logic              tx_valid,
  input  logic [NODE_W-1:0] tx_dest,
  input  logic [DATA_W-1:0] tx_data,
  output logic              tx_ready,
  output logic              tx_link,      // link taken by the accepted packet
  // node side, receive
  output logic              rx_valid [2],
  output logic [DATA_W-1:0] rx_data  [2],
  output logic              rx_err   [2],
  // injection links
  output logic              inj_valid [2],
  output flit_t             inj_flit  [2],
  input  logic              inj_credit[2],
  input  logic [NNODE-1:0]  inj_reach [2],
  // ejection links
  input  logic              ej_valid  [2],
  input  flit_t             ej_flit   [2],
  output logic              ej_credit [2]
);

  localparam int unsigned DEPTH = BUF_PKTS * PKT_FLITS;
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int unsigned FW    = $clog2(PKT_FLITS + 1);
  localparam int unsigned NB    = $clog2(NNODE);

  // ---------------- transmit ----------------
  logic              busy   [2];
  logic [FW-1:0]     fidx   [2];
  logic [NODE_W-1:0] pdest  [2];
  logic [DATA_W-1:0] pdata  [2];
  logic [CW-1:0]     credits[2];
  logic [15:0]       lfsr;
  logic              ok [2];
  logic              pick;

  always_comb begin
    for (int c = 0; c < 2; c++)
      ok[c] = !busy[c] && inj_reach[c][tx_dest[NB-1:0]] && (credits[c] >= CW'(PKT_FLITS));
    tx_ready = tx_valid && (ok[0] || ok[1]);
    if (ok[0] && ok[1])
      pick = (credits[1] > credits[0]) ? 1'b1 :
             (credits[0] > credits[1]) ? 1'b0 : lfsr[0];
    else
      pick = ok[1];
    tx_link = pick;
  end

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      inj_valid[c]      = busy[c];
      inj_flit[c].head  = (fidx[c] == '0);
      inj_flit[c].tail  = (fidx[c] == FW'(PKT_FLITS - 1));
      inj_flit[c].sec   = 1'b0;
      inj_flit[c].dest  = pdest[c];
      inj_flit[c].data  = pdata[c] + DATA_W'(fidx[c]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr <= 16'hACE1 ^ 16'(NODE);
      for (int c = 0; c < 2; c++) begin
        busy[c]    <= 1'b0;
        fidx[c]    <= '0;
        pdest[c]   <= '0;
        pdata[c]   <= '0;
        credits[c] <= CW'(DEPTH);
      end
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      for (int c = 0; c < 2; c++) begin
        if (busy[c]) begin
          fidx[c] <= fidx[c] + 1'b1;
          if (fidx[c] == FW'(PKT_FLITS - 1)) busy[c] <= 1'b0;
        end
        if (tx_ready && int'(pick) == c) begin
          busy[c]  <= 1'b1;
          fidx[c]  <= '0;
          pdest[c] <= tx_dest;
          pdata[c] <= tx_data;
        end
        credits[c] <= credits[c] + CW'(inj_credit[c]) - CW'(busy[c]);
      end
    end
  end

  // ---------------- receive ----------------
  logic          in_pkt [2];
  logic [FW-1:0] rcount [2];
  logic          bad    [2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin
        in_pkt[c]    <= 1'b0;
        rcount[c]    <= '0;
        bad[c]       <= 1'b0;
        rx_valid[c]  <= 1'b0;
        rx_data[c]   <= '0;
        rx_err[c]    <= 1'b0;
        ej_credit[c] <= 1'b0;
      end
    end else begin
      for (int c = 0; c < 2; c++) begin
        logic          b;
        logic [FW-1:0] n;
        ej_credit[c] <= ej_valid[c];
        rx_valid[c]  <= 1'b0;
        if (ej_valid[c]) begin
          if (ej_flit[c].head) begin
            b = in_pkt[c];                     // head inside an unfinished packet
            n = FW'(1);
            rx_data[c] <= ej_flit[c].data;
          end else begin
            b = bad[c] || !in_pkt[c];          // body flit without a head
            n = rcount[c] + 1'b1;
          end
          if (ej_flit[c].dest != NODE_W'(NODE)) b = 1'b1;
          if (ej_flit[c].tail) begin
            rx_valid[c] <= 1'b1;
            rx_err[c]   <= b || (n != FW'(PKT_FLITS));
            in_pkt[c]   <= 1'b0;
            bad[c]      <= 1'b0;
            rcount[c]   <= '0;
          end else begin
            in_pkt[c]   <= 1'b1;
            bad[c]      <= b;
            rcount[c]   <= n;
          end
        end
      end
    end
  end

  a_credit: assert property (@(posedge clk) disable iff (!rst_n)
                             busy[0] |-> credits[0] != '0);

endmodule
