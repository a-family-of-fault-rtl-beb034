// ruft_net_bench: one end-to-end test of a reduced-size ft_ruft_network.
//
// Phase 1 sends a single packet from node 0 to the last node through the
// empty network and checks its latency against the timing model
//   (1+F) + (N-1)(R+3+F) + (R+2) + (N*F+1) + (P-1) + 1
// (injection register and link, N-1 switch hops of buffer write, routing,
// arbitration, crossbar and link, the last switch, the long ejection flight,
// serialisation of P flits, receive register), with F the link flight, R the
// routing cycles and P the packet length in flits.
// Phase 2 breaks NF_NET random network links, NF_INJ injection links and
// NF_EJ ejection links, keeping only fault sets that an independent path
// enumeration of the topology (written here from the topology rules, not
// taken from the RTL) says leave a path for every source and destination,
// and then runs the synthetic traffic of ruft_net_checker, which must
// deliver every packet. It also counts the network's events and reports
// them to the caller.
module ruft_net_bench
  import ruft_pkg::*;
#(
  parameter topo_e       TOPO    = FT_RUFT_222,
  parameter int unsigned K       = 2,
  parameter int unsigned N       = 3,
  parameter int unsigned PKT     = 8,
  parameter int unsigned PATTERN = 0,
  parameter int unsigned PKTS    = 6,
  parameter int unsigned RATE    = 30,
  parameter int unsigned NF_NET  = 0,
  parameter int unsigned NF_INJ  = 0,
  parameter int unsigned NF_EJ   = 0,
  parameter int unsigned HOT     = 5
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   ev [8]    // copy1, sec, blocked, fault_avoid, inj link1, ej link1, sent, recv
);

  localparam int unsigned NNODE = K ** N;
  localparam int unsigned NSPS  = K ** (N - 1);
  localparam int unsigned NSW   = N * NSPS;
  localparam int unsigned PAR   = (TOPO == FT_RUFT_212) ? 1 : 2;
  localparam int unsigned NETF  = (N - 1) * NSPS * K * PAR;
  localparam int unsigned RC    = 4;
  localparam int unsigned FLY   = 1;
  localparam bit          FT    = (TOPO != RUFT_PL);

  logic rst_n;
  logic start;

  logic              tx_valid [NNODE], tv_single [NNODE], tv_chk [NNODE];
  logic [NODE_W-1:0] tx_dest  [NNODE], td_single [NNODE], td_chk [NNODE];
  logic [DATA_W-1:0] tx_data  [NNODE], tdat_single [NNODE], tdat_chk [NNODE];
  logic              tx_ready [NNODE];
  logic              tx_link  [NNODE];
  logic              rx_valid [NNODE][2];
  logic [DATA_W-1:0] rx_data  [NNODE][2];
  logic              rx_err   [NNODE][2];
  logic [2*NNODE-1:0] inj_fault, ej_fault;
  logic [NETF-1:0]    net_fault;
  logic [NSW-1:0] ev_copy1, ev_sec, ev_blocked, ev_fault_avoid;

  ft_ruft_network #(.TOPO(TOPO), .K(K), .N(N), .PKT_FLITS(PKT), .ROUTE_CYC(RC), .FLY(FLY))
    dut (.*);

  logic c_done;
  int   c_checks, c_fail, c_sent, c_recv, c_inj1, c_ej1, c_cycles;

  ruft_net_checker #(.NNODE(NNODE), .PATTERN(PATTERN), .PKTS(PKTS), .RATE(RATE),
                     .TIMEOUT(40000), .HOT(HOT)) u_chk (
    .clk, .rst_n, .start,
    .tx_valid(tv_chk), .tx_dest(td_chk), .tx_data(tdat_chk),
    .tx_ready, .tx_link, .rx_valid, .rx_data, .rx_err,
    .done(c_done), .checks(c_checks), .failures(c_fail),
    .n_sent(c_sent), .n_recv(c_recv), .n_inj_link1(c_inj1), .n_ej_link1(c_ej1),
    .cycles(c_cycles)
  );

  always_comb
    for (int p = 0; p < int'(NNODE); p++) begin
      tx_valid[p] = start ? tv_chk[p]   : tv_single[p];
      tx_dest[p]  = start ? td_chk[p]   : td_single[p];
      tx_data[p]  = start ? tdat_chk[p] : tdat_single[p];
    end

  int n_copy1 = 0, n_sec = 0, n_blocked = 0, n_avoid = 0;
  always @(posedge clk)
    if (rst_n) begin
      n_copy1   <= n_copy1   + $countones(ev_copy1);
      n_sec     <= n_sec     + $countones(ev_sec);
      n_blocked <= n_blocked + $countones(ev_blocked);
      n_avoid   <= n_avoid   + $countones(ev_fault_avoid);
    end

  // ------------- independent path enumeration -------------
  function automatic int dig(int x, int i);
    return (x / (K ** i)) % K;
  endfunction

  function automatic bit path_from(int s, int o, int r, int d, int sec);
    if (s == int'(N) - 1) begin
      if (!FT) return !ej_fault[2*d] || !ej_fault[2*d+1];
      return !ej_fault[2*d+sec];
    end
    for (int cp = 0; cp < int'(PAR); cp++) begin
      int j, o2;
      j  = dig(r, s);
      o2 = o - dig(o, s) * (K ** s) + j * (K ** s);
      if (!net_fault[(s*NSPS+o)*K*PAR + cp*K + j] && path_from(s + 1, o2, r, d, sec))
        return 1;
    end
    return 0;
  endfunction

  function automatic bit pair_ok(int src, int d);
    for (int c = 0; c < 2; c++) begin
      int o;
      o = (FT && c == 1) ? ((src ^ (NNODE / 2)) / K) : (src / K);
      if (!inj_fault[2*src+c])
        for (int sec = 0; sec < (FT ? 2 : 1); sec++)
          if (path_from(0, o, FT && sec == 1 ? (d ^ 1) : d, d, sec)) return 1;
    end
    return 0;
  endfunction

  function automatic bit all_ok();
    for (int a = 0; a < int'(NNODE); a++)
      for (int b = 0; b < int'(NNODE); b++)
        if (!pair_ok(a, b)) return 0;
    return 1;
  endfunction

  int n_probe = 0;
  always @(posedge clk)
    if (rst_n && !start && tx_valid[0] && tx_ready[0]) n_probe <= n_probe + 1;

  function automatic int exp_latency();
    return (1 + FLY) + (N - 1) * (RC + 3 + FLY) + (RC + 2) + (N * FLY + 1) + (PKT - 1) + 1;
  endfunction

  initial begin
    int lat, tries;
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < 8; i++) ev[i] = 0;
    start = 0;
    inj_fault = '0; ej_fault = '0; net_fault = '0;
    for (int p = 0; p < int'(NNODE); p++) begin
      tv_single[p] = 0; td_single[p] = '0; tdat_single[p] = '0;
    end
    rst_n = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);

    // phase 1: single packet latency
    #1;
    tv_single[0] = 1; td_single[0] = NODE_W'(NNODE - 1); tdat_single[0] = 8'h00;
    // n_probe is updated by the accepting edge, so the offer is withdrawn
    // one time step after it and exactly one packet leaves
    while (n_probe == 0) begin @(posedge clk); #1; end
    tv_single[0] = 0;
    lat = 0;      // cycles from the accepting edge to the delivering edge
    while (!(rx_valid[NNODE-1][0] || rx_valid[NNODE-1][1]) && lat < 2000) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (n_probe != 1) begin
      failures++;
      $display("FAIL: %0d packets accepted for one offer", n_probe);
    end
    checks++;
    if (lat != exp_latency()) begin
      failures++;
      $display("FAIL: single-packet latency %0d, expected %0d", lat, exp_latency());
    end
    repeat (20) @(posedge clk);

    // phase 2: faults, kept only if tolerated
    tries = 0;
    if (NF_NET + NF_INJ + NF_EJ > 0) begin
      do begin
        inj_fault = '0; ej_fault = '0; net_fault = '0;
        for (int f = 0; f < int'(NF_NET); f++) net_fault[$urandom % NETF] = 1'b1;
        for (int f = 0; f < int'(NF_INJ); f++) inj_fault[$urandom % (2 * NNODE)] = 1'b1;
        for (int f = 0; f < int'(NF_EJ); f++)  ej_fault[$urandom % (2 * NNODE)] = 1'b1;
        tries++;
      end while (!all_ok() && tries < 1000);
      checks++;
      if (tries != 1) begin
        // the document's table promises that this many faults is always tolerated
        failures++;
        $display("FAIL: %0d random fault sets needed before one was tolerated", tries);
      end
    end
    @(posedge clk); #1;
    start = 1;
    wait (c_done);
    repeat (5) @(posedge clk);
    checks   += c_checks;
    failures += c_fail;
    ev[0] = n_copy1; ev[1] = n_sec; ev[2] = n_blocked; ev[3] = n_avoid;
    ev[4] = c_inj1;  ev[5] = c_ej1; ev[6] = c_sent;    ev[7] = c_recv;
    $display("bench topo=%0d K=%0d N=%0d pattern=%0d faults=%0d/%0d/%0d: sent %0d recv %0d in %0d cycles, lat %0d, copy1 %0d sec %0d blocked %0d avoid %0d inj1 %0d ej1 %0d",
             TOPO, K, N, PATTERN, NF_NET, NF_INJ, NF_EJ, c_sent, c_recv, c_cycles, lat,
             n_copy1, n_sec, n_blocked, n_avoid, c_inj1, c_ej1);
    done = 1;
  end

endmodule
