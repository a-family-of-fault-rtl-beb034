// tb_ft_ruft_network_full: the network at its default configuration
// (FT-RUFT-222, 4-ary 3-tree = 64 nodes, 128-flit packets, 2-packet buffers,
// 4 routing cycles, 1-cycle links, 4-cycle ejection links). The network is
// instantiated without parameters.
//
// Phase 0 sends one packet from node 0 to node 63 through the empty network
// and checks that exactly one packet was taken and that its latency is 156
// cycles from the accepting edge to the delivering edge, by the formula given
// in ruft_net_bench.
//
// Then seven network links and one injection link are broken at random, a
// fault count this topology is specified to tolerate in any combination, and
// the four synthetic traffic patterns run one after the other on the same
// faulty network, each driven by its own ruft_net_checker: uniform, hot-spot
// (15% of packets to node HOT), complement and perfect shuffle. Every node
// sends PKTS packets per pattern; each must arrive once, at the right node,
// intact. The delivered load of each phase (flits per cycle per node) is
// printed for information only. Parallel-link use, secondary ejection
// routing, blocking, fault avoidance and use of the second injection and
// ejection links must all have happened by the end.
module tb_ft_ruft_network_full;
  import ruft_pkg::*;

  localparam int unsigned NNODE = 64;
  localparam int unsigned NSW   = 48;
  localparam int unsigned NETF  = 2 * 16 * 8;
  localparam int unsigned PKTS  = 6;
  localparam int unsigned PKT   = 128;
  localparam int unsigned HOT   = 41;
  localparam int unsigned NPAT  = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic              tx_valid [NNODE];
  logic [NODE_W-1:0] tx_dest  [NNODE];
  logic [DATA_W-1:0] tx_data  [NNODE];
  logic              tx_ready [NNODE];
  logic              tx_link  [NNODE];
  logic              rx_valid [NNODE][2];
  logic [DATA_W-1:0] rx_data  [NNODE][2];
  logic              rx_err   [NNODE][2];
  logic [2*NNODE-1:0] inj_fault, ej_fault;
  logic [NETF-1:0]    net_fault;
  logic [NSW-1:0] ev_copy1, ev_sec, ev_blocked, ev_fault_avoid;

  ft_ruft_network dut (.*);

  // one traffic source and scoreboard per pattern; phase selects which one
  // drives the interfaces (0: the single latency probe)
  int unsigned phase;
  logic        tv1;
  logic              tv_c   [NPAT][NNODE];
  logic [NODE_W-1:0] td_c   [NPAT][NNODE];
  logic [DATA_W-1:0] tdat_c [NPAT][NNODE];
  logic c_done [NPAT];
  int   c_checks [NPAT], c_fail [NPAT], c_sent [NPAT], c_recv [NPAT];
  int   c_inj1 [NPAT], c_ej1 [NPAT], c_cycles [NPAT];

  for (genvar g = 0; g < int'(NPAT); g++) begin : g_chk
    ruft_net_checker #(.NNODE(NNODE), .PATTERN(g), .PKTS(PKTS), .RATE(10),
                       .TIMEOUT(60000), .HOT(HOT)) u_chk (
      .clk, .rst_n, .start(phase == g + 1),
      .tx_valid(tv_c[g]), .tx_dest(td_c[g]), .tx_data(tdat_c[g]),
      .tx_ready, .tx_link, .rx_valid, .rx_data, .rx_err,
      .done(c_done[g]), .checks(c_checks[g]), .failures(c_fail[g]),
      .n_sent(c_sent[g]), .n_recv(c_recv[g]), .n_inj_link1(c_inj1[g]),
      .n_ej_link1(c_ej1[g]), .cycles(c_cycles[g])
    );
  end

  always_comb
    for (int p = 0; p < int'(NNODE); p++) begin
      tx_valid[p] = (p == 0) && tv1;
      tx_dest[p]  = NODE_W'(NNODE - 1);
      tx_data[p]  = '0;
      for (int g = 0; g < int'(NPAT); g++)
        if (phase == g + 1) begin
          tx_valid[p] = tv_c[g][p];
          tx_dest[p]  = td_c[g][p];
          tx_data[p]  = tdat_c[g][p];
        end
    end

  int n_probe = 0;
  always @(posedge clk)
    if (rst_n && phase == 0 && tx_valid[0] && tx_ready[0]) n_probe <= n_probe + 1;

  int checks = 0, failures = 0;
  int n_copy1 = 0, n_sec = 0, n_blocked = 0, n_avoid = 0;
  always @(posedge clk)
    if (rst_n) begin
      n_copy1   <= n_copy1   + $countones(ev_copy1);
      n_sec     <= n_sec     + $countones(ev_sec);
      n_blocked <= n_blocked + $countones(ev_blocked);
      n_avoid   <= n_avoid   + $countones(ev_fault_avoid);
    end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int lat, inj1, ej1;
    string pname [NPAT];
    pname[0] = "uniform"; pname[1] = "hot-spot"; pname[2] = "complement";
    pname[3] = "shuffle";
    phase = 0; tv1 = 0;
    inj_fault = '0; ej_fault = '0; net_fault = '0;
    rst_n = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1 tv1 = 1;
    // n_probe counts at the accepting edge: the offer is withdrawn one time
    // step later, so exactly one packet leaves
    while (n_probe == 0) begin @(posedge clk); #1; end
    tv1 = 0;
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
    if (lat != 156) begin
      failures++;
      $display("FAIL: zero-load latency %0d, expected 156", lat);
    end
    $display("zero-load latency node 0 -> node 63: %0d cycles", lat);
    repeat (10) @(posedge clk);
    // seven network faults and one injection fault
    for (int f = 0; f < 7; f++) net_fault[$urandom % NETF] = 1'b1;
    inj_fault[$urandom % (2 * NNODE)] = 1'b1;
    $display("faults: %0d network links, %0d injection links",
             $countones(net_fault), $countones(inj_fault));
    inj1 = 0; ej1 = 0;
    for (int g = 0; g < int'(NPAT); g++) begin
      @(posedge clk); #1;
      phase = g + 1;
      wait (c_done[g]);
      repeat (5) @(posedge clk);
      checks   += c_checks[g];
      failures += c_fail[g];
      inj1     += c_inj1[g];
      ej1      += c_ej1[g];
      $display("%s: sent %0d recv %0d in %0d cycles, delivered load %0.3f flits/cycle/node",
               pname[g], c_sent[g], c_recv[g], c_cycles[g],
               real'(c_recv[g] * PKT) / real'(c_cycles[g] * NNODE));
    end
    need(n_copy1 > 0, "parallel link");
    need(n_sec > 0, "secondary ejection routing");
    need(n_blocked > 0, "blocking");
    need(n_avoid > 0, "fault avoidance");
    need(inj1 > 0, "second injection link");
    need(ej1 > 0, "secondary ejection link");
    $display("events: copy1 %0d sec %0d blocked %0d avoid %0d inj1 %0d ej1 %0d",
             n_copy1, n_sec, n_blocked, n_avoid, inj1, ej1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
