// ft_ruft_network: a complete RUFT-family interconnection network: K**N end
// nodes, N stages of K**(N-1) unidirectional switches, and the links between
// them, wired as RUFT-PL, FT-RUFT-212 or FT-RUFT-222 (parameter TOPO).
//
// Topology. Switch <s,o> is switch o (an (N-1)-digit base-K number) of stage
// s. Output digit j of a stage-s switch goes to the stage-(s+1) switch whose
// digit s is replaced by j, entering on the input numbered by the old digit
// (the RUFT/k-ary n-tree pattern). Ports are numbered copy*K + digit.
//  - RUFT-PL: node p feeds switch p/K twice (copies 0 and 1), every
//    switch-to-switch connection is a pair of parallel links, and output j of
//    last-stage switch o reaches node j*K**(N-1)+o through two parallel links.
//  - FT-RUFT-212 / 222: node p feeds switch p/K (primary, copy 0) and the
//    first-stage switch of node p with its most significant bit inverted
//    (secondary, copy 1). Output j, copy 0 of last-stage switch o is the
//    primary ejection link of node m = j*K**(N-1)+o; copy 1 is the secondary
//    ejection link of node m with its least significant bit inverted. 212 has
//    single links between switches, 222 parallel pairs.
// Routing follows RUFT (stage s uses destination digit s); the choice between
// parallel links, between injection links and, at stage 0 of the FT
// variants, between primary and secondary ejection is made by free buffer
// space (see ruft_switch and ruft_nic).
//
// Faults. inj_fault, net_fault and ej_fault mark links as permanently broken
// (static fault model: change them only while the network is empty). Every
// switch reports, per routing key, whether a healthy path to the ejection
// link continues from it; the network combines this backwards from the end
// nodes, so injection links and switch outputs that lead only into faults
// are never chosen. Any fault set that leaves a path per source and
// destination is tolerated. A faulty link carries nothing: flits sent into
// it are lost, which is what a broken wire does and lets a test see any
// packet that is routed onto one.
// Fault bit numbering: inj_fault[2*p+c] / ej_fault[2*p+c] for link c of node
// p; net_fault[(s*K**(N-1)+o)*K*C + port] for an output of switch <s,o>,
// s < N-1, where C is 2 (RUFT-PL, FT-RUFT-222) or 1 (FT-RUFT-212).
//
// Timing (defaults): 1-cycle links between stages, stages*1+1 cycles on
// the last-stage-to-node links, 4 routing cycles per switch, 1-cycle
// crossbar, buffers of 2 packets, packets of 128 one-byte flits. Node side
// interface and event outputs are described in ruft_nic and ruft_switch;
// ev_* bit s*K**(N-1)+o belongs to switch <s,o>.
module ft_ruft_network
  import ruft_pkg::*;
#(
  parameter topo_e       TOPO      = FT_RUFT_222,
  parameter int unsigned K         = 4,
  parameter int unsigned N         = 3,
  parameter int unsigned PKT_FLITS = 128,
  parameter int unsigned BUF_PKTS  = 2,
  parameter int unsigned ROUTE_CYC = 4,
  parameter int unsigned FLY       = 1,
  // derived, not meant to be overridden
  parameter int unsigned NNODE = K ** N,
  parameter int unsigned NSPS  = K ** (N - 1),
  parameter int unsigned NSW   = N * NSPS,
  parameter int unsigned NETF  = (N - 1) * NSPS * K * net_copies(TOPO)
) (
  input  logic              clk,
  input  logic              rst_n,
  // end-node transmit interfaces
  input  logic              tx_valid [NNODE],
  input  logic [NODE_W-1:0] tx_dest  [NNODE],
  input  logic [DATA_W-1:0] tx_data  [NNODE],
  output logic              tx_ready [NNODE],
  output logic              tx_link  [NNODE],
  // end-node receive interfaces, one per ejection link
  output logic              rx_valid [NNODE][2],
  output logic [DATA_W-1:0] rx_data  [NNODE][2],
  output logic              rx_err   [NNODE][2],
  // static link faults
  input  logic [2*NNODE-1:0] inj_fault,
  input  logic [NETF-1:0]    net_fault,
  input  logic [2*NNODE-1:0] ej_fault,
  // per-switch events
  output logic [NSW-1:0]    ev_copy1,
  output logic [NSW-1:0]    ev_sec,
  output logic [NSW-1:0]    ev_blocked,
  output logic [NSW-1:0]    ev_fault_avoid
);

  localparam int unsigned MAXP     = 2 * K;
  localparam int unsigned NKEY     = 2 * NNODE;
  localparam int unsigned PAR      = net_copies(TOPO);
  localparam int unsigned LONG_FLY = FLY * N + 1;
  localparam logic        FT       = (TOPO != RUFT_PL);

  // Global view of all switch ports.
  logic            si_v [N][NSPS][MAXP];
  flit_t           si_f [N][NSPS][MAXP];
  logic            si_c [N][NSPS][MAXP];
  logic            so_v [N][NSPS][MAXP];
  flit_t           so_f [N][NSPS][MAXP];
  logic            so_c [N][NSPS][MAXP];

  // End-node link wires.
  logic              inj_v [NNODE][2];
  flit_t             inj_f [NNODE][2];
  logic              inj_c [NNODE][2];
  logic [NNODE-1:0]  inj_r [NNODE][2];
  logic              ej_v  [NNODE][2];
  flit_t             ej_f  [NNODE][2];
  logic              ej_c  [NNODE][2];

  // ---------------------------------------------------------------------
  // Switches
  // ---------------------------------------------------------------------
  for (genvar s = 0; s < N; s++) begin : g_st
    for (genvar o = 0; o < NSPS; o++) begin : g_sw
      localparam int unsigned NI = sw_inputs(TOPO, K, s);
      localparam int unsigned NO = sw_outputs(TOPO, K, N, s);
      logic            iv [NI];
      flit_t           ifl[NI];
      logic            ic [NI];
      logic            ov [NO];
      flit_t           ofl[NO];
      logic            oc [NO];
      logic [NKEY-1:0] orr[NO];
      logic [NKEY-1:0] can_w;     // reachability seen from this switch's inputs

      ruft_switch #(
        .TOPO(TOPO), .K(K), .N(N), .STAGE(s),
        .PKT_FLITS(PKT_FLITS), .BUF_PKTS(BUF_PKTS), .ROUTE_CYC(ROUTE_CYC)
      ) u_sw (
        .clk, .rst_n,
        .in_valid  (iv),
        .in_flit   (ifl),
        .in_credit (ic),
        .out_valid (ov),
        .out_flit  (ofl),
        .out_credit(oc),
        .out_reach (orr),
        .can_reach (can_w),
        .ev_copy1      (ev_copy1[s*NSPS+o]),
        .ev_sec        (ev_sec[s*NSPS+o]),
        .ev_blocked    (ev_blocked[s*NSPS+o]),
        .ev_fault_avoid(ev_fault_avoid[s*NSPS+o])
      );

      for (genvar q = 0; q < MAXP; q++) begin : g_i
        if (q < NI) begin : g_used
          assign iv[q]  = si_v[s][o][q];
          assign ifl[q] = si_f[s][o][q];
          assign si_c[s][o][q] = ic[q];
        end else begin : g_tie
          assign si_v[s][o][q] = 1'b0;
          assign si_f[s][o][q] = '0;
          assign si_c[s][o][q] = 1'b0;
        end
      end
      for (genvar p = 0; p < MAXP; p++) begin : g_o
        if (p < NO) begin : g_used
          assign so_v[s][o][p] = ov[p];
          assign so_f[s][o][p] = ofl[p];
          assign oc[p]  = so_c[s][o][p];
          if (s + 1 < N) begin : g_r
            // Healthy link into the next stage and a healthy path beyond it.
            localparam int unsigned DS = digit(o, K, s);
            localparam int unsigned O2 = o - DS * (K ** s) + (p % K) * (K ** s);
            assign orr[p] = {NKEY{~net_fault[(s*NSPS+o)*K*PAR+p]}} & g_st[s+1].g_sw[O2].can_w;
          end else begin : g_r
            // Ejection link to node ND (copy p / K).
            localparam int unsigned M  = (p % K) * NSPS + o;
            localparam int unsigned ND = (FT && p >= K) ? (M ^ 1) : M;
            assign orr[p] = {NKEY{~ej_fault[2*ND+p/K]}};
          end
        end else begin : g_tie
          assign so_v[s][o][p] = 1'b0;
          assign so_f[s][o][p] = '0;
          assign so_c[s][o][p] = 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // Injection links: node p, copy c -> stage-0 switch
  // ---------------------------------------------------------------------
  for (genvar p = 0; p < NNODE; p++) begin : g_inj
    for (genvar c = 0; c < 2; c++) begin : g_c
      localparam int unsigned SRC = (FT && c == 1) ? (p ^ (NNODE / 2)) : p;
      localparam int unsigned SW  = SRC / K;
      localparam int unsigned PT  = c * K + p % K;
      ruft_link #(.DELAY(FLY)) u_link (
        .clk, .rst_n,
        .tx_valid (inj_v[p][c] & ~inj_fault[2*p+c]),
        .tx_flit  (inj_f[p][c]),
        .tx_credit(inj_c[p][c]),
        .rx_valid (si_v[0][SW][PT]),
        .rx_flit  (si_f[0][SW][PT]),
        .rx_credit(si_c[0][SW][PT])
      );
      assign inj_r[p][c] = {NNODE{~inj_fault[2*p+c]}} & g_st[0].g_sw[SW].can_w[NNODE-1:0];
    end
  end

  // ---------------------------------------------------------------------
  // Links between stages s and s+1
  // ---------------------------------------------------------------------
  for (genvar s = 0; s + 1 < N; s++) begin : g_net
    for (genvar o = 0; o < NSPS; o++) begin : g_sw
      for (genvar p = 0; p < K * PAR; p++) begin : g_p
        localparam int unsigned C  = p / K;
        localparam int unsigned J  = p % K;
        localparam int unsigned DS = digit(o, K, s);
        localparam int unsigned O2 = o - DS * (K ** s) + J * (K ** s);
        localparam int unsigned Q  = C * K + DS;
        ruft_link #(.DELAY(FLY)) u_link (
          .clk, .rst_n,
          .tx_valid (so_v[s][o][p] & ~net_fault[(s*NSPS+o)*K*PAR+p]),
          .tx_flit  (so_f[s][o][p]),
          .tx_credit(so_c[s][o][p]),
          .rx_valid (si_v[s+1][O2][Q]),
          .rx_flit  (si_f[s+1][O2][Q]),
          .rx_credit(si_c[s+1][O2][Q])
        );
      end
    end
  end

  // ---------------------------------------------------------------------
  // Ejection links: last-stage switch -> node
  // ---------------------------------------------------------------------
  for (genvar o = 0; o < NSPS; o++) begin : g_ej
    for (genvar p = 0; p < 2 * K; p++) begin : g_p
      localparam int unsigned C  = p / K;
      localparam int unsigned M  = (p % K) * NSPS + o;
      localparam int unsigned ND = (FT && C == 1) ? (M ^ 1) : M;
      ruft_link #(.DELAY(LONG_FLY)) u_link (
        .clk, .rst_n,
        .tx_valid (so_v[N-1][o][p] & ~ej_fault[2*ND+C]),
        .tx_flit  (so_f[N-1][o][p]),
        .tx_credit(so_c[N-1][o][p]),
        .rx_valid (ej_v[ND][C]),
        .rx_flit  (ej_f[ND][C]),
        .rx_credit(ej_c[ND][C])
      );
    end
  end

  // ---------------------------------------------------------------------
  // Network interfaces
  // ---------------------------------------------------------------------
  for (genvar p = 0; p < NNODE; p++) begin : g_nic
    ruft_nic #(
      .NODE(p), .NNODE(NNODE), .PKT_FLITS(PKT_FLITS), .BUF_PKTS(BUF_PKTS)
    ) u_nic (
      .clk, .rst_n,
      .tx_valid  (tx_valid[p]),
      .tx_dest   (tx_dest[p]),
      .tx_data   (tx_data[p]),
      .tx_ready  (tx_ready[p]),
      .tx_link   (tx_link[p]),
      .rx_valid  (rx_valid[p]),
      .rx_data   (rx_data[p]),
      .rx_err    (rx_err[p]),
      .inj_valid (inj_v[p]),
      .inj_flit  (inj_f[p]),
      .inj_credit(inj_c[p]),
      .inj_reach (inj_r[p]),
      .ej_valid  (ej_v[p]),
      .ej_flit   (ej_f[p]),
      .ej_credit (ej_c[p])
    );
  end

endmodule
