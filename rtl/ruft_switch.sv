// ruft_switch: unidirectional virtual cut-through switch of a RUFT-family
// network (RUFT-PL, FT-RUFT-212 or FT-RUFT-222).
//
// Each input port has a buffer of two packets. When a head flit reaches the
// front of a buffer the input spends ROUTE_CYC cycles routing it, then
// requests one output. The legal outputs follow RUFT/DESTRO: a switch at
// stage s uses digit s (base K) of the destination, so only the copy of the
// link (parallel link, or primary/secondary ejection link) is left to choose.
// At stage 0 of the FT variants the packet may also take the output for the
// destination with its least significant bit inverted; that choice sets the
// packet's sec bit, which makes the last stage deliver it through the
// secondary ejection link of its real destination. Among the legal outputs
// that are free, healthy, lead to a healthy path (out_reach) and have room
// for a whole packet downstream, the one with most free downstream buffer is
// chosen (lowest port index on a tie). Each output has a round-robin arbiter;
// a granted packet holds the output until its tail flit has passed. Flits
// cross the crossbar in one cycle (output register). Flow control is credit
// based, one credit per flit slot of the downstream input buffer.
//
// Fault support: out_reach[p][key] is high when output p is healthy and a
// healthy path continues from it for routing key {sec, dest}. The switch
// combines it with its legal-output table into can_reach, the same
// information for the link that feeds it, so the network can compute
// reachability backwards from the end nodes.
//
// The routing rule, the selection by free buffer and the buffer size follow
// the topology description; the buffer organisation, credit scheme, routing
// delay counter, arbitration and tie breaking are this design's choices.
//
// Event outputs (one cycle pulses, for statistics): ev_copy1 a packet took a
// copy-1 output (parallel or secondary link), ev_sec a stage-0 switch sent a
// packet toward a secondary ejection link, ev_blocked a routed head could not
// be granted because every legal output was busy or short of credits,
// ev_fault_avoid a packet was routed while some legal output was unusable
// because of a fault.
module ruft_switch
  import ruft_pkg::*;
#(
  parameter topo_e       TOPO      = FT_RUFT_222,
  parameter int unsigned K         = 4,
  parameter int unsigned N         = 3,
  parameter int unsigned STAGE     = 0,
  parameter int unsigned PKT_FLITS = 16,
  parameter int unsigned BUF_PKTS  = 2,
  parameter int unsigned ROUTE_CYC = 4,
  // derived, not meant to be overridden
  parameter int unsigned NIN   = sw_inputs(TOPO, K, STAGE),
  parameter int unsigned NOUT  = sw_outputs(TOPO, K, N, STAGE),
  parameter int unsigned NNODE = K ** N,
  parameter int unsigned NKEY  = 2 * NNODE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid  [NIN],
  input  flit_t           in_flit   [NIN],
  output logic            in_credit [NIN],
  output logic            out_valid [NOUT],
  output flit_t           out_flit  [NOUT],
  input  logic            out_credit[NOUT],
  input  logic [NKEY-1:0] out_reach [NOUT],
  output logic [NKEY-1:0] can_reach,
  output logic            ev_copy1,
  output logic            ev_sec,
  output logic            ev_blocked,
  output logic            ev_fault_avoid
);

  localparam int unsigned DEPTH = BUF_PKTS * PKT_FLITS;
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int unsigned NB    = $clog2(NNODE);
  localparam int unsigned OW    = (NOUT > 1) ? $clog2(NOUT) : 1;
  localparam int unsigned RW    = $clog2(ROUTE_CYC + 1);
  localparam logic        FT0   = (STAGE == 0) && (TOPO != RUFT_PL);

  // ---------------------------------------------------------------------
  // Static routing table and reachability combination.
  // cand_tab[key][p]: output p is legal for routing key {sec, dest}.
  // ok_tab[key][p]  : legal and leads to a healthy path.
  // ---------------------------------------------------------------------
  logic [NOUT-1:0] cand_tab [NKEY];
  logic [NOUT-1:0] ok_tab   [NKEY];

  for (genvar kk = 0; kk < NKEY; kk++) begin : g_key
    for (genvar p = 0; p < NOUT; p++) begin : g_port
      localparam int unsigned D  = kk % NNODE;
      localparam logic        SC = (kk >= NNODE);
      localparam logic        C  = port_candidate(TOPO, K, N, STAGE, p, D, SC);
      // Key seen downstream: stage 0 of the FT variants fixes sec by port.
      localparam int unsigned KD = FT0 ? (sec_of_port(K, p, D) ? NNODE + D : D) : kk;
      assign cand_tab[kk][p] = C;
      assign ok_tab[kk][p]   = C & out_reach[p][KD];
    end
    assign can_reach[kk] = |ok_tab[kk];
  end

  // ---------------------------------------------------------------------
  // Input side
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {IN_IDLE, IN_ROUTE, IN_REQ, IN_ACTIVE} in_state_e;

  in_state_e       st      [NIN];
  logic [RW-1:0]   rcnt    [NIN];
  logic [OW-1:0]   osel    [NIN];   // output held by an active input
  logic            nsec    [NIN];   // sec bit written into forwarded flits
  logic            f_valid [NIN];
  flit_t           f_flit  [NIN];
  logic            pop     [NIN];
  logic [NOUT-1:0] req_oh  [NIN];   // one-hot output chosen this cycle

  // Output side state
  logic [CW-1:0]   credits [NOUT];
  logic            busy    [NOUT];
  logic [NIN-1:0]  arb_req [NOUT];
  logic [NIN-1:0]  arb_gnt [NOUT];
  logic [NIN-1:0]  in_won;           // input i granted this cycle
  logic [OW-1:0]   won_port [NIN];

  for (genvar i = 0; i < NIN; i++) begin : g_in
    ruft_flit_fifo #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_valid  (in_valid[i]),
      .wr_flit   (in_flit[i]),
      .rd_valid  (f_valid[i]),
      .rd_flit   (f_flit[i]),
      .rd_pop    (pop[i])
    );
    assign pop[i] = (st[i] == IN_ACTIVE) && f_valid[i];
  end

  // Selection function: most free downstream buffer among usable outputs.
  logic [NOUT-1:0] usable   [NIN];
  logic [NOUT-1:0] legal_ok [NIN];
  logic [NOUT-1:0] legal    [NIN];

  always_comb begin
    for (int i = 0; i < int'(NIN); i++) begin
      logic [NB:0] key;
      int          best;
      key         = {f_flit[i].sec, f_flit[i].dest[NB-1:0]};
      legal[i]    = cand_tab[key];
      legal_ok[i] = ok_tab[key];
      for (int p = 0; p < int'(NOUT); p++)
        usable[i][p] = legal_ok[i][p] && !busy[p] && (credits[p] >= CW'(PKT_FLITS));
      best = -1;
      for (int p = 0; p < int'(NOUT); p++)
        if (usable[i][p] && (best < 0 || credits[p] > credits[best])) best = p;
      req_oh[i] = '0;
      if (st[i] == IN_REQ && best >= 0) req_oh[i][best] = 1'b1;
    end
  end

  // Output arbitration
  for (genvar p = 0; p < NOUT; p++) begin : g_arb
    for (genvar i = 0; i < NIN; i++) begin : g_r
      assign arb_req[p][i] = req_oh[i][p];
    end
    ruft_rr_arbiter #(.N(NIN)) u_arb (
      .clk, .rst_n,
      .req    (arb_req[p]),
      .update (1'b1),
      .grant  (arb_gnt[p])
    );
  end

  always_comb begin
    for (int i = 0; i < int'(NIN); i++) begin
      in_won[i]   = 1'b0;
      won_port[i] = '0;
      for (int p = 0; p < int'(NOUT); p++)
        if (arb_gnt[p][i]) begin
          in_won[i]   = 1'b1;
          won_port[i] = OW'(p);
        end
    end
  end

  // Input state machines
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NIN); i++) begin
        st[i]   <= IN_IDLE;
        rcnt[i] <= '0;
        osel[i] <= '0;
        nsec[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < int'(NIN); i++) begin
        unique case (st[i])
          IN_IDLE:
            if (f_valid[i]) begin
              if (ROUTE_CYC > 1) begin
                st[i]   <= IN_ROUTE;
                rcnt[i] <= RW'(ROUTE_CYC - 2);
              end else begin
                st[i] <= IN_REQ;
              end
            end
          IN_ROUTE:
            if (rcnt[i] == '0) st[i] <= IN_REQ;
            else               rcnt[i] <= rcnt[i] - 1'b1;
          IN_REQ:
            if (in_won[i]) begin
              st[i]   <= IN_ACTIVE;
              osel[i] <= won_port[i];
              nsec[i] <= FT0 ? ((int'(won_port[i]) % K) != (int'(f_flit[i].dest) % K))
                             : f_flit[i].sec;
            end
          IN_ACTIVE:
            if (pop[i] && f_flit[i].tail) st[i] <= IN_IDLE;
          default: st[i] <= IN_IDLE;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------------
  // Crossbar, output registers and credit counters
  // ---------------------------------------------------------------------
  logic [NIN-1:0] owner [NOUT];   // one-hot input that holds output p

  always_comb begin
    for (int p = 0; p < int'(NOUT); p++) begin
      owner[p] = '0;
      for (int i = 0; i < int'(NIN); i++)
        owner[p][i] = (st[i] == IN_ACTIVE) && (int'(osel[i]) == p);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(NOUT); p++) begin
        out_valid[p] <= 1'b0;
        out_flit[p]  <= '0;
        credits[p]   <= CW'(DEPTH);
        busy[p]      <= 1'b0;
      end
      for (int i = 0; i < int'(NIN); i++) in_credit[i] <= 1'b0;
    end else begin
      for (int p = 0; p < int'(NOUT); p++) begin
        logic sent;
        sent = 1'b0;
        out_valid[p] <= 1'b0;
        for (int i = 0; i < int'(NIN); i++)
          if (owner[p][i] && pop[i]) begin
            sent          = 1'b1;
            out_flit[p]   <= f_flit[i];
            out_flit[p].sec <= nsec[i];
            if (f_flit[i].tail) busy[p] <= 1'b0;
          end
        if (arb_gnt[p] != '0) busy[p] <= 1'b1;
        out_valid[p] <= sent;
        credits[p]   <= credits[p] + CW'(out_credit[p]) - CW'(sent);
      end
      for (int i = 0; i < int'(NIN); i++) in_credit[i] <= pop[i];
    end
  end

  // ---------------------------------------------------------------------
  // Events
  // ---------------------------------------------------------------------
  always_comb begin
    ev_copy1       = 1'b0;
    ev_sec         = 1'b0;
    ev_blocked     = 1'b0;
    ev_fault_avoid = 1'b0;
    for (int i = 0; i < int'(NIN); i++) begin
      if (st[i] == IN_REQ) begin
        if (in_won[i] && int'(won_port[i]) >= int'(K)) ev_copy1 = 1'b1;
        if (in_won[i] && FT0 && ((int'(won_port[i]) % K) != (int'(f_flit[i].dest) % K)))
          ev_sec = 1'b1;
        if (!in_won[i] && legal_ok[i] != '0) ev_blocked = 1'b1;
        if (in_won[i] && (legal[i] & ~legal_ok[i]) != '0) ev_fault_avoid = 1'b1;
      end
    end
  end

  // A granted output must have room for the whole packet (virtual cut-through).
  for (genvar p = 0; p < NOUT; p++) begin : g_chk
    a_vct: assert property (@(posedge clk) disable iff (!rst_n)
                            (arb_gnt[p] != '0) |-> (!busy[p] && credits[p] >= CW'(PKT_FLITS)));
    a_credit_max: assert property (@(posedge clk) disable iff (!rst_n)
                                   credits[p] <= CW'(DEPTH));
  end

endmodule
