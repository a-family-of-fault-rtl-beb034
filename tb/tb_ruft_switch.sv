// tb_ruft_switch: self-checking test of a first-stage FT-RUFT-222 switch
// (K=4, 2 stages, 8 inputs, 8 outputs, 4-flit packets).
//
// The bench plays the upstream senders (credit counters per input, whole
// packets only) and the downstream buffers (it consumes flits and returns
// credits, and can stall any output). A reference model in the bench decides
// independently which outputs are legal for each destination (digit 0 of the
// destination or of the destination with its LSB inverted, any copy), which
// sec bit a packet must leave with, and checks packet integrity, the
// single-packet latency (ROUTE_CYC + 3 cycles from input to output), the
// most-free-buffer choice, virtual cut-through blocking and fault avoidance.
module tb_ruft_switch;
  import ruft_pkg::*;

  localparam topo_e       TOPO  = FT_RUFT_222;
  localparam int unsigned K     = 4;
  localparam int unsigned N     = 2;
  localparam int unsigned PKT   = 4;
  localparam int unsigned BUFP  = 2;
  localparam int unsigned RC    = 4;
  localparam int unsigned NI    = 8;
  localparam int unsigned NO    = 8;
  localparam int unsigned NNODE = K ** N;
  localparam int unsigned NKEY  = 2 * NNODE;
  localparam int unsigned DEPTH = PKT * BUFP;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic            in_valid  [NI];
  flit_t           in_flit   [NI];
  logic            in_credit [NI];
  logic            out_valid [NO];
  flit_t           out_flit  [NO];
  logic            out_credit[NO];
  logic [NKEY-1:0] out_reach [NO];
  logic [NKEY-1:0] can_reach;
  logic ev_copy1, ev_sec, ev_blocked, ev_fault_avoid;

  ruft_switch #(.TOPO(TOPO), .K(K), .N(N), .STAGE(0), .PKT_FLITS(PKT),
                .BUF_PKTS(BUFP), .ROUTE_CYC(RC)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------- reference helpers ----------------
  function automatic bit legal_port(int p, int d);
    return (p % K) == (d % K) || (p % K) == ((d ^ 1) % K);
  endfunction

  // ---------------- upstream senders ----------------
  int  up_cred [NI];
  int  tx_left [NI];      // flits still to send of current packet, 0 = idle
  int  tx_dest [NI];
  int  tx_id   [NI];
  int  seq [NI];          // per-input packet counter
  // A packet id is input*4 + (sequence mod 4): an input never has more than
  // three packets in flight and packets of one input stay in order, so ids
  // stay unique while in flight and fit in the 8-bit head payload with the
  // flit index.
  function automatic int new_id(int i);
    seq[i]++;
    return i * 4 + seq[i] % 4;
  endfunction
  int  sent_pkts = 0;
  bit  traffic_on = 0;
  int  fixed_dest = -1;   // >= 0 forces the destination
  int  sent_cycle [int];  // head send cycle by packet id
  int  pkt_dest   [int];

  // ---------------- downstream model ----------------
  bit  stall [NO];                 // hold credits of this output
  int  owed  [NO];                 // credits not yet returned
  int  rx_id [NO];
  int  rx_cnt[NO];
  int  got_pkts = 0;
  int  got_port [int];
  int  got_cycle[int];
  int  n_copy1 = 0, n_sec = 0, n_blocked = 0, n_avoid = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      n_copy1   <= n_copy1 + int'(ev_copy1);
      n_sec     <= n_sec + int'(ev_sec);
      n_blocked <= n_blocked + int'(ev_blocked);
      n_avoid   <= n_avoid + int'(ev_fault_avoid);
    end
  end

  // Drive inputs and credits just after each clock edge.
  always @(posedge clk) begin
    #1;
    for (int i = 0; i < int'(NI); i++) begin
      if (in_credit[i]) up_cred[i]++;
      in_valid[i] = 1'b0;
      in_flit[i]  = '0;
      if (tx_left[i] == 0 && traffic_on && up_cred[i] >= int'(PKT) && ($urandom % 4 == 0)) begin
        tx_left[i] = PKT;
        tx_dest[i] = (fixed_dest >= 0) ? fixed_dest : int'($urandom % NNODE);
        tx_id[i]   = new_id(i);
      end
      if (tx_left[i] > 0) begin
        in_valid[i]       = 1'b1;
        in_flit[i].head   = (tx_left[i] == int'(PKT));
        in_flit[i].tail   = (tx_left[i] == 1);
        in_flit[i].dest   = NODE_W'(tx_dest[i]);
        in_flit[i].data   = 8'(tx_id[i] * 8 + (int'(PKT) - tx_left[i]));
        if (in_flit[i].head) begin
          sent_cycle[tx_id[i]] = cycle;
          pkt_dest[tx_id[i]]   = tx_dest[i];
          got_port.delete(tx_id[i]);
          got_cycle.delete(tx_id[i]);
          sent_pkts++;
        end
        tx_left[i]--;
        up_cred[i]--;
      end
    end
    for (int p = 0; p < int'(NO); p++) begin
      out_credit[p] = 1'b0;
      if (!stall[p] && owed[p] > 0) begin
        out_credit[p] = 1'b1;
        owed[p]--;
      end
    end
  end

  // Check outputs at each clock edge.
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < int'(NO); p++) begin
        if (out_valid[p]) begin
          flit_t f;
          int    id, d;
          f = out_flit[p];
          owed[p]++;
          checks++;
          if (owed[p] > int'(DEPTH)) fail($sformatf("port %0d overran downstream buffer", p));
          if (f.head) begin
            id = int'(f.data) / 8;
            if (rx_cnt[p] != 0) fail($sformatf("port %0d: head inside packet", p));
            rx_id[p]  = id;
            rx_cnt[p] = 0;
            d = pkt_dest.exists(id) ? pkt_dest[id] : -1;
            if (d != int'(f.dest)) fail($sformatf("packet %0d: wrong dest %0d vs %0d sent@%0d", id, f.dest, d, sent_cycle[id]));
            if (!legal_port(p, d)) fail($sformatf("packet %0d to %0d on illegal port %0d", id, d, p));
            if (f.sec != ((p % K) != (d % K))) fail($sformatf("packet %0d: sec bit wrong", id));
            if (out_reach[p][f.sec ? NNODE + d : d] == 1'b0)
              fail($sformatf("packet %0d used faulty port %0d", id, p));
            got_port[id]  = p;
            got_cycle[id] = cycle;
          end
          if (int'(f.data) != rx_id[p] * 8 + rx_cnt[p])
            fail($sformatf("port %0d: flit out of order", p));
          if (f.tail != (rx_cnt[p] == int'(PKT) - 1)) fail($sformatf("port %0d: bad tail", p));
          rx_cnt[p] = f.tail ? 0 : rx_cnt[p] + 1;
          if (f.tail) got_pkts++;
        end
      end
    end
  end

  task automatic wait_drain(input int limit);
    int t;
    t = 0;
    while ((got_pkts != sent_pkts || tx_busy()) && t < limit) begin
      @(posedge clk);
      t++;
    end
    checks++;
    if (got_pkts != sent_pkts) fail($sformatf("lost packets: sent %0d got %0d", sent_pkts, got_pkts));
  endtask

  function automatic bit tx_busy();
    for (int i = 0; i < int'(NI); i++) if (tx_left[i] != 0) return 1;
    return 0;
  endfunction

  // Send one packet from input i to d and wait for it.
  task automatic one_packet(input int i, input int d, output int port, output int lat);
    int id;
    @(posedge clk);
    #2;
    id = new_id(i);
    tx_left[i] = PKT; tx_dest[i] = d; tx_id[i] = id;
    wait_drain(200);
    port = got_port.exists(id) ? got_port[id] : -1;
    lat  = got_cycle.exists(id) ? got_cycle[id] - sent_cycle[id] : -1;
  endtask

  initial begin
    int port, lat, d;
    for (int i = 0; i < int'(NI); i++) begin
      up_cred[i] = DEPTH; tx_left[i] = 0; seq[i] = 0; in_valid[i] = 0; in_flit[i] = '0;
    end
    for (int p = 0; p < int'(NO); p++) begin
      stall[p] = 0; owed[p] = 0; rx_cnt[p] = 0; out_credit[p] = 0; out_reach[p] = '1;
    end
    rst_n = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. single packet latency and legality
    one_packet(0, 5, port, lat);
    checks++;
    if (lat != int'(RC) + 3) fail($sformatf("latency %0d, expected %0d", lat, RC + 3));
    checks++;
    if (port < 0) fail("single packet not delivered");

    // 2. most free buffer: stall every legal port of dest 6 but port 6
    //    (copy 1, digit 2) after loading the others with one packet each.
    d = 6;
    for (int p = 0; p < int'(NO); p++) stall[p] = 1;
    // use up credits of the legal ports except port 6
    for (int p = 0; p < int'(NO); p++) owed[p] = 0;
    one_packet(1, d, port, lat);         // goes somewhere; that port now lower
    begin
      int first;
      first = port;
      one_packet(2, d, port, lat);
      checks++;
      if (port == first) fail("selection did not avoid the fuller output");
      checks++;
      if (!legal_port(port, d)) fail("illegal port in selection test");
    end
    for (int p = 0; p < int'(NO); p++) stall[p] = 0;
    repeat (20) @(posedge clk);

    // 3. virtual cut-through blocking: stall the four legal ports of dest 9
    //    after filling them, so no port has room for a packet.
    for (int p = 0; p < int'(NO); p++) stall[p] = legal_port(p, 9);
    for (int r = 0; r < 8; r++) one_packet(3, 9, port, lat);
    // all legal ports now hold two packets each: the next one must wait
    @(posedge clk);
    #2;
    begin
      int id;
      id = new_id(4);
      tx_left[4] = PKT; tx_dest[4] = 9; tx_id[4] = id;
      repeat (40) @(posedge clk);
      checks++;
      if (got_port.exists(id)) fail("packet forwarded without downstream room");
      checks++;
      if (n_blocked == 0) fail("no blocked event seen");
      for (int p = 0; p < int'(NO); p++) stall[p] = 0;
      wait_drain(400);
      checks++;
      if (!got_port.exists(id)) fail("blocked packet never left");
    end

    // 4. faults: kill port 2 and 6 for every key; dest 2 (digit 2 / 3) must
    //    then use ports 3 or 7; can_reach must stay high; kill 3 and 7 too
    //    and can_reach for dest 2 must drop.
    out_reach[2] = '0; out_reach[6] = '0;
    for (int r = 0; r < 6; r++) begin
      one_packet(r % 8, 2, port, lat);
      checks++;
      if (port != 3 && port != 7) fail($sformatf("fault not avoided, port %0d", port));
    end
    checks++;
    if (n_avoid == 0) fail("no fault-avoid event");
    checks++;
    if (!can_reach[2]) fail("can_reach dropped with paths left");
    out_reach[3] = '0; out_reach[7] = '0;
    #1;
    checks++;
    if (can_reach[2] || can_reach[NNODE + 2]) fail("can_reach high with no path");
    checks++;
    if (!can_reach[4]) fail("can_reach low for unaffected destination");
    for (int p = 0; p < int'(NO); p++) out_reach[p] = '1;

    // 5. random traffic from all inputs with random downstream stalls
    traffic_on = 1;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk);
      if (t % 50 == 0)
        for (int p = 0; p < int'(NO); p++) stall[p] = ($urandom % 3 == 0);
    end
    for (int p = 0; p < int'(NO); p++) stall[p] = 0;
    traffic_on = 0;
    wait_drain(2000);
    checks++;
    if (n_copy1 == 0 || n_sec == 0) fail("copy-1 or secondary outputs never used");
    $display("switch: sent %0d got %0d copy1=%0d sec=%0d blocked=%0d avoid=%0d",
             sent_pkts, got_pkts, n_copy1, n_sec, n_blocked, n_avoid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
