// tb_ruft_nic: self-checking test of the end-node network interface
// (node 5 of 16, 4-flit packets, 2-packet switch buffers).
//
// Transmit side: the bench models the two switch input buffers the node feeds
// (it counts flits, returns credits and can stall), and checks that each
// accepted packet leaves as PKT contiguous flits on one link, that the link
// with more free room is chosen, that both links are used on ties, that a
// link that cannot reach the destination is never used and that nothing is
// accepted without room. Receive side: it sends good and bad packets on both
// ejection links and checks rx_valid, rx_data, rx_err and the credits.
module tb_ruft_nic;
  import ruft_pkg::*;

  localparam int unsigned NODE  = 5;
  localparam int unsigned NNODE = 16;
  localparam int unsigned PKT   = 4;
  localparam int unsigned BUFP  = 2;
  localparam int unsigned DEPTH = PKT * BUFP;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              tx_valid, tx_ready, tx_link;
  logic [NODE_W-1:0] tx_dest;
  logic [DATA_W-1:0] tx_data;
  logic              rx_valid [2];
  logic [DATA_W-1:0] rx_data  [2];
  logic              rx_err   [2];
  logic              inj_valid [2];
  flit_t             inj_flit  [2];
  logic              inj_credit[2];
  logic [NNODE-1:0]  inj_reach [2];
  logic              ej_valid  [2];
  flit_t             ej_flit   [2];
  logic              ej_credit [2];

  ruft_nic #(.NODE(NODE), .NNODE(NNODE), .PKT_FLITS(PKT), .BUF_PKTS(BUFP)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------- switch-side model of the injection links ----------------
  int  held [2];           // flits in the modelled switch buffer
  bit  stall [2];          // do not drain the buffer
  int  rx_idx [2];
  logic [DATA_W-1:0] rx_head [2];
  logic [NODE_W-1:0] exp_dest [2];
  int  pkts_on [2];
  int  accepted = 0, delivered = 0;
  logic [NODE_W-1:0] acc_dest [2];
  logic [DATA_W-1:0] acc_data [2];

  always @(posedge clk) begin
    if (rst_n) begin
      // acceptance bookkeeping
      if (tx_ready) begin
        accepted++;
        checks++;
        if (!tx_valid) fail("tx_ready without tx_valid");
        if (!inj_reach[tx_link][tx_dest[3:0]]) fail("accepted on a link that cannot reach");
        if (held[tx_link] > int'(DEPTH - PKT)) fail("accepted without room for the packet");
        acc_dest[tx_link] = tx_dest;
        acc_data[tx_link] = tx_data;
      end
      for (int c = 0; c < 2; c++) begin
        if (inj_valid[c]) begin
          checks++;
          held[c]++;
          if (held[c] > int'(DEPTH)) fail("switch buffer overrun");
          if (inj_flit[c].head != (rx_idx[c] == 0)) fail("head mark wrong");
          if (inj_flit[c].tail != (rx_idx[c] == int'(PKT) - 1)) fail("tail mark wrong");
          if (inj_flit[c].sec) fail("sec set by interface");
          if (inj_flit[c].head) begin
            exp_dest[c] = acc_dest[c];
            rx_head[c]  = acc_data[c];
          end
          if (inj_flit[c].dest != exp_dest[c]) fail("dest wrong");
          if (inj_flit[c].data != rx_head[c] + DATA_W'(rx_idx[c])) fail("payload wrong");
          rx_idx[c] = inj_flit[c].tail ? 0 : rx_idx[c] + 1;
          if (inj_flit[c].tail) begin
            pkts_on[c]++;
            delivered++;
          end
        end
      end
    end
  end

  // drain one flit per cycle from each modelled buffer unless stalled
  always @(posedge clk) begin
    #1;
    for (int c = 0; c < 2; c++) begin
      inj_credit[c] = 1'b0;
      if (!stall[c] && held[c] > 0) begin
        inj_credit[c] = 1'b1;
        held[c]--;
      end
    end
  end

  task automatic offer(input int d, input logic [7:0] data, input int limit, output bit ok,
                       output int link);
    int t;
    t = 0;
    ok = 0;
    tx_valid = 1; tx_dest = NODE_W'(d); tx_data = data;
    #1;
    while (!tx_ready && t < limit) begin
      @(posedge clk); #1; t++;
    end
    ok   = tx_ready;
    link = int'(tx_link);
    @(posedge clk);
    #1 tx_valid = 0;
  endtask

  // ---------------- ejection side ----------------
  int credits_back [2];
  int rx_ok [2], rx_bad [2];
  logic [DATA_W-1:0] last_rx [2];

  always @(posedge clk) begin
    if (rst_n)
      for (int c = 0; c < 2; c++) begin
        if (ej_credit[c]) credits_back[c]++;
        if (rx_valid[c]) begin
          last_rx[c] = rx_data[c];
          if (rx_err[c]) rx_bad[c]++; else rx_ok[c]++;
        end
      end
  end

  task automatic eject(input int c, input int dest, input int nflits, input logic [7:0] d0);
    for (int f = 0; f < nflits; f++) begin
      ej_valid[c]      = 1;
      ej_flit[c]       = '0;
      ej_flit[c].head  = (f == 0);
      ej_flit[c].tail  = (f == nflits - 1);
      ej_flit[c].dest  = NODE_W'(dest);
      ej_flit[c].data  = d0 + 8'(f);
      @(posedge clk); #1;
    end
    ej_valid[c] = 0;
    ej_flit[c]  = '0;
  endtask

  initial begin
    bit ok;
    int link, l0, l1;
    tx_valid = 0; tx_dest = '0; tx_data = '0;
    for (int c = 0; c < 2; c++) begin
      held[c] = 0; stall[c] = 0; rx_idx[c] = 0; pkts_on[c] = 0; inj_credit[c] = 0;
      inj_reach[c] = '1; ej_valid[c] = 0; ej_flit[c] = '0;
      credits_back[c] = 0; rx_ok[c] = 0; rx_bad[c] = 0;
    end
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // 1. ties go both ways: many single packets with empty buffers
    l0 = 0; l1 = 0;
    for (int r = 0; r < 40; r++) begin
      offer(r % 16, 8'(r * 4), 20, ok, link);
      repeat (PKT + 2) @(posedge clk);
      #1;
      if (link == 0) l0++; else l1++;
    end
    checks++;
    if (l0 == 0 || l1 == 0) fail($sformatf("ties always resolved one way (%0d/%0d)", l0, l1));

    // 2. most free buffer: stall link 0 with one packet held, link 1 empty
    repeat (PKT + 4) @(posedge clk);
    wait (held[0] == 0 && held[1] == 0);
    #1;
    stall[0] = 1; stall[1] = 1;
    // fill link 0 only
    inj_reach[1] = '0;
    offer(3, 8'h10, 20, ok, link);
    repeat (PKT + 2) @(posedge clk);
    inj_reach[1] = '1;
    #1;
    for (int r = 0; r < 3; r++) begin
      offer(7, 8'h20, 20, ok, link);
      checks++;
      if (!ok || link != 1) fail("did not pick the link with more room");
      checks++;
      if (held[0] != int'(PKT)) fail("selection test set-up wrong");
      repeat (PKT + 2) @(posedge clk);
      #1;
      stall[1] = 0;
      repeat (12) @(posedge clk);
      #1;
      stall[1] = 1;
    end
    stall[1] = 0;

    // 3. no room anywhere: link 0 full (2 packets held), link 1 unreachable
    inj_reach[1] = '0;
    offer(9, 8'h30, 20, ok, link);
    repeat (PKT + 2) @(posedge clk);
    #1;
    offer(9, 8'h40, 10, ok, link);
    checks++;
    if (ok) fail("accepted a packet with no room on any usable link");
    stall[0] = 0;
    repeat (20) @(posedge clk);
    #1;
    inj_reach[1] = '1;

    // 4. reachability: destination 12 only through link 1
    inj_reach[0][12] = 1'b0;
    for (int r = 0; r < 6; r++) begin
      offer(12, 8'h50, 20, ok, link);
      checks++;
      if (!ok || link != 1) fail("used link 0 toward an unreachable destination");
    end
    inj_reach[0] = '1;

    // 5. both links at once: back-to-back offers are taken on different links
    repeat (20) @(posedge clk);
    #1;
    offer(1, 8'h60, 5, ok, l0);
    offer(2, 8'h64, 5, ok, l1);
    checks++;
    if (!ok || l0 == l1) fail("second packet did not use the idle link");
    repeat (30) @(posedge clk);
    checks++;
    if (delivered != accepted) fail($sformatf("accepted %0d sent %0d", accepted, delivered));

    // 6. receive side
    #1;
    fork
      eject(0, NODE, PKT, 8'h80);
      eject(1, NODE, PKT, 8'h90);
    join
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (rx_ok[0] != 1 || rx_ok[1] != 1 || last_rx[0] != 8'h80 || last_rx[1] != 8'h90)
      fail($sformatf("good packets not reported correctly ok=%0d,%0d data=%h,%h cr=%0d,%0d", rx_ok[0], rx_ok[1], last_rx[0], last_rx[1], credits_back[0], credits_back[1]));
    eject(0, NODE + 1, PKT, 8'ha0);      // wrong destination
    eject(1, NODE, PKT - 1, 8'hb0);      // short packet
    repeat (3) @(posedge clk);
    checks++;
    if (rx_bad[0] != 1 || rx_bad[1] != 1) fail("bad packets not flagged");
    checks++;
    if (credits_back[0] != 2 * PKT || credits_back[1] != 2 * PKT - 1)
      fail("ejection credits wrong");

    $display("nic: accepted %0d link0 %0d link1 %0d", accepted, pkts_on[0], pkts_on[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
