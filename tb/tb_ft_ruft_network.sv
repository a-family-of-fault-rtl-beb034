// tb_ft_ruft_network: end-to-end test of the three topologies at 2-ary
// 3-tree size (8 nodes, the size of the topology drawings) with 8-flit
// packets and uniform traffic. Each bench instance checks single-packet
// latency, then breaks a random set of links of the size the topology is
// specified to tolerate (RUFT-PL 1 network + 1 injection link, FT-RUFT-212
// 3 network + 1 ejection link, FT-RUFT-222 7 network + 1 injection link)
// and must still deliver every packet.
// The bench also requires that each mechanism happened at least once:
// second-copy link use, secondary ejection routing (FT only), virtual
// cut-through blocking, fault avoidance, injection and ejection through the
// second link.
module tb_ft_ruft_network;
  import ruft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 3;
  logic done [NB];
  int   chk  [NB];
  int   fl   [NB];
  int   ev   [NB][8];

  ruft_net_bench #(.TOPO(RUFT_PL),     .PATTERN(0), .PKTS(12), .RATE(40), .NF_NET(1), .NF_INJ(1))
    b0 (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .ev(ev[0]));
  ruft_net_bench #(.TOPO(FT_RUFT_212), .PATTERN(0), .PKTS(12), .RATE(40), .NF_NET(3), .NF_EJ(1))
    b1 (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .ev(ev[1]));
  ruft_net_bench #(.TOPO(FT_RUFT_222), .PATTERN(0), .PKTS(12), .RATE(40), .NF_NET(7), .NF_INJ(1))
    b2 (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .ev(ev[2]));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
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
    int tot [8];
    for (int i = 0; i < 8; i++) tot[i] = 0;
    @(posedge clk);   // the benches clear done at time 0
    for (int b = 0; b < NB; b++) wait (done[b]);
    for (int b = 0; b < NB; b++) begin
      checks += chk[b];
      failures += fl[b];
      for (int i = 0; i < 8; i++) tot[i] += ev[b][i];
    end
    need(ev[0][0] > 0, "parallel network/ejection link (RUFT-PL)");
    need(ev[2][0] > 0, "parallel network link (FT-RUFT-222)");
    need(ev[1][1] > 0 && ev[2][1] > 0, "secondary ejection routing");
    need(tot[2] > 0, "virtual cut-through blocking");
    need(ev[0][3] + ev[1][3] + ev[2][3] > 0, "fault avoidance");
    need(ev[0][4] > 0 && ev[1][4] > 0 && ev[2][4] > 0, "injection through the second link");
    need(ev[1][5] > 0 && ev[2][5] > 0, "ejection through the secondary link");
    $display("events: copy1=%0d sec=%0d blocked=%0d avoid=%0d inj1=%0d ej1=%0d sent=%0d recv=%0d",
             tot[0], tot[1], tot[2], tot[3], tot[4], tot[5], tot[6], tot[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
