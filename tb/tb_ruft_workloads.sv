// tb_ruft_workloads: the synthetic traffic patterns used to evaluate the
// topologies, at reduced size. Hot-spot traffic (15% of the packets to one
// node) runs on a 4-ary 2-tree FT-RUFT-222, complement traffic (every address
// bit inverted) on a 2-ary 3-tree FT-RUFT-212, and perfect-shuffle traffic
// (address rotated left) on a 2-ary 3-tree RUFT-PL. Every packet must be
// delivered once, intact, to the right node, and each run must have used the
// second link copy somewhere.
module tb_ruft_workloads;
  import ruft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 3;
  logic done [NB];
  int   chk  [NB];
  int   fl   [NB];
  int   ev   [NB][8];

  ruft_net_bench #(.TOPO(FT_RUFT_222), .K(4), .N(2), .PATTERN(1), .PKTS(8), .RATE(30), .HOT(9))
    b0 (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .ev(ev[0]));
  ruft_net_bench #(.TOPO(FT_RUFT_212), .PATTERN(2), .PKTS(12), .RATE(40))
    b1 (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .ev(ev[1]));
  ruft_net_bench #(.TOPO(RUFT_PL),     .PATTERN(3), .PKTS(12), .RATE(40))
    b2 (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .ev(ev[2]));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);   // the benches clear done at time 0
    for (int b = 0; b < NB; b++) wait (done[b]);
    for (int b = 0; b < NB; b++) begin
      checks += chk[b] + 1;
      failures += fl[b];
      if (ev[b][0] == 0) begin
        failures++;
        $display("FAIL: run %0d never used a second link copy", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
