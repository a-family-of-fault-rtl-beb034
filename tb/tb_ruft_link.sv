// tb_ruft_link: self-checking test of a network link.
// Drives random flits and credit pulses into links with delay 1 and delay 4
// and checks that each appears at the other end exactly DELAY cycles later.
module tb_ruft_link;
  import ruft_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  tv1, rv1, tc1, rc1, tv4, rv4, tc4, rc4;
  flit_t tf, rf1, rf4;

  ruft_link #(.DELAY(1)) u1 (.clk, .rst_n, .tx_valid(tv1), .tx_flit(tf), .tx_credit(tc1),
                             .rx_valid(rv1), .rx_flit(rf1), .rx_credit(rc1));
  ruft_link #(.DELAY(4)) u4 (.clk, .rst_n, .tx_valid(tv4), .tx_flit(tf), .tx_credit(tc4),
                             .rx_valid(rv4), .rx_flit(rf4), .rx_credit(rc4));

  // history of driven values, index = cycle
  logic  hv1 [0:999], hc1 [0:999], hv4 [0:999], hc4 [0:999];
  flit_t hf  [0:999];

  initial begin
    tv1 = 0; tv4 = 0; rc1 = 0; rc4 = 0; tf = '0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      #1;
      tv1 = 1'($urandom); tv4 = 1'($urandom);
      rc1 = 1'($urandom); rc4 = 1'($urandom);
      tf  = '0;
      tf.data = 8'($urandom); tf.dest = 16'($urandom); tf.tail = 1'($urandom);
      hv1[cyc] = tv1; hc1[cyc] = rc1; hv4[cyc] = tv4; hc4[cyc] = rc4; hf[cyc] = tf;
      // outputs now show what was driven DELAY cycles ago
      if (cyc >= 1) begin
        checks++;
        if (rv1 != hv1[cyc-1] || tc1 != hc1[cyc-1] || (rv1 && rf1 != hf[cyc-1])) begin
          failures++; $display("delay-1 mismatch at %0d", cyc);
        end
      end
      if (cyc >= 4) begin
        checks++;
        if (rv4 != hv4[cyc-4] || tc4 != hc4[cyc-4] || (rv4 && rf4 != hf[cyc-4])) begin
          failures++; $display("delay-4 mismatch at %0d", cyc);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
