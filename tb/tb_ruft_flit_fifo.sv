// tb_ruft_flit_fifo: self-checking test of the switch input buffer.
// Random pushes and pops (never pushing into a full queue, as credit flow
// control guarantees) are compared against a reference queue; the test also
// fills the buffer to its full two-packet depth and drains it.
module tb_ruft_flit_fifo;
  import ruft_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  wr_valid, rd_valid, rd_pop;
  flit_t wr_flit, rd_flit;

  int checks = 0, failures = 0;
  flit_t ref_q [$];

  ruft_flit_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic push, input logic popr, input logic [7:0] val);
    wr_valid = push;
    wr_flit  = '0;
    wr_flit.data = val;
    wr_flit.dest = NODE_W'(val) ^ 16'h5a5a;
    wr_flit.head = val[0];
    rd_pop   = popr;
    #1;
    // compare the visible head with the reference
    checks++;
    if (rd_valid != (ref_q.size() != 0)) begin
      failures++;
      $display("valid mismatch: dut=%0b ref_size=%0d", rd_valid, ref_q.size());
    end else if (rd_valid && rd_flit != ref_q[0]) begin
      failures++;
      $display("data mismatch: dut=%h ref=%h", rd_flit, ref_q[0]);
    end
    @(posedge clk);
    if (popr && ref_q.size() != 0) void'(ref_q.pop_front());
    if (push) ref_q.push_back(wr_flit);
    #1;
  endtask

  initial begin
    wr_valid = 0; rd_pop = 0; wr_flit = '0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // fill to full depth, then drain
    for (int i = 0; i < int'(DEPTH); i++) step(1'b1, 1'b0, 8'(i + 1));
    checks++;
    if (ref_q.size() != DEPTH || !rd_valid) begin
      failures++; $display("fill failed");
    end
    for (int i = 0; i < int'(DEPTH); i++) step(1'b0, 1'b1, 8'h00);
    checks++;
    if (rd_valid) begin failures++; $display("not empty after drain"); end
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic push, popr;
      push = ($urandom % 2) && (ref_q.size() < DEPTH || 1'b0);
      popr = $urandom % 2;
      if (ref_q.size() == DEPTH && !popr) push = 1'b0;
      step(push, popr, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
