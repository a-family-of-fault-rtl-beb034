// ruft_link: one unidirectional network link with credit return.
//
// Flits travel downstream through DELAY register stages and credits (one
// pulse per freed buffer slot at the receiver) travel back upstream through
// the same number of stages. A fault can be modelled by the caller simply by
// never selecting the link; the link itself has no fault state. Network links
// between switches use a one-cycle flight, and the links from the last stage
// to the end nodes use the longer flight time stages*fly+1.
module ruft_link
  import ruft_pkg::*;
#(
  parameter int unsigned DELAY = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // upstream side
  input  logic  tx_valid,
  input  flit_t tx_flit,
  output logic  tx_credit,
  // downstream side
  output logic  rx_valid,
  output flit_t rx_flit,
  input  logic  rx_credit
);

  logic  v_q [DELAY];
  flit_t f_q [DELAY];
  logic  c_q [DELAY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DELAY); i++) begin
        v_q[i] <= 1'b0;
        c_q[i] <= 1'b0;
      end
    end else begin
      v_q[0] <= tx_valid;
      c_q[0] <= rx_credit;
      for (int i = 1; i < int'(DELAY); i++) begin
        v_q[i] <= v_q[i-1];
        c_q[i] <= c_q[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    f_q[0] <= tx_flit;
    for (int i = 1; i < int'(DELAY); i++) f_q[i] <= f_q[i-1];
  end

  assign rx_valid  = v_q[DELAY-1];
  assign rx_flit   = f_q[DELAY-1];
  assign tx_credit = c_q[DELAY-1];

endmodule
