// split_decimal_counter -- six-stage decimal counter split into two three-stage halves.
//
// The processor prints through two six-digit decimal counters whose stages were separated
// into two independent three-digit counters, each with its own count input and a common
// reset: counter "A" takes word A (upper half) and word C (lower half, the split input);
// counter "B" takes word B and the sensitivity bit. Each half counts to 999.
// Interface: cnt_hi / cnt_lo count pulses (one count per cycle high), clr the common reset.
// The split and the pairing of words follow the document; being built from two bcd_counter
// halves is this design's.
module split_decimal_counter
  import ego_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic cnt_hi,
  input  logic cnt_lo,
  output bcd_t q_hi,
  output bcd_t q_lo
);
  bcd_counter u_hi (.clk(clk), .rst_n(rst_n), .clr(clr), .inc(cnt_hi), .q(q_hi));
  bcd_counter u_lo (.clk(clk), .rst_n(rst_n), .clr(clr), .inc(cnt_lo), .q(q_lo));
endmodule
