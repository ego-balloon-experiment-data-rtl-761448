// bcd_counter -- three-stage decimal counter, one half of a split six-stage counter.
//
// Counts input pulses in BCD, digit 0 being the units; 999 rolls over to 000. clr sets the
// counter to zero; a pulse arriving in the same cycle as clr is counted after it, so a
// clear and the first count may coincide. One count per clock cycle with inc high.
// Counting in decimal follows the document; the clear-then-count order is this design's.
module bcd_counter
  import ego_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic inc,
  output bcd_t q
);
  function automatic bcd_t bcd_inc(input bcd_t v);
    bcd_t   r     = v;
    logic   carry = 1'b1;
    for (int i = 0; i < int'(NDIG); i++) begin
      if (carry) begin
        if (r[i] == 4'd9) r[i] = 4'd0;
        else begin
          r[i]  = r[i] + 4'd1;
          carry = 1'b0;
        end
      end
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= inc ? bcd_t'(1) : '0;
    else if (inc) q <= bcd_inc(q);
  end
endmodule
