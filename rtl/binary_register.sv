// binary_register -- experiment-word register (A, B or C) and its serial readout gate.
//
// Binary-to-decimal conversion by counting: the register is loaded with the one's
// complement of the data word N (each bit is dc-set when its data line is 0), one extra
// count makes it the two's complement 2**RW - N, and serial count pulses are then applied
// to the register and to a decimal counter together. After exactly N pulses the register
// recycles to zero; that recycle closes the register's gate flip-flop, so the decimal
// counter is left holding N.
//
// Interface (all single-cycle controls, synchronous to clk):
//   load_w1 / load_w2  strobe word I / word II: every plugged bit of that word takes the
//                      complement of its data; unplugged bits take 1 (data 0) on load_w1
//   clear              reset register and gate (the "reset binary registers" pulse)
//   extra              add the extra count (one's -> two's complement)
//   start              open the gate flip-flop, unless the register is already zero (N = 0)
//   cnt_pulse          count pulse from the shared readout clock
//   cnt_out            cnt_pulse passed through the gate: the decimal counter's input
// Loading the complement, the extra count, the gate flip-flop and its reset on recycle
// follow the document. Not opening the gate for N = 0 is this design's choice: the
// register is then already recycled and the word must read 000.
module binary_register
  import ego_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  reg_in_t       rin,
  input  logic          load_w1,
  input  logic          load_w2,
  input  logic          clear,
  input  logic          extra,
  input  logic          start,
  input  logic          cnt_pulse,
  output logic [RW-1:0] value,
  output logic          cnt_out,
  output logic          active
);
  logic [RW-1:0] q;
  logic          gate;

  assign cnt_out = cnt_pulse & gate;
  assign value   = q;
  assign active  = gate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      gate <= 1'b0;
    end else if (clear) begin
      q    <= '0;
      gate <= 1'b0;
    end else begin
      for (int i = 0; i < int'(RW); i++) begin
        if (rin.used[i]) begin
          if ((load_w1 && !rin.w2[i]) || (load_w2 && rin.w2[i])) q[i] <= ~rin.d[i];
        end else if (load_w1) begin
          q[i] <= 1'b1;
        end
      end
      if (extra) q <= q + 1'b1;
      if (start) gate <= (q != '0);
      if (cnt_out) begin
        q <= q + 1'b1;
        if (q == '1) gate <= 1'b0;  // recycling to zero ends the readout
      end
    end
  end
endmodule
