// temp_memory -- temporary bit memory of one tape track (the "DMA" delay multivibrator).
//
// Tape skew makes the "one" pulses of the 16 tracks arrive at slightly different times.
// Each track therefore has a memory that, on the leading edge of a detected pulse, holds a
// one for a fixed time (0.6 ms by default); the index strobe samples all memories at once
// in the middle of that window. Like the monostable it replaces, the memory is not
// retriggerable: an edge that arrives while it is holding is ignored.
//
// Interface: det is the level-detector output of the track, already synchronised to clk.
// mem is high for exactly DUR_CYC clock cycles, starting the cycle after the first cycle
// det is seen high. Clock: 1 MHz by default (the 1 Mc logic family of the original), so
// DUR_CYC = 600 is 0.6 ms. The hold time follows the document; the non-retriggering and
// the one-clock timing are this design's choices.
module temp_memory #(
  parameter int unsigned DUR_CYC = 600
) (
  input  logic clk,
  input  logic rst_n,
  input  logic det,
  output logic mem
);
  localparam int unsigned CW = $clog2(DUR_CYC + 1);

  logic          det_q;
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_q <= 1'b0;
      left  <= '0;
    end else begin
      det_q <= det;
      if (left != '0)
        left <= left - 1'b1;
      else if (det && !det_q)
        left <= CW'(DUR_CYC);
    end
  end

  assign mem = (left != '0);
endmodule
