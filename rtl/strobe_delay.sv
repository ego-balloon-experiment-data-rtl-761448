// strobe_delay -- index-bit memory and data strobe.
//
// The index marker says a parallel word is on the tape. Its leading edge starts a memory of
// half the data-memory time (0.3 ms by default); the trailing edge of that memory is the
// data strobe, which therefore samples the 0.6 ms data memories in the centre of their
// storage cycle and tolerates a data track leading or lagging the index by up to 0.3 ms.
// With default timing the strobe follows the index leading edge by DELAY_CYC+1 cycles.
//
// Interface: idx is the synchronised detector output of the patched index track. busy is
// the index memory (the front-panel "DMA output" of the index bit). strobe is a one-cycle
// pulse on the trailing edge of busy. The 0.3 ms delay is the document's; the one-cycle
// strobe (the original strobe is a 10 us pulse) is this design's.
module strobe_delay #(
  parameter int unsigned DELAY_CYC = 300
) (
  input  logic clk,
  input  logic rst_n,
  input  logic idx,
  output logic busy,
  output logic strobe
);
  logic busy_q;

  temp_memory #(.DUR_CYC(DELAY_CYC)) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .det  (idx),
    .mem  (busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end

  assign strobe = busy_q && !busy;
endmodule
