// sim_generator -- simulated tape signals for field checkout (TEST position).
//
// A free-running multivibrator of PERIOD_CYC (1 kHz, the highest data rate) triggers a
// PULSE_CYC (0.5 ms) pulse at the start of every period. Every track whose toggle switch is
// at one receives that pulse, so each period is one parallel word carrying the switch
// pattern; with the index track switch at one the word is strobed. For Mark IV the ID track
// instead receives a binary counter driven by the multivibrator, i.e. the multivibrator
// divided by two: it is high during every other period, so the periods alternate between
// word I (index and ID) and word II (index, no ID), and both words carry the same switches.
// For Mark II/III the counter is not used.
// Interface: sw are the 16 toggle switches, id_track the patched ID track, mark4 the format.
// tracks are the simulated detector outputs, synchronous to clk.
// Frequencies, pulse width and the divide-by-two follow the document; which register
// period comes first after reset is this design's.
module sim_generator
  import ego_pkg::*;
#(
  parameter int unsigned PERIOD_CYC = 1000,
  parameter int unsigned PULSE_CYC  = 500
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mark4,
  input  track_t            id_track,
  input  logic [NTRACK-1:0] sw,
  output logic [NTRACK-1:0] tracks
);
  localparam int unsigned PW = $clog2(PERIOD_CYC);

  logic [PW-1:0] phase;
  logic          bc;
  logic          pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      bc    <= 1'b1;
    end else if (phase == PW'(PERIOD_CYC - 1)) begin
      phase <= '0;
      bc    <= ~bc;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  assign pulse = (phase < PW'(PULSE_CYC));

  always_comb begin
    tracks = sw & {NTRACK{pulse}};
    if (mark4) tracks[id_track] = sw[id_track] & bc;
  end
endmodule
