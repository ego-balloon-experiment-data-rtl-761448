// readout_clock -- shared count-pulse multivibrator for the serial readout.
//
// A start pulse sets the start flip-flop, which starts a free-running pulse source in step
// with it: a one-cycle count pulse every PERIOD_CYC cycles, the first PERIOD_CYC cycles
// after start. RUN_CYC cycles (10 ms) after start the flip-flop is reset, the pulses stop
// and done pulses for one cycle. The same pulses go to all three registers, each of which
// gates them with its own flip-flop.
// The synchronous start and the 10 ms run time follow the document. The pulse rate is not
// given there; 100 kHz (PERIOD_CYC = 10 at 1 MHz) is this design's choice and reads out the
// largest 9-bit word, 511 counts, in 5.11 ms, well inside the 10 ms.
module readout_clock #(
  parameter int unsigned PERIOD_CYC = 10,
  parameter int unsigned RUN_CYC    = 10000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic running,
  output logic cnt_pulse,
  output logic done
);
  localparam int unsigned PW = $clog2(PERIOD_CYC + 1);
  localparam int unsigned RW_ = $clog2(RUN_CYC + 1);

  logic [PW-1:0]  phase;
  logic [RW_-1:0] left;

  assign cnt_pulse = running && (phase == PW'(PERIOD_CYC - 1));
  assign done      = running && (left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      phase   <= '0;
      left    <= '0;
    end else begin
      if (start) begin
        running <= 1'b1;
        phase   <= '0;
        left    <= RW_'(RUN_CYC - 1);
      end else if (running) begin
        phase <= cnt_pulse ? '0 : phase + 1'b1;
        if (done) begin
          running <= 1'b0;
        end else begin
          left <= left - 1'b1;
        end
      end
    end
  end
endmodule
