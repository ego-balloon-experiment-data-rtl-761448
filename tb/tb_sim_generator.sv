// tb_sim_generator -- checks the simulated signals with a shortened period: every switched
// track carries a PULSE_CYC pulse at the start of each PERIOD_CYC period and unswitched
// tracks stay low; for Mark IV the ID track is high for whole periods, every other period
// (the multivibrator divided by two), and for Mark II/III it is pulsed like the others.
module tb_sim_generator;
  import ego_pkg::*;
  localparam int unsigned P = 20, W = 10;
  logic clk = 1'b0, rst_n = 1'b0, mark4 = 1'b0;
  track_t id_track = track_t'(7);
  logic [NTRACK-1:0] sw, tracks;
  int checks = 0, failures = 0;

  sim_generator #(.PERIOD_CYC(P), .PULSE_CYC(W)) dut (.clk(clk), .rst_n(rst_n), .mark4(mark4),
    .id_track(id_track), .sw(sw), .tracks(tracks));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    sw = 16'b0000_0001_1010_0101;  // tracks 1, 3, 6, 8, 9 switched on
    for (int m = 0; m < 2; m++) begin
      int hi_cnt[NTRACK];
      int id_periods;
      mark4 = m[0];
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      foreach (hi_cnt[t]) hi_cnt[t] = 0;
      id_periods = 0;
      // after reset, phase 0 is the first cycle of a period
      for (int per = 0; per < 8; per++) begin
        int id_hi;
        id_hi = 0;
        for (int ph = 0; ph < int'(P); ph++) begin
          for (int t = 0; t < int'(NTRACK); t++) begin
            if (mark4 && t == int'(id_track)) begin
              if (tracks[t]) id_hi++;
            end else begin
              check(tracks[t] == (sw[t] && ph < int'(W)),
                    $sformatf("mark4=%0d period %0d phase %0d track %0d", m, per, ph, t + 1));
            end
          end
          @(posedge clk); #1;
        end
        if (mark4) begin
          check(id_hi == 0 || id_hi == int'(P), $sformatf("ID partial period (%0d)", id_hi));
          check((id_hi != 0) == (per % 2 == 0), $sformatf("ID period %0d", per));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
