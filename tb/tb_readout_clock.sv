// tb_readout_clock -- checks the readout pulse source: after start, a one-cycle count pulse
// every PERIOD_CYC cycles, the first one PERIOD_CYC cycles after start, RUN_CYC/PERIOD_CYC
// pulses in all, done exactly RUN_CYC cycles after start, and nothing outside the run.
module tb_readout_clock;
  localparam int unsigned P = 10, R = 1000;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, running, cnt_pulse, done;
  int checks = 0, failures = 0, cyc = 0, n_pulse = 0, first = -1, last_gap_bad = 0;
  int t_start = 0, t_done = -1, prev = -1;

  readout_clock #(.PERIOD_CYC(P), .RUN_CYC(R)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .running(running), .cnt_pulse(cnt_pulse), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cnt_pulse) begin
      n_pulse <= n_pulse + 1;
      if (first < 0) first <= cyc;
      if (prev >= 0 && cyc - prev != int'(P)) last_gap_bad <= last_gap_bad + 1;
      prev <= cyc;
    end
    if (done) t_done <= cyc;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    check(n_pulse == 0, "pulses before start");
    for (int run = 0; run < 2; run++) begin
      n_pulse = 0; first = -1; prev = -1; t_done = -1; last_gap_bad = 0;
      @(negedge clk) start = 1'b1;
      @(posedge clk) t_start = cyc;
      @(negedge clk) start = 1'b0;
      repeat (R + 50) @(posedge clk);
      #1;
      check(n_pulse == int'(R / P), $sformatf("run %0d: %0d pulses", run, n_pulse));
      check(first == t_start + int'(P), $sformatf("run %0d: first pulse at +%0d", run, first - t_start));
      check(last_gap_bad == 0, "uneven pulse spacing");
      check(t_done == t_start + int'(R), $sformatf("run %0d: done at +%0d", run, t_done - t_start));
      check(!running, "still running after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
