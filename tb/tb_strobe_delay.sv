// tb_strobe_delay -- checks that the data strobe is a single-cycle pulse DELAY_CYC + 1
// cycles after the first cycle the index is seen high, that the index memory is busy for
// DELAY_CYC cycles, and that a second index edge while busy does not add a strobe.
module tb_strobe_delay;
  localparam int unsigned D = 30;
  logic clk = 1'b0, rst_n = 1'b0, idx = 1'b0, busy, strobe;
  int checks = 0, failures = 0;
  int cyc = 0, t_edge = -1, n_strobe = 0, last_strobe = -1, n_busy = 0;

  strobe_delay #(.DELAY_CYC(D)) dut (.clk(clk), .rst_n(rst_n), .idx(idx), .busy(busy),
                                     .strobe(strobe));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (strobe) begin
      n_strobe    <= n_strobe + 1;
      last_strobe <= cyc;
    end
    if (busy) n_busy <= n_busy + 1;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      int s0, b0;
      s0 = n_strobe; b0 = n_busy;
      #1 idx = 1'b1;
      @(posedge clk); t_edge = cyc;  // clock edge at which idx is first sampled high
      repeat (5 + k) @(posedge clk);
      #1 idx = 1'b0;
      if (k == 1) begin  // a second edge inside the memory time
        repeat (3) @(posedge clk);
        #1 idx = 1'b1;
        repeat (2) @(posedge clk);
        #1 idx = 1'b0;
      end
      repeat (D + 10) @(posedge clk);
      check(n_strobe == s0 + 1, $sformatf("episode %0d: %0d strobes", k, n_strobe - s0));
      check(last_strobe == t_edge + D + 1,
            $sformatf("episode %0d: strobe at +%0d, expected +%0d", k, last_strobe - t_edge, D + 1));
      check(n_busy == b0 + D, $sformatf("episode %0d: busy %0d cycles", k, n_busy - b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
