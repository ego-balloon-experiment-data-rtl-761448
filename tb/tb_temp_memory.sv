// tb_temp_memory -- checks the temporary bit memory: a pulse edge gives exactly DUR_CYC
// cycles of memory starting the next cycle, a second edge while holding is ignored, and an
// edge after the memory has ended starts it again. A shortened hold time keeps it quick.
module tb_temp_memory;
  localparam int unsigned DUR = 20;
  logic clk = 1'b0, rst_n = 1'b0, det = 1'b0, mem;
  int checks = 0, failures = 0;

  temp_memory #(.DUR_CYC(DUR)) dut (.clk(clk), .rst_n(rst_n), .det(det), .mem(mem));

  always #5 clk = ~clk;

  task automatic expect_high_for(input int n, input string what);
    int hi = 0;
    for (int i = 0; i < n + 5; i++) begin
      @(posedge clk); #1;
      if (mem) hi++;
    end
    checks++;
    if (hi != n) begin
      failures++;
      $display("FAIL %s: memory high %0d cycles, expected %0d", what, hi, n);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++; if (mem) begin failures++; $display("FAIL memory set after reset"); end
    // single short pulse: the memory outlasts it
    det = 1'b1; @(posedge clk); #1;
    checks++; if (!mem) begin failures++; $display("FAIL memory not set one cycle after edge"); end
    det = 1'b0;
    expect_high_for(DUR - 1, "short pulse");
    // long pulse, then a second edge during the hold: not retriggered
    repeat (5) @(posedge clk);
    #1 det = 1'b1;
    fork
      begin
        repeat (4) @(posedge clk);
        #1 det = 1'b0;
        repeat (3) @(posedge clk);
        #1 det = 1'b1;
        repeat (2) @(posedge clk);
        #1 det = 1'b0;
      end
      expect_high_for(DUR, "second edge while holding");
    join
    repeat (DUR + 5) @(posedge clk);
    // count one whole episode from a clean start
    #1 det = 1'b1;
    fork
      begin @(posedge clk); #1 det = 1'b0; end
      expect_high_for(DUR, "full hold");
    join
    // level held high for long: one memory only
    #1 det = 1'b1;
    expect_high_for(DUR, "level held high");
    det = 1'b0;
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
