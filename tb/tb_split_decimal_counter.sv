// tb_split_decimal_counter -- counts random numbers of pulses into both halves of the split
// counter (the halves at once, with different counts) and compares the BCD digits with the
// decimal digits of the count modulo 1000; also checks the common clear, and that a pulse
// coinciding with the clear counts as the first pulse.
module tb_split_decimal_counter;
  import ego_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, hi = 1'b0, lo = 1'b0;
  bcd_t q_hi, q_lo;
  int checks = 0, failures = 0;

  split_decimal_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .cnt_hi(hi), .cnt_lo(lo),
                             .q_hi(q_hi), .q_lo(q_lo));

  always #5 clk = ~clk;

  function automatic int bcd_val(input bcd_t b);
    return 100 * int'(b[2]) + 10 * int'(b[1]) + int'(b[0]);
  endfunction

  function automatic logic digits_ok(input bcd_t b);
    return b[0] <= 9 && b[1] <= 9 && b[2] <= 9;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 12; trial++) begin
      int nh, nl;
      nh = (trial == 0) ? 999 : (trial == 1) ? 1003 : int'($urandom_range(0, 1200));
      nl = int'($urandom_range(0, 600));
      @(negedge clk) clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      checks++;
      if (q_hi != '0 || q_lo != '0) begin failures++; $display("FAIL clear"); end
      for (int i = 0; i < ((nh > nl) ? nh : nl); i++) begin
        hi = (i < nh);
        lo = (i < nl);
        @(negedge clk);
      end
      hi = 1'b0; lo = 1'b0;
      @(negedge clk);
      checks++;
      if (!digits_ok(q_hi) || bcd_val(q_hi) != nh % 1000 ||
          !digits_ok(q_lo) || bcd_val(q_lo) != nl % 1000) begin
        failures++;
        $display("FAIL hi %0d lo %0d -> %h %h", nh, nl, q_hi, q_lo);
      end
    end
    // clear and count in the same cycle
    @(negedge clk) begin clr = 1'b1; lo = 1'b1; end
    @(negedge clk) begin clr = 1'b0; lo = 1'b0; end
    checks++;
    if (bcd_val(q_lo) != 1 || bcd_val(q_hi) != 0) begin
      failures++; $display("FAIL clear with count: %h %h", q_hi, q_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
