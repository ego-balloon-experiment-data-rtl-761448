// tb_test_procedure -- the field test procedure in TEST mode, at full size: for each
// format, every test toggle switch is thrown to one on its own (with the index switch,
// and for Mark IV the ID switch, also on) and the next printout is compared with the value
// that switch's track carries in the word formats:
//   Mark II/III (AB mode): switch k = 1..7 -> A = 2**(k-1); 8..14 -> B = 2**(k-8);
//                          15 -> C = 1; index alone -> all zero.
//   Mark IV: both words carry the switches, so switch k = 1..7 -> A = B = 2**(k-1);
//            10, 11 -> A = B = 128, 256; 12..15 -> C = 2**(k-12) + 2**(k-7);
//            16 -> C = 16 and sensitivity 1; index and ID alone -> all zero.
// The front-panel lamp of a switched track must light while its switch is on. Every print
// must come at least 200 ms after the previous one.
module tb_test_procedure;
  import ego_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NTRACK-1:0] sim_sw = '0, lamp, dma_out;
  logic print_cmd, lockout, busy, index_dma;
  patch_cfg_t patch;
  bcd_t word_a, word_c, word_b, word_s;

  ego_processor dut (
    .clk(clk), .rst_n(rst_n), .track_det('0), .test_mode(1'b1), .sim_sw(sim_sw),
    .patch(patch), .abc_mode(1'b0), .lamp(lamp), .dma_out(dma_out), .index_dma(index_dma),
    .word_a(word_a), .word_c(word_c), .word_b(word_b), .word_s(word_s),
    .print_cmd(print_cmd), .lockout(lockout), .busy(busy)
  );

  always #500 clk = ~clk;  // 1 MHz

  int checks = 0, failures = 0, n_prints = 0;
  longint cyc = 0, last_print = -1;

  function automatic int val(input bcd_t d);
    return 100 * int'(d[2]) + 10 * int'(d[1]) + int'(d[0]);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (print_cmd) begin
      n_prints <= n_prints + 1;
      if (last_print >= 0) check(cyc - last_print >= 200000, "prints closer than 200 ms");
      last_print <= cyc;
    end
  end

  // Throw one switch, wait for a whole new print, compare.
  task automatic run_switch(input int sw_no, input logic [NTRACK-1:0] base,
                            input int a, input int b, input int c, input int s, input string fmt);
    int n0, lit;
    sim_sw = base;
    if (sw_no > 0) sim_sw[sw_no - 1] = 1'b1;
    // let any word already in progress finish, then wait for a new print
    do @(posedge clk); while (busy);
    n0 = n_prints;
    lit = 0;
    while (n_prints == n0) begin
      @(posedge clk);
      if (sw_no > 0 && lamp[sw_no - 1]) lit++;
    end
    check(val(word_a) == a && val(word_b) == b && val(word_c) == c && val(word_s) == s,
          $sformatf("%s switch %0d: printed %03d %03d %03d %0d, expected %03d %03d %03d %0d",
                    fmt, sw_no, val(word_a), val(word_b), val(word_c), val(word_s), a, b, c, s));
    if (sw_no > 0) check(lit > 0, $sformatf("%s switch %0d: lamp never lit", fmt, sw_no));
    sim_sw = '0;
    do @(posedge clk); while (lockout);
  endtask

  initial begin
    logic [NTRACK-1:0] base;
    patch = mark23_panel();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // Mark II/III: index switch (track 16) always on
    base = '0;
    base[15] = 1'b1;
    for (int k = 1; k <= 15; k++)
      run_switch(k, base, (k <= 7) ? (1 << (k - 1)) : 0,
                 (k >= 8 && k <= 14) ? (1 << (k - 8)) : 0, (k == 15) ? 1 : 0, 0, "MkII/III");
    run_switch(0, base, 0, 0, 0, 0, "MkII/III index only");

    // Mark IV: ID (track 8) and index (track 9) switches always on
    patch = mark4_panel();
    base = '0;
    base[7] = 1'b1;
    base[8] = 1'b1;
    for (int k = 1; k <= 16; k++) begin
      int a, c, s;
      if (k == 8 || k == 9) continue;
      a = (k <= 7) ? (1 << (k - 1)) : (k == 10) ? 128 : (k == 11) ? 256 : 0;
      c = (k >= 12 && k <= 15) ? (1 << (k - 12)) + (1 << (k - 7)) : (k == 16) ? 16 : 0;
      s = (k == 16) ? 1 : 0;
      run_switch(k, base, a, a, c, s, "MkIV");
    end
    run_switch(0, base, 0, 0, 0, 0, "MkIV index and ID only");

    check(n_prints == 31, $sformatf("%0d prints, expected 31", n_prints));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
