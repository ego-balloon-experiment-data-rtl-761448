// tb_ego_processor -- end-to-end test of the data processor at its default (full) size:
// 1 MHz clock, 0.6 ms / 0.3 ms memories, 10 ms readout and 200 ms lockout.
//
// A tape model drives the 16 detector lines with 0.4 ms "one" pulses; every data track can
// be skewed against the index by up to +-250 us. A printer model takes the four counter
// halves on each print command and checks that prints are at least 200 ms apart. The
// expected printouts are worked out here from the data words, not from the design.
//
// Scenarios and the mechanisms they must show (each is counted, and a mechanism that
// never happened is a failure):
//   Mark II/III tape words, AB mode, with and without skew    -> accept, skew
//   a word during the 200 ms lockout                           -> lockout
//   ABC-bar mode with C present / absent                       -> C inhibit
//   preset 2**3: word A = 5 rejected, 8 accepted              -> reject
//   Mark IV two-word events with sensitivity bit                -> Mark IV, sensitivity
//   Mark IV word I with no word II                              -> window timeout
//   TEST mode, Mark II/III and Mark IV switch patterns          -> simulation
// The latency from the index to the print command and the lockout length are checked.
module tb_ego_processor;
  import ego_pkg::*;

  localparam int unsigned PW   = 400;  // width of a tape "one" above threshold, cycles
  localparam int unsigned SKEW = 250;  // largest skew used, cycles

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NTRACK-1:0] track_det = '0, sim_sw = '0, lamp, dma_out;
  logic test_mode = 1'b0, abc_mode = 1'b0, print_cmd, lockout, busy, index_dma;
  patch_cfg_t patch;
  bcd_t word_a, word_c, word_b, word_s;

  ego_processor dut (
    .clk(clk), .rst_n(rst_n), .track_det(track_det), .test_mode(test_mode), .sim_sw(sim_sw),
    .patch(patch), .abc_mode(abc_mode), .lamp(lamp), .dma_out(dma_out),
    .index_dma(index_dma), .word_a(word_a), .word_c(word_c), .word_b(word_b),
    .word_s(word_s), .print_cmd(print_cmd), .lockout(lockout), .busy(busy)
  );

  always #500 clk = ~clk;  // 1 MHz

  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_accept = 0, n_skew = 0, n_lockout = 0, n_cinhibit = 0, n_reject = 0;
  int n_mark4 = 0, n_sens = 0, n_window = 0, n_sim23 = 0, n_sim4 = 0;

  // printer model
  typedef struct { int a, b, c, s; longint t; } print_t;
  print_t prints[$];
  longint last_print = -1;
  longint lock_start = -1;
  int     lock_len = -1;

  function automatic int val(input bcd_t d);
    return 100 * int'(d[2]) + 10 * int'(d[1]) + int'(d[0]);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0d us)", what, cyc); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (print_cmd) begin
      print_t p;
      p.a = val(word_a); p.b = val(word_b); p.c = val(word_c); p.s = val(word_s); p.t = cyc;
      prints.push_back(p);
      if (last_print >= 0) check(cyc - last_print >= 200000, "printer given a line while printing");
      last_print <= cyc;
    end
    if (lockout && lock_start < 0) lock_start <= cyc;
    if (!lockout && lock_start >= 0) begin
      lock_len   <= int'(cyc - lock_start);
      lock_start <= -1;
    end
  end

  // ---------------- tape model ----------------
  int sk[NTRACK];

  task automatic set_skew(input bit on, input int index_track);
    for (int t = 0; t < int'(NTRACK); t++)
      sk[t] = (on && t != index_track) ? int'($urandom_range(0, 2 * SKEW)) - int'(SKEW) : 0;
  endtask

  // Drive one or two parallel words; word 2 (if two) has its index 1 ms after word 1.
  task automatic tape(input logic [NTRACK-1:0] w1, input logic two, input logic [NTRACK-1:0] w2);
    int last = two ? 1000 + int'(PW + SKEW) : int'(PW + SKEW);
    for (int c = -int'(SKEW); c <= last; c++) begin
      logic [NTRACK-1:0] v;
      for (int t = 0; t < int'(NTRACK); t++) begin
        v[t] = (w1[t] && c >= sk[t] && c < sk[t] + int'(PW)) ||
               (two && w2[t] && c >= 1000 + sk[t] && c < 1000 + sk[t] + int'(PW));
      end
      @(negedge clk) track_det = v;
    end
    @(negedge clk) track_det = '0;
  endtask

  function automatic logic [NTRACK-1:0] mk23_word(input int a, input int b, input logic c);
    logic [NTRACK-1:0] w;
    w[6:0]  = 7'(a);
    w[13:7] = 7'(b);
    w[14]   = c;
    w[15]   = 1'b1;  // index
    return w;
  endfunction

  function automatic logic [NTRACK-1:0] mk4_word1(input int a, input int c);
    logic [NTRACK-1:0] w;
    w[6:0]   = 7'(a);
    w[7]     = 1'b1;  // ID
    w[8]     = 1'b1;  // index
    w[10:9]  = 2'(a >> 7);
    w[15:11] = 5'(c);
    return w;
  endfunction

  function automatic logic [NTRACK-1:0] mk4_word2(input int b, input int c, input logic s);
    logic [NTRACK-1:0] w;
    w[6:0]   = 7'(b);
    w[7]     = 1'b0;  // no ID
    w[8]     = 1'b1;  // index
    w[10:9]  = 2'(b >> 7);
    w[14:11] = 4'(c >> 5);
    w[15]    = s;
    return w;
  endfunction

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // Wait until the processor is idle and not locked out.
  task automatic settle();
    do @(posedge clk); while (busy || lockout);
    wait_cycles(10);
  endtask

  // Expect exactly one new print with these values; return it.
  task automatic expect_print(input int n0, input int a, input int b, input int c, input int s,
                              input string what, output logic ok);
    ok = (prints.size() == n0 + 1);
    check(ok, $sformatf("%s: %0d prints, expected 1", what, prints.size() - n0));
    if (ok) begin
      print_t p = prints[n0];
      ok = (p.a == a && p.b == b && p.c == c && p.s == s);
      check(ok, $sformatf("%s: printed A=%03d B=%03d C=%03d S=%0d, expected %03d %03d %03d %0d",
                          what, p.a, p.b, p.c, p.s, a, b, c, s));
    end
  endtask

  task automatic expect_no_print(input int n0, input string what, output logic ok);
    ok = (prints.size() == n0);
    check(ok, $sformatf("%s: %0d unexpected prints", what, prints.size() - n0));
  endtask

  initial begin
    logic ok;
    int n0, a, b, c, s;
    longint t0;

    patch = mark23_panel();
    wait_cycles(5);
    rst_n = 1'b1;
    wait_cycles(20);

    // ---- Mark II/III tape, AB mode, no skew, then with skew ----
    for (int k = 0; k < 6; k++) begin
      a = (k == 0) ? 127 : (k == 1) ? 0 : int'($urandom_range(0, 127));
      b = (k == 0) ? 0 : (k == 1) ? 127 : int'($urandom_range(0, 127));
      c = k % 2;
      set_skew(k >= 2, 15);
      n0 = prints.size();
      t0 = cyc;
      tape(mk23_word(a, b, c[0]), 1'b0, '0);
      wait_cycles(12000);
      expect_print(n0, a, b, c, 0, $sformatf("MkII/III word %0d", k), ok);
      if (ok) begin
        n_accept++;
        if (k >= 2) n_skew++;
        if (k == 0) $display("index-to-print latency: %0d cycles", prints[n0].t - (t0 + SKEW + 1));
        // index leading edge at t0 + SKEW + 1: strobe ~0.3 ms later, then 10 us, 100 us, 10 ms
        check(prints[n0].t - (t0 + SKEW + 1) >= 10400 && prints[n0].t - (t0 + SKEW + 1) <= 10420,
              $sformatf("MkII/III latency %0d cycles", prints[n0].t - (t0 + SKEW + 1)));
      end
      if (k == 0) begin
        // ---- a word arriving in the lockout is ignored ----
        n0 = prints.size();
        wait_cycles(40000);
        check(lockout, "lockout running 50 ms after accept");
        tape(mk23_word(5, 5, 1'b0), 1'b0, '0);
        settle();
        expect_no_print(n0, "word during lockout", ok);
        if (ok) n_lockout++;
        check(lock_len == 200000, $sformatf("lockout lasted %0d cycles", lock_len));
      end
      settle();
    end

    // ---- ABC-bar mode ----
    abc_mode = 1'b1;
    set_skew(1, 15);
    n0 = prints.size();
    tape(mk23_word(77, 33, 1'b1), 1'b0, '0);
    wait_cycles(12000);
    expect_no_print(n0, "ABC-bar with C", ok);
    check(!busy && !lockout, "ABC-bar with C leaves the processor idle");
    if (ok) n_cinhibit++;
    tape(mk23_word(77, 33, 1'b0), 1'b0, '0);
    wait_cycles(12000);
    expect_print(n0, 77, 33, 0, 0, "ABC-bar without C", ok);
    settle();
    abc_mode = 1'b0;

    // ---- preset: accept word A >= 8 only ----
    patch.process_all = 1'b0;
    patch.preset_mask = preset_ge_pow2(3);
    n0 = prints.size();
    tape(mk23_word(5, 100, 1'b0), 1'b0, '0);
    wait_cycles(2000);
    expect_no_print(n0, "word A 5 below preset 8", ok);
    check(!busy && !lockout && dut.u_reg_b.value == '0, "reject clears registers, no lockout");
    if (ok) n_reject++;
    tape(mk23_word(8, 100, 1'b0), 1'b0, '0);
    wait_cycles(12000);
    expect_print(n0, 8, 100, 0, 0, "word A 8 at preset 8", ok);
    settle();
    patch = mark23_panel();

    // ---- Mark IV tape events ----
    patch = mark4_panel();
    wait_cycles(10);
    for (int k = 0; k < 5; k++) begin
      a = (k == 0) ? 511 : int'($urandom_range(0, 511));
      b = (k == 1) ? 511 : int'($urandom_range(0, 511));
      c = (k == 2) ? 511 : int'($urandom_range(0, 511));
      s = k % 2;
      set_skew(k >= 1, 8);
      n0 = prints.size();
      tape(mk4_word1(a, c), 1'b1, mk4_word2(b, c, s[0]));
      wait_cycles(12000);
      expect_print(n0, a, b, c, s, $sformatf("MkIV event %0d", k), ok);
      if (ok) begin
        n_mark4++;
        if (s != 0) n_sens++;
        if (k >= 1) n_skew++;
      end
      settle();
    end

    // ---- Mark IV word I without word II ----
    n0 = prints.size();
    tape(mk4_word1(300, 7), 1'b0, '0);
    check(busy, "waiting for word II");
    wait_cycles(3000);
    expect_no_print(n0, "MkIV word I alone", ok);
    check(!busy && dut.u_reg_a.value == '0, "window end clears registers");
    if (ok) n_window++;
    // a complete event afterwards is still converted correctly
    tape(mk4_word1(21, 99), 1'b1, mk4_word2(42, 99, 1'b0));
    wait_cycles(12000);
    expect_print(n0, 21, 42, 99, 0, "MkIV after timeout", ok);
    settle();

    // ---- TEST mode, Mark II/III (Table 3 patterns), AB mode ----
    patch = mark23_panel();
    test_mode = 1'b1;
    foreach (sim_sw[i]) sim_sw[i] = 1'b0;
    for (int k = 0; k < 4; k++) begin
      int sw_no;
      sw_no = (k == 0) ? 5 : (k == 1) ? 12 : (k == 2) ? 15 : 1;
      sim_sw = '0;
      sim_sw[15] = 1'b1;          // index track on
      sim_sw[sw_no - 1] = 1'b1;
      n0 = prints.size();
      do @(posedge clk); while (prints.size() == n0);
      a = (sw_no <= 7) ? (1 << (sw_no - 1)) : 0;
      b = (sw_no >= 8 && sw_no <= 14) ? (1 << (sw_no - 8)) : 0;
      c = (sw_no == 15) ? 1 : 0;
      expect_print(n0, a, b, c, 0, $sformatf("TEST MkII/III switch %0d", sw_no), ok);
      if (ok) n_sim23++;
      wait_cycles(100);
    end
    sim_sw = '0;
    settle();

    // ---- TEST mode, Mark IV (Table 4 patterns) ----
    patch = mark4_panel();
    for (int k = 0; k < 5; k++) begin
      int sw_no;
      sw_no = (k == 0) ? 3 : (k == 1) ? 11 : (k == 2) ? 12 : (k == 3) ? 15 : 16;
      sim_sw = '0;
      sim_sw[8] = 1'b1;  // index, track 9
      sim_sw[7] = 1'b1;  // ID, track 8
      sim_sw[sw_no - 1] = 1'b1;
      // both words carry the same switches
      case (sw_no)
        3:  begin a = 4;   b = 4;   c = 0;       s = 0; end
        11: begin a = 256; b = 256; c = 0;       s = 0; end
        12: begin a = 0;   b = 0;   c = 1 + 32;  s = 0; end
        15: begin a = 0;   b = 0;   c = 8 + 256; s = 0; end
        default: begin a = 0; b = 0; c = 16;    s = 1; end
      endcase
      n0 = prints.size();
      do @(posedge clk); while (prints.size() == n0);
      expect_print(n0, a, b, c, s, $sformatf("TEST MkIV switch %0d", sw_no), ok);
      if (ok) n_sim4++;
      wait_cycles(100);
    end
    sim_sw = '0;
    test_mode = 1'b0;
    settle();

    // ---- every mechanism happened ----
    check(n_accept > 0,   "mechanism: accept and convert");
    check(n_skew > 0,     "mechanism: skewed words recovered");
    check(n_lockout > 0,  "mechanism: lockout");
    check(n_cinhibit > 0, "mechanism: ABC-bar C inhibit");
    check(n_reject > 0,   "mechanism: preset reject");
    check(n_mark4 > 0,    "mechanism: Mark IV two-word event");
    check(n_sens > 0,     "mechanism: sensitivity bit");
    check(n_window > 0,   "mechanism: word II window timeout");
    check(n_sim23 > 0,    "mechanism: TEST mode Mark II/III");
    check(n_sim4 > 0,     "mechanism: TEST mode Mark IV");
    $display("mechanisms: accept=%0d skew=%0d lockout=%0d c_inhibit=%0d reject=%0d mark4=%0d sens=%0d window=%0d sim23=%0d sim4=%0d prints=%0d",
             n_accept, n_skew, n_lockout, n_cinhibit, n_reject, n_mark4, n_sens, n_window,
             n_sim23, n_sim4, prints.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
