// tb_rate_skew -- tape at the highest word rate, with speed variation and skew, at full
// size (Mark II/III format, AB mode, preset: accept word A >= 64).
//
// Part 1, skew limits: single words whose data tracks are all displaced by d cycles from the
// index. They must be read correctly for d = -299 and d = +300 (just inside +-108 degrees of
// a 1 kHz cycle), and the data must be lost for d = -301 and d = +302.
// Part 2, streams: a long run of back-to-back words, 1000 us apart (nominal) and 909 us
// apart (10 percent fast), each track with its own fixed skew of up to +-290 us and random
// data. An independent model predicts which words are printed: a word is accepted when its
// word A is 64 or more and it is strobed after the 200 ms lockout of the previous accepted
// word has ended. The printed sequence must match, value for value.
module tb_rate_skew;
  import ego_pkg::*;

  localparam int PW = 400;  // width of a tape "one" above threshold, cycles

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NTRACK-1:0] track_det = '0, lamp, dma_out;
  logic print_cmd, lockout, busy, index_dma;
  patch_cfg_t patch;
  bcd_t word_a, word_c, word_b, word_s;

  ego_processor dut (
    .clk(clk), .rst_n(rst_n), .track_det(track_det), .test_mode(1'b0), .sim_sw('0),
    .patch(patch), .abc_mode(1'b0), .lamp(lamp), .dma_out(dma_out), .index_dma(index_dma),
    .word_a(word_a), .word_c(word_c), .word_b(word_b), .word_s(word_s),
    .print_cmd(print_cmd), .lockout(lockout), .busy(busy)
  );

  always #500 clk = ~clk;  // 1 MHz

  int checks = 0, failures = 0;
  typedef struct { int a, b, c; } rec_t;
  rec_t printed[$];

  function automatic int val(input bcd_t d);
    return 100 * int'(d[2]) + 10 * int'(d[1]) + int'(d[0]);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk)
    if (print_cmd) printed.push_back('{val(word_a), val(word_b), val(word_c)});

  function automatic logic [NTRACK-1:0] word(input int a, input int b, input logic c);
    logic [NTRACK-1:0] w;
    w[6:0]  = 7'(a);
    w[13:7] = 7'(b);
    w[14]   = c;
    w[15]   = 1'b1;
    return w;
  endfunction

  // Stream of n words, spacing sp cycles, per-track skew sk; data in wa/wb/wc.
  int sk[NTRACK];
  int wa[], wb[], wc[];

  task automatic stream(input int n, input int sp);
    int total = n * sp + 1000;
    for (int t = 0; t < total; t++) begin
      logic [NTRACK-1:0] v;
      v = '0;
      for (int tr = 0; tr < int'(NTRACK); tr++) begin
        // the word whose pulse may cover this cycle on this track
        int rel = t - 400 - sk[tr];        // words start 400 cycles into the stream
        if (rel >= 0) begin
          int k = rel / sp;
          if (k < n && (rel % sp) < PW) v[tr] = word(wa[k], wb[k], wc[k][0])[tr];
        end
      end
      @(negedge clk) track_det = v;
    end
  endtask

  initial begin
    patch = mark23_panel();
    patch.process_all = 1'b0;
    patch.preset_mask = preset_ge_pow2(6);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    // ---- part 1: skew limits ----
    foreach (sk[i]) sk[i] = 0;
    wa = new[1]; wb = new[1]; wc = new[1];
    wa[0] = 127; wb[0] = 127; wc[0] = 0;
    for (int j = 0; j < 4; j++) begin
      int d, n0;
      logic in_win;
      d      = (j == 0) ? -299 : (j == 1) ? 300 : (j == 2) ? -301 : 302;
      in_win = (j < 2);
      foreach (sk[i]) sk[i] = (i == 15) ? 0 : d;
      n0 = printed.size();
      stream(1, 1000);
      repeat (12000) @(posedge clk);
      if (in_win) begin
        check(printed.size() == n0 + 1 && printed[n0].a == 127 && printed[n0].b == 127,
              $sformatf("skew %0d: word not read intact", d));
      end else begin
        check(printed.size() == n0, $sformatf("skew %0d: data outside the window accepted", d));
      end
      do @(posedge clk); while (busy || lockout);
    end

    // ---- part 2: back-to-back streams ----
    for (int run = 0; run < 2; run++) begin
      int sp, n, n0;
      longint last_acc;
      rec_t exp_q[$];
      exp_q.delete();
      sp = (run == 0) ? 1000 : 909;
      n  = 1100;
      for (int i = 0; i < int'(NTRACK); i++)
        sk[i] = (i == 15) ? 0 : int'($urandom_range(0, 580)) - 290;
      wa = new[n]; wb = new[n]; wc = new[n];
      last_acc = -1000000;
      for (int k = 0; k < n; k++) begin
        longint t_strobe;
        wa[k] = int'($urandom_range(0, 127));
        wb[k] = int'($urandom_range(0, 127));
        wc[k] = int'($urandom_range(0, 1));
        // model: strobe about k*sp after the first; lockout 200010 cycles after acceptance
        t_strobe = longint'(k) * sp;
        if (wa[k] >= 64 && t_strobe > last_acc + 200010) begin
          exp_q.push_back('{wa[k], wb[k], wc[k]});
          last_acc = t_strobe;
        end
      end
      n0 = printed.size();
      stream(n, sp);
      repeat (12000) @(posedge clk);
      do @(posedge clk); while (busy || lockout);
      check(printed.size() - n0 == exp_q.size(),
            $sformatf("stream %0d us: %0d prints, expected %0d", sp, printed.size() - n0,
                      exp_q.size()));
      for (int i = 0; i < exp_q.size() && n0 + i < printed.size(); i++)
        check(printed[n0 + i] == exp_q[i],
              $sformatf("stream %0d us print %0d: %0d %0d %0d, expected %0d %0d %0d", sp, i,
                        printed[n0 + i].a, printed[n0 + i].b, printed[n0 + i].c,
                        exp_q[i].a, exp_q[i].b, exp_q[i].c));
      $display("stream at %0d us spacing: %0d words, %0d printed", sp, n, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
