// tb_control_unit -- drives the event sequencer with strobes and marker states and checks
// the timing of its outputs against the delays of the control logic: extra count and
// counter reset 10 cycles after the deciding strobe, readout start 100 cycles after that,
// print and register clear when the readout reports done, the reject reset pulse from 30
// cycles after the strobe lasting 200 cycles, the lockout (shortened to 5000 cycles here),
// the ABC-bar inhibit, the Mark IV word I / word II pairing, its 2000-cycle window and the
// sensitivity count. The readout clock is modelled by a done pulse 50 cycles after start.
module tb_control_unit;
  localparam int unsigned LOCK = 5000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mark4 = 0, abc_mode = 0, strobe = 0, id_now = 0, cbit_now = 0, sens_d = 0;
  logic sens_w2 = 0, go = 0, conv_done = 0;
  logic load_w1, load_w2, reg_clear, extra, cnt_clear, sens_cnt, start, print_cmd;
  logic lockout, busy;
  int checks = 0, failures = 0, cyc = 0;
  int t_w1, t_w2, t_extra, t_start, t_print, t_sens, n_clear, t_clear_first, t_lock_end;
  int n_w1, n_w2, n_extra;

  control_unit #(.LOCKOUT_CYC(LOCK)) dut (
    .clk(clk), .rst_n(rst_n), .mark4(mark4), .abc_mode(abc_mode), .strobe(strobe),
    .id_now(id_now), .cbit_now(cbit_now), .sens_d(sens_d), .sens_w2(sens_w2), .go(go),
    .conv_done(conv_done), .load_w1(load_w1), .load_w2(load_w2), .reg_clear(reg_clear),
    .extra(extra), .cnt_clear(cnt_clear), .sens_cnt(sens_cnt), .start(start),
    .print_cmd(print_cmd), .lockout(lockout), .busy(busy));

  always #5 clk = ~clk;

  // log of output events, by clock-edge number
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (load_w1) begin t_w1 <= cyc; n_w1 <= n_w1 + 1; end
    if (load_w2) begin t_w2 <= cyc; n_w2 <= n_w2 + 1; end
    if (extra) begin t_extra <= cyc; n_extra <= n_extra + 1; end
    if (start) t_start <= cyc;
    if (print_cmd) t_print <= cyc;
    if (sens_cnt) t_sens <= cyc;
    if (reg_clear) begin
      if (n_clear == 0) t_clear_first <= cyc;
      n_clear <= n_clear + 1;
    end
    if (!lockout && t_lock_end < 0 && t_extra >= 0) t_lock_end <= cyc;
  end

  // readout clock model
  always @(posedge clk) begin
    conv_done <= 1'b0;
    if (start) fork begin repeat (49) @(posedge clk); conv_done <= 1'b1; end join_none
  end

  task automatic clr_log();
    t_w1 = -1; t_w2 = -1; t_extra = -1; t_start = -1; t_print = -1; t_sens = -1;
    n_clear = 0; t_clear_first = -1; t_lock_end = -1; n_w1 = 0; n_w2 = 0; n_extra = 0;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one strobe; returns the edge number at which it is sampled
  task automatic strobe_at(output int t, input logic id, input logic c);
    @(negedge clk);
    id_now = id; cbit_now = c; strobe = 1'b1;
    @(posedge clk) t = cyc;
    @(negedge clk) strobe = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    int ts, ts2;
    clr_log();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(5);

    // 1: Mark II/III, AB mode, accepted
    mark4 = 0; abc_mode = 0; go = 1;
    strobe_at(ts, 0, 1);
    idle(400);
    check(t_w1 == ts && t_w2 == ts, "MkII: strobe loads all bits");
    check(t_extra == ts + 10, $sformatf("MkII: extra at +%0d", t_extra - ts));
    check(t_start == ts + 110, $sformatf("MkII: start at +%0d", t_start - ts));
    check(t_print == t_start + 50, "MkII: print when readout done");
    check(n_clear == 1 && t_clear_first == t_print, "MkII: registers cleared with print");
    check(lockout, "lockout running");
    // 2: strobe during the lockout is ignored
    clr_log();
    strobe_at(ts, 0, 0);
    idle(300);
    check(n_w1 == 0 && n_extra == 0, "strobe during lockout ignored");
    idle(LOCK);
    check(!lockout, "lockout over");
    // 3: ABC-bar mode: C present inhibits, C absent processes
    abc_mode = 1;
    clr_log();
    strobe_at(ts, 0, 1);
    idle(300);
    check(n_w1 == 0 && n_extra == 0 && !busy, "ABC-bar: C present inhibits");
    strobe_at(ts, 0, 0);
    idle(300);
    check(t_w1 == ts && t_extra == ts + 10, "ABC-bar: C absent processed");
    idle(LOCK);
    // 4: reject
    abc_mode = 0; go = 0;
    clr_log();
    strobe_at(ts, 0, 0);
    idle(400);
    check(n_extra == 0 && t_start < 0 && t_print < 0, "reject: no readout");
    check(t_clear_first == ts + 31, $sformatf("reject: reset at +%0d", t_clear_first - ts));
    check(n_clear == 200, $sformatf("reject: reset %0d cycles", n_clear));
    check(!lockout && !busy, "reject: no lockout, idle again");
    // 5: Mark IV event with sensitivity bit
    mark4 = 1; go = 1; sens_w2 = 1;
    clr_log();
    strobe_at(ts, 1, 0);
    idle(990);
    check(n_w1 == 1 && n_w2 == 0 && busy, "MkIV: initial strobe loads word I");
    sens_d = 1;
    strobe_at(ts2, 0, 0);
    sens_d = 0;
    idle(300);
    check(t_w2 == ts2 && n_w1 == 1, "MkIV: delayed strobe loads word II");
    check(t_extra == ts2 + 10 && t_sens == t_extra, "MkIV: extra count and sensitivity count");
    check(t_start == ts2 + 110, "MkIV: start");
    idle(LOCK);
    // 6: Mark IV without word II: window expires
    clr_log();
    strobe_at(ts, 1, 0);
    idle(2100);
    check(n_extra == 0 && t_clear_first == ts + 2000 && !busy,
          $sformatf("MkIV: window end clears at +%0d", t_clear_first - ts));
    // 7: Mark IV word II without word I is ignored; sensitivity not counted without it
    clr_log();
    strobe_at(ts, 0, 0);
    idle(100);
    check(n_w1 == 0 && n_w2 == 0 && !busy, "MkIV: lone word II ignored");
    // 8: Mark IV without sensitivity bit
    strobe_at(ts, 1, 0);
    idle(1000);
    strobe_at(ts2, 0, 0);
    idle(300);
    check(t_extra == ts2 + 10 && t_sens < 0, "MkIV: no sensitivity count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
