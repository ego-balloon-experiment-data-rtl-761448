// tb_binary_register -- runs the complement-and-count conversion on random words: the
// register is loaded with word I and word II bits (some bits unplugged), given the extra
// count, started, and fed count pulses; the number of pulses passed to the decimal side
// must equal the data word, the register must end at zero with its gate closed, and the
// loaded value must be the one's complement of the word. Word 0 must pass no pulse.
module tb_binary_register;
  import ego_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  reg_in_t rin;
  logic load_w1 = 0, load_w2 = 0, clear = 0, extra = 0, start = 0, cnt_pulse = 0;
  logic [RW-1:0] value;
  logic cnt_out, active;
  int checks = 0, failures = 0, counted = 0;

  binary_register dut (.clk(clk), .rst_n(rst_n), .rin(rin), .load_w1(load_w1),
                       .load_w2(load_w2), .clear(clear), .extra(extra), .start(start),
                       .cnt_pulse(cnt_pulse), .value(value), .cnt_out(cnt_out),
                       .active(active));

  always #5 clk = ~clk;
  always @(posedge clk) if (cnt_out) counted <= counted + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  initial begin
    rin = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 40; trial++) begin
      logic [RW-1:0] w1, w2, used, word;
      int n;
      used = (trial < 5) ? '1 : RW'($urandom);
      w2   = (trial < 2) ? '0 : RW'($urandom);
      word = (trial == 0) ? '0 : (trial == 1) ? '1 : RW'($urandom);
      word = word & used;  // unplugged bits read as 0
      n    = int'(word);
      pulse(clear);
      // word I strobe
      rin.used = used; rin.w2 = w2; rin.d = word & ~w2 & used;
      pulse(load_w1);
      // word II strobe, word I lines now carry garbage that must not be taken
      rin.d = (word & w2) | (RW'($urandom) & ~w2);
      pulse(load_w2);
      check(value == ~word, $sformatf("trial %0d: loaded %h, expected %h", trial, value, ~word));
      pulse(extra);
      counted = 0;
      pulse(start);
      for (int i = 0; i < 1600; i++) begin
        @(negedge clk) cnt_pulse = (i % 3 == 0);
      end
      @(negedge clk) cnt_pulse = 1'b0;
      @(negedge clk);
      check(counted == n, $sformatf("trial %0d: counted %0d, expected %0d", trial, counted, n));
      check(value == '0 && !active, $sformatf("trial %0d: end value %h active %0d",
                                              trial, value, active));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
