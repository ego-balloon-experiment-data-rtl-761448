// control_unit -- event sequencing of the data processor.
//
// Each index strobe (trailing edge of the 0.3 ms index memory) is a candidate data word.
//
// Mark IV (cfg mark4 = 1): an event is two words. A strobe with the ID marker present is
// the initial strobe (IS): it loads the word-I bits and opens a DS_WINDOW_CYC (2 ms)
// window. A strobe inside the window without the ID marker is the delayed strobe (DS): it
// loads the word-II bits and the sensitivity flip-flop. Another IS inside the window
// reloads word I and restarts the window.
// Mark II/III (mark4 = 0): an event is one word. The strobe loads every bit at once and is
// then treated like the DS. In ABC-bar mode (abc_mode = 1) a strobe with the C bit present
// is inhibited and nothing happens; in AB mode every word is processed.
//
// After the DS the accept gate (go) decides.
//   go:   after EXTRA_CYC (10 us) the extra count goes to all registers, the decimal
//         counters are reset and a LOCKOUT_CYC (200 ms) inhibit starts; the sensitivity
//         flip-flop sends one count to its counter with the extra count. START_CYC (100 us)
//         later the readout clock is started. When it reports done (10 ms) the print
//         command is issued and the registers are cleared.
//   stop: after EXTRA_CYC + REJECT_CYC (10 us + 20 us) a RESET_CYC (200 us) reset pulse
//         clears the registers and new data is accepted.
// While the lockout runs, strobes are ignored (the printer needs 200 ms per line).
//
// Timing is in clock cycles (1 MHz default). All delays, the window and the lockout are
// the document's. This design's own choices: strobes are one cycle long; the decision is
// taken one cycle after the DS; an IS whose window ends without a DS clears the registers;
// registers are cleared when the print command is issued.
module control_unit #(
  parameter int unsigned DS_WINDOW_CYC = 2000,
  parameter int unsigned EXTRA_CYC     = 10,
  parameter int unsigned START_CYC     = 100,
  parameter int unsigned REJECT_CYC    = 20,
  parameter int unsigned RESET_CYC     = 200,
  parameter int unsigned LOCKOUT_CYC   = 200000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mark4,
  input  logic abc_mode,
  input  logic strobe,
  input  logic id_now,
  input  logic cbit_now,
  input  logic sens_d,
  input  logic sens_w2,
  input  logic go,
  input  logic conv_done,
  output logic load_w1,
  output logic load_w2,
  output logic reg_clear,
  output logic extra,
  output logic cnt_clear,
  output logic sens_cnt,
  output logic start,
  output logic print_cmd,
  output logic lockout,
  output logic busy
);
  typedef enum logic [2:0] {
    S_IDLE, S_WAIT_DS, S_DECIDE, S_EXTRA, S_START, S_CONVERT, S_REJECT, S_RESET
  } state_t;

  localparam int unsigned TW = 16;
  localparam int unsigned LW = $clog2(LOCKOUT_CYC + 1);

  state_t        st;
  logic [TW-1:0] tmr;
  logic [LW-1:0] lock_left;
  logic          sens_ff;

  assign lockout = (lock_left != '0);
  assign busy    = (st != S_IDLE);

  always_comb begin
    load_w1   = 1'b0;
    load_w2   = 1'b0;
    reg_clear = 1'b0;
    extra     = 1'b0;
    start     = 1'b0;
    print_cmd = 1'b0;
    unique case (st)
      S_IDLE:
        if (strobe && !lockout) begin
          if (mark4) load_w1 = id_now;
          else if (!(abc_mode && cbit_now)) begin
            load_w1 = 1'b1;
            load_w2 = 1'b1;
          end
        end
      S_WAIT_DS:
        if (strobe) begin
          load_w1 = id_now;
          load_w2 = !id_now;
        end else if (tmr == '0) reg_clear = 1'b1;
      S_EXTRA:   extra = (tmr == '0);
      S_START:   start = (tmr == '0);
      S_CONVERT: if (conv_done) begin
                   print_cmd = 1'b1;
                   reg_clear = 1'b1;
                 end
      S_RESET:   reg_clear = 1'b1;
      default: ;
    endcase
  end

  assign cnt_clear = extra;
  assign sens_cnt  = extra & sens_ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      tmr       <= '0;
      lock_left <= '0;
      sens_ff   <= 1'b0;
    end else begin
      if (lockout) lock_left <= lock_left - 1'b1;
      if (tmr != '0) tmr <= tmr - 1'b1;
      if (reg_clear) sens_ff <= 1'b0;
      else if ((load_w1 && !sens_w2) || (load_w2 && sens_w2)) sens_ff <= sens_d;
      unique case (st)
        S_IDLE:
          if (load_w1 && !load_w2) begin
            st  <= S_WAIT_DS;
            tmr <= TW'(DS_WINDOW_CYC - 1);
          end else if (load_w2) st <= S_DECIDE;
        S_WAIT_DS:
          if (load_w1) tmr <= TW'(DS_WINDOW_CYC - 1);
          else if (load_w2) st <= S_DECIDE;
          else if (tmr == '0) st <= S_IDLE;
        S_DECIDE:
          if (go) begin
            st  <= S_EXTRA;
            tmr <= TW'(EXTRA_CYC - 2);
          end else begin
            st  <= S_REJECT;
            tmr <= TW'(EXTRA_CYC + REJECT_CYC - 2);
          end
        S_EXTRA:
          if (tmr == '0) begin
            st        <= S_START;
            tmr       <= TW'(START_CYC - 1);
            lock_left <= LW'(LOCKOUT_CYC);
          end
        S_START:   if (tmr == '0) st <= S_CONVERT;
        S_CONVERT: if (conv_done) st <= S_IDLE;
        S_REJECT:
          if (tmr == '0) begin
            st  <= S_RESET;
            tmr <= TW'(RESET_CYC - 1);
          end
        S_RESET:   if (tmr == '0) st <= S_IDLE;
        default:   st <= S_IDLE;
      endcase
    end
  end

  // A word I and a word II are never strobed in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(mark4 && load_w1 && load_w2));
  // The readout is only started when no word is being loaded.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !(load_w1 || load_w2));
endmodule
