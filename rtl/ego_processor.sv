// ego_processor -- quick-look data processor for EGO balloon-experiment tapes (top level).
//
// Sixteen tape tracks carry parallel binary words marked by an index track. The processor
// holds each detected "one" in a 0.6 ms temporary memory, strobes all memories 0.3 ms after
// the index so that skew of up to about +-0.3 ms is tolerated, assembles the experiment
// words A, B and C in one's complement through a programmable patch panel (one 16-bit word
// for Mark II/III, two for Mark IV), rejects data points whose word A is below a patched
// preset, and converts accepted words to decimal by counting: the registers, made two's
// complement by one extra count, are counted up to zero while decimal counters count the
// same pulses. The print command then starts a 200 ms print, during which a lockout
// refuses new data. A TEST position replaces the tape inputs with a 1 kHz simulated signal
// carrying the toggle-switch pattern.
//
// Ports:
//   clk, rst_n       1 MHz clock (the 1 Mc logic family of the original), async reset
//   track_det        16 level-detector outputs, asynchronous, high while a pulse exceeds
//                    the threshold (the analog detectors are outside this design)
//   test_mode        1: inputs from the simulator (TEST), 0: from the tape (PROCESS)
//   sim_sw           the 16 test toggle switches
//   patch            the inserted patch panel (ego_pkg::mark23_panel / mark4_panel)
//   abc_mode         Mark II/III only: 1 = ABC-bar (skip words with C), 0 = AB
//   lamp             front-panel indicator drive, one per track (detector state)
//   dma_out          the 16 temporary-memory outputs (monitor jacks for setting them up)
//   index_dma        the index memory, whose trailing edge is the data strobe
//   word_a, word_c   counter "A": upper and lower three-digit halves (BCD)
//   word_b, word_s   counter "B": word B and the sensitivity digit (BCD)
//   print_cmd        one-cycle print command to the printer, when the counters are valid
//   lockout, busy    200 ms inhibit running / an event is being processed
// Structure and timing follow the document; the clock, the synchronisers and the digital
// switching of the simulator ahead of the (external) detectors are this design's.
module ego_processor
  import ego_pkg::*;
#(
  parameter int unsigned CYC_PER_US = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTRACK-1:0] track_det,
  input  logic              test_mode,
  input  logic [NTRACK-1:0] sim_sw,
  input  patch_cfg_t        patch,
  input  logic              abc_mode,
  output logic [NTRACK-1:0] lamp,
  output logic [NTRACK-1:0] dma_out,
  output logic              index_dma,
  output bcd_t              word_a,
  output bcd_t              word_c,
  output bcd_t              word_b,
  output bcd_t              word_s,
  output logic              print_cmd,
  output logic              lockout,
  output logic              busy
);
  localparam int unsigned US = CYC_PER_US;

  logic [NTRACK-1:0] sim_tracks, raw, sync1, det, mem;

  // Simulator and input switching
  sim_generator #(.PERIOD_CYC(1000 * US), .PULSE_CYC(500 * US)) u_sim (
    .clk(clk), .rst_n(rst_n), .mark4(patch.mark4), .id_track(patch.id_track),
    .sw(sim_sw), .tracks(sim_tracks)
  );

  assign raw = test_mode ? sim_tracks : track_det;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      det   <= '0;
    end else begin
      sync1 <= raw;
      det   <= sync1;
    end
  end

  assign lamp    = det;
  assign dma_out = mem;

  // Temporary memories, one per track
  for (genvar t = 0; t < int'(NTRACK); t++) begin : g_mem
    temp_memory #(.DUR_CYC(600 * US)) u_mem (
      .clk(clk), .rst_n(rst_n), .det(det[t]), .mem(mem[t])
    );
  end

  // Patch panel
  logic    idx, id_now, cbit_now, sens_d, sens_w2;
  reg_in_t a_in, b_in, c_in;

  patch_panel u_panel (
    .cfg(patch), .det(det), .mem(mem), .idx(idx), .id_now(id_now), .cbit_now(cbit_now),
    .sens_d(sens_d), .sens_w2(sens_w2), .a_in(a_in), .b_in(b_in), .c_in(c_in)
  );

  // Strobe delay on the index track
  logic strobe;

  strobe_delay #(.DELAY_CYC(300 * US)) u_strobe (
    .clk(clk), .rst_n(rst_n), .idx(idx), .busy(index_dma), .strobe(strobe)
  );

  // Control
  logic load_w1, load_w2, reg_clear, extra, cnt_clear, sens_cnt, start, go, conv_done;

  control_unit #(
    .DS_WINDOW_CYC(2000 * US), .EXTRA_CYC(10 * US), .START_CYC(100 * US),
    .REJECT_CYC(20 * US), .RESET_CYC(200 * US), .LOCKOUT_CYC(200000 * US)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .mark4(patch.mark4), .abc_mode(abc_mode), .strobe(strobe),
    .id_now(id_now), .cbit_now(cbit_now), .sens_d(sens_d), .sens_w2(sens_w2), .go(go),
    .conv_done(conv_done), .load_w1(load_w1), .load_w2(load_w2), .reg_clear(reg_clear),
    .extra(extra), .cnt_clear(cnt_clear), .sens_cnt(sens_cnt), .start(start),
    .print_cmd(print_cmd), .lockout(lockout), .busy(busy)
  );

  // Readout clock shared by the three registers
  logic cnt_pulse, rd_running;

  readout_clock #(.PERIOD_CYC(10 * US), .RUN_CYC(10000 * US)) u_rdclk (
    .clk(clk), .rst_n(rst_n), .start(start), .running(rd_running), .cnt_pulse(cnt_pulse),
    .done(conv_done)
  );

  // Registers A, B, C and the accept gate
  logic [RW-1:0] a_val, b_val, c_val;
  logic          a_cnt, b_cnt, c_cnt, a_act, b_act, c_act;

  binary_register u_reg_a (
    .clk(clk), .rst_n(rst_n), .rin(a_in), .load_w1(load_w1), .load_w2(load_w2),
    .clear(reg_clear), .extra(extra), .start(start), .cnt_pulse(cnt_pulse),
    .value(a_val), .cnt_out(a_cnt), .active(a_act)
  );
  binary_register u_reg_b (
    .clk(clk), .rst_n(rst_n), .rin(b_in), .load_w1(load_w1), .load_w2(load_w2),
    .clear(reg_clear), .extra(extra), .start(start), .cnt_pulse(cnt_pulse),
    .value(b_val), .cnt_out(b_cnt), .active(b_act)
  );
  binary_register u_reg_c (
    .clk(clk), .rst_n(rst_n), .rin(c_in), .load_w1(load_w1), .load_w2(load_w2),
    .clear(reg_clear), .extra(extra), .start(start), .cnt_pulse(cnt_pulse),
    .value(c_val), .cnt_out(c_cnt), .active(c_act)
  );

  preset_compare u_cmp (
    .reg_a(a_val), .preset_mask(patch.preset_mask), .process_all(patch.process_all), .go(go)
  );

  // Decimal counters "A" (word A | word C) and "B" (word B | sensitivity)
  split_decimal_counter u_cnt_a (
    .clk(clk), .rst_n(rst_n), .clr(cnt_clear), .cnt_hi(a_cnt), .cnt_lo(c_cnt),
    .q_hi(word_a), .q_lo(word_c)
  );
  split_decimal_counter u_cnt_b (
    .clk(clk), .rst_n(rst_n), .clr(cnt_clear), .cnt_hi(b_cnt), .cnt_lo(sens_cnt),
    .q_hi(word_b), .q_lo(word_s)
  );

  // Every register has counted out to zero when the readout clock stops.
  assert property (@(posedge clk) disable iff (!rst_n)
                   conv_done |-> !(a_act || b_act || c_act) && a_val == '0 && b_val == '0 &&
                                 c_val == '0);
  // A readout is never restarted while one is running.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !rd_running);
endmodule
