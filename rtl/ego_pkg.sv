// ego_pkg -- shared types and constants of the EGO balloon-experiment data processor.
//
// The processor reads 16 parallel tape tracks. A programmable patch panel decides which
// track feeds which bit of the three experiment-word registers A, B and C, whether that bit
// belongs to the first (word I) or the second (word II) parallel word of a Mark IV event,
// which tracks carry the index and ID markers, and the preset of the accept gate. This
// package holds the patch-panel configuration type and the two standard panels of the
// Mark II/III and Mark IV formats (Tables 1 and 2 of the format description).
//
// Track numbering: the format tables number tracks 1..16; here track k is bit index k-1 of
// every 16-bit track vector. All registers are 9 bits wide, the widest experiment word
// (Mark IV words A and B, 9 bits each).
package ego_pkg;

  localparam int unsigned NTRACK = 16;  // parallel data lines
  localparam int unsigned RW     = 9;   // register width (bits of the widest word)
  localparam int unsigned NDIG   = 3;   // decimal digits per half counter (max 999)

  typedef logic [3:0] track_t;          // track index 0..15 (track number - 1)

  // One patch cord: a register bit taken from a track, in word I or word II.
  typedef struct packed {
    logic   used;    // a cord is plugged; an unplugged bit reads as data 0
    logic   word2;   // 1: sampled by the delayed strobe (Mark IV word II)
    track_t track;
  } route_t;

  // The whole patch panel.
  typedef struct packed {
    logic              mark4;        // 1: Mark IV two-word events, 0: Mark II/III
    track_t            index_track;  // track carrying the index marker
    track_t            id_track;     // Mark IV: track carrying the word-I ID marker
    route_t            cbit;         // Mark II/III: C bit that gates the strobe in ABC-bar mode
    route_t            sens;         // Mark IV: sensitivity bit
    route_t [RW-1:0]   a;            // register A bits 8..0
    route_t [RW-1:0]   b;            // register B bits 8..0
    route_t [RW-1:0]   c;            // register C bits 8..0
    logic   [RW-1:0]   preset_mask;  // register-A bits patched to the accept gate
    logic              process_all;  // accept every data point regardless of word A
  } patch_cfg_t;

  // What the patch panel hands one register: per bit, the sampled track, whether a cord
  // is plugged, and whether the bit belongs to word II.
  typedef struct packed {
    logic [RW-1:0] d;
    logic [RW-1:0] used;
    logic [RW-1:0] w2;
  } reg_in_t;

  typedef logic [NDIG-1:0][3:0] bcd_t;  // three BCD digits, digit 0 = units

  localparam route_t NO_ROUTE = '{used: 1'b0, word2: 1'b0, track: 4'd0};

  // Cord from track number tn (1..16, as printed in the format tables).
  function automatic route_t cord(input int tn, input logic w2);
    route_t r;
    r.used  = 1'b1;
    r.word2 = w2;
    r.track = track_t'(tn - 1);
    return r;
  endfunction

  // Preset mask for "accept when word A >= 2**k": bits k..RW-1 go to the gate.
  function automatic logic [RW-1:0] preset_ge_pow2(input int k);
    logic [RW-1:0] m;
    for (int i = 0; i < int'(RW); i++) m[i] = (i >= k);
    return m;
  endfunction

  // Mark II / Mark III panel (Table 1): A0..A6 on tracks 1-7, B0..B6 on tracks 8-14,
  // C on track 15 (printed as word C, 0 or 1), index on track 16.
  function automatic patch_cfg_t mark23_panel();
    patch_cfg_t p;
    p.mark4       = 1'b0;
    p.index_track = track_t'(15);
    p.id_track    = track_t'(0);
    p.cbit        = cord(15, 1'b0);
    p.sens        = NO_ROUTE;
    for (int i = 0; i < int'(RW); i++) begin
      p.a[i] = (i < 7) ? cord(1 + i, 1'b0) : NO_ROUTE;
      p.b[i] = (i < 7) ? cord(8 + i, 1'b0) : NO_ROUTE;
      p.c[i] = NO_ROUTE;
    end
    p.c[0]        = cord(15, 1'b0);
    p.preset_mask = '0;
    p.process_all = 1'b1;
    return p;
  endfunction

  // Mark IV panel (Table 2). Word I: A0..A6 tracks 1-7, ID track 8, index track 9,
  // A7 A8 tracks 10-11, C0..C4 tracks 12-16. Word II: B0..B6 tracks 1-7, B7 B8 tracks
  // 10-11, C5..C8 tracks 12-15, sensitivity track 16.
  function automatic patch_cfg_t mark4_panel();
    patch_cfg_t p;
    p.mark4       = 1'b1;
    p.index_track = track_t'(8);
    p.id_track    = track_t'(7);
    p.cbit        = NO_ROUTE;
    p.sens        = cord(16, 1'b1);
    for (int i = 0; i < 7; i++) begin
      p.a[i] = cord(1 + i, 1'b0);
      p.b[i] = cord(1 + i, 1'b1);
    end
    p.a[7] = cord(10, 1'b0);
    p.a[8] = cord(11, 1'b0);
    p.b[7] = cord(10, 1'b1);
    p.b[8] = cord(11, 1'b1);
    for (int i = 0; i < 5; i++) p.c[i] = cord(12 + i, 1'b0);
    for (int i = 5; i < 9; i++) p.c[i] = cord(12 + i - 5, 1'b1);
    p.preset_mask = '0;
    p.process_all = 1'b1;
    return p;
  endfunction

endpackage
