// patch_panel -- programmable routing from the 16 track memories to the registers.
//
// The original unit takes its data format from a plug-in patch board: one board for the
// Mark II/III format and one for Mark IV. Here the board is the patch_cfg_t value cfg
// (ego_pkg provides the two standard boards). The panel is pure wiring: for every bit of
// registers A, B and C it presents the state of the patched track's temporary memory, and
// whether the bit is plugged and belongs to word II; it picks the index track (before its
// memory, for the strobe delay), the ID and C marker tracks and the sensitivity bit.
// An unplugged bit reads as data 0. Purely combinational, no timing of its own.
// That the panel routes tracks to register bits and sets the preset follows the document;
// the encoding of a board as a struct is this design's.
module patch_panel
  import ego_pkg::*;
(
  input  patch_cfg_t        cfg,
  input  logic [NTRACK-1:0] det,       // synchronised detector outputs
  input  logic [NTRACK-1:0] mem,       // temporary-memory outputs
  output logic              idx,       // index-track detector, to the strobe delay
  output logic              id_now,    // ID marker memory
  output logic              cbit_now,  // C marker memory (Mark II/III)
  output logic              sens_d,    // sensitivity bit memory
  output logic              sens_w2,   // sensitivity bit belongs to word II
  output reg_in_t           a_in,
  output reg_in_t           b_in,
  output reg_in_t           c_in
);
  function automatic reg_in_t route_reg(input route_t [RW-1:0] r, input logic [NTRACK-1:0] m);
    reg_in_t o;
    for (int i = 0; i < int'(RW); i++) begin
      o.used[i] = r[i].used;
      o.w2[i]   = r[i].word2;
      o.d[i]    = r[i].used & m[r[i].track];
    end
    return o;
  endfunction

  always_comb begin
    idx      = det[cfg.index_track];
    id_now   = mem[cfg.id_track];
    cbit_now = cfg.cbit.used & mem[cfg.cbit.track];
    sens_d   = cfg.sens.used & mem[cfg.sens.track];
    sens_w2  = cfg.sens.word2;
    a_in     = route_reg(cfg.a, mem);
    b_in     = route_reg(cfg.b, mem);
    c_in     = route_reg(cfg.c, mem);
  end
endmodule
