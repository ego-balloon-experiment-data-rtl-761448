// preset_compare -- accept gate on register A ("word A greater than preset").
//
// Register A holds the one's complement of word A. The set sides of the bits patched to the
// gate (normally bits k..8, to accept words of 2**k and more) drive a NAND: when every one of
// them is 1, all those data bits are 0, word A is below 2**k and the gate says "stop"; if
// any is 0 the gate says "go". A separate switch accepts every data point. Combinational.
// The NAND on the complement and the process-all provision follow the document; the mask
// encoding of the patched bits is this design's.
module preset_compare
  import ego_pkg::*;
(
  input  logic [RW-1:0] reg_a,        // register A contents (one's complement of word A)
  input  logic [RW-1:0] preset_mask,  // bits patched to the gate
  input  logic          process_all,
  output logic          go
);
  assign go = process_all | ~&(reg_a | ~preset_mask);
endmodule
