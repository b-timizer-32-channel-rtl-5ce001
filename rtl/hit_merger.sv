// hit_merger -- packs two TDC hit words into one merged 32-bit word.
//
// With MergEn set the Write Control stores two hits per buffer word.  Each
// hit keeps its 5-bit channel number, the 3 least significant bits of its
// 11-bit coarse time and the 5 most significant bits of its 8-bit fine time
// (800 ps instead of 100 ps resolution).  Layout (as documented):
//   31:28 = 0100, 27 = 1 (merged), 26 = coarse error,
//   25:21 channel B, 20:18 coarse B[2:0], 17:13 fine B[7:3],
//   12:8  channel A, 7:5   coarse A[2:0], 4:0   fine A[7:3].
// Hit A is the earlier hit of the pair; when an event has an odd number of
// hits the last word carries only hit A and the B field is zero, as in the
// documented example.  The coarse error bit is set when a hit's dropped
// coarse bits [10:3] differ from ref_coarse_hi, the coarse bits [10:3] of the
// first hit of the event: that reference is this design's reading of
// "coarse time out of range".  Purely combinational.
module hit_merger
  import btim_pkg::*;
(
  input  logic [WORD_W-1:0] hit_a,
  input  logic [WORD_W-1:0] hit_b,
  input  logic              b_valid,
  input  logic [7:0]        ref_coarse_hi,
  output logic [WORD_W-1:0] merged
);
  logic [12:0] field_a, field_b;
  logic        err_a, err_b;

  // channel 23:19, coarse 18:8, fine 7:0 of a TDC data word
  assign field_a = {hit_a[23:19], hit_a[10:8], hit_a[7:3]};
  assign field_b = b_valid ? {hit_b[23:19], hit_b[10:8], hit_b[7:3]} : 13'd0;
  assign err_a   = (hit_a[18:11] != ref_coarse_hi);
  assign err_b   = b_valid && (hit_b[18:11] != ref_coarse_hi);

  assign merged  = {WT_TDC_DATA, 1'b1, err_a | err_b, field_b, field_a};
endmodule
