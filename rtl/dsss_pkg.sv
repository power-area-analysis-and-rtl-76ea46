// dsss_pkg: types, constants and helper functions shared by the DS-SS
// transmitter and receiver.
//
// The code select word s3s2s1s0 has two fields. s3s2 picks the code length
// (32, 64, 128 or 256 chips per data bit, taken from LFSR stage 5, 6, 7 or 8)
// and s1s0 picks one of three feedback tap sets for that length; s1s0 = 00
// means "no coding" for s3s2 = 00 and "reserved" otherwise. The twelve tap
// sets are those of the code selection table of the design; a tap list such
// as [5,2] means that the XOR of stages 5 and 2 is shifted into stage 1.
// Treating the reserved selections like "no coding" (PN chip held at 0) is
// this design's own choice.
package dsss_pkg;

  localparam int unsigned LFSR_STAGES = 8;

  typedef logic [1:0] len_sel_t;   // s3s2
  typedef logic [1:0] fb_sel_t;    // s1s0

  typedef struct packed {
    len_sel_t len;                 // s3s2
    fb_sel_t  fb;                  // s1s0
  } code_sel_t;

  // LFSR state: bit i-1 holds stage i (stage 1 = bit 0).
  typedef logic [LFSR_STAGES-1:0] lfsr_t;

  // Tap mask (bit i-1 set = stage i in the feedback) for a code selection.
  // Zero for "no coding" and the reserved selections.
  function automatic lfsr_t tap_mask(code_sel_t sel);
    lfsr_t m;
    unique case ({sel.len, sel.fb})
      4'b0001: m = 8'b0001_0010;   // [5,2]
      4'b0010: m = 8'b0001_1110;   // [5,4,3,2]
      4'b0011: m = 8'b0001_1011;   // [5,4,2,1]
      4'b0101: m = 8'b0010_0001;   // [6,1]
      4'b0110: m = 8'b0011_0011;   // [6,5,2,1]
      4'b0111: m = 8'b0011_0110;   // [6,5,3,2]
      4'b1001: m = 8'b0100_0001;   // [7,1]
      4'b1010: m = 8'b0100_0100;   // [7,3]
      4'b1011: m = 8'b0100_0111;   // [7,3,2,1]
      4'b1101: m = 8'b1000_1110;   // [8,4,3,2]
      4'b1110: m = 8'b1011_0100;   // [8,6,5,3]
      4'b1111: m = 8'b1011_0010;   // [8,6,5,2]
      default: m = '0;             // no coding / reserved
    endcase
    return m;
  endfunction

  // Register length n of the selected code: 5, 6, 7 or 8.
  function automatic int unsigned code_stages(len_sel_t len);
    return 5 + int'(len);
  endfunction

  // Chips per data bit: 32, 64, 128 or 256.
  function automatic int unsigned chips_per_bit(len_sel_t len);
    return 32 << len;
  endfunction

endpackage
