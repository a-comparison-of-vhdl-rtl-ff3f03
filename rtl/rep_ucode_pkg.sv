// rep_ucode_pkg: microprograms of the four-state example machine for the
// basic microsequencer (IMAGE) and the full-scale one (FLSC_IMAGE). States A, B, C, D output Y = 00, 01, 10, 11; in each
// state the machine stays while tms = 1 and advances (A->B->C->D->A) while
// tms = 0. tms is condition input 0 (cond_in[0], MUX1 select 1).
//
// Each state word branches to itself when tms = 1 and otherwise continues to
// the next address; A..D sit at addresses 0..3. The basic sequencer has one
// branch field, so D's way back to A goes through one more word (address 4)
// that keeps Y = 11 and branches unconditionally to A: D->A takes two clocks
// where the other advances take one.
//
// FLSC_IMAGE is the same machine for the full-scale sequencer (condition
// input 0 = tms). It needs only the four words: A..C take INCREM when
// tms = 0 and their own address from the branch field when tms = 1. D has
// two successors, neither at the next address (A and itself), so it is a
// two-way branch: A also loads the counter from its branch field (0, its
// own address), and D takes the counter (A) when tms = 0 and the branch
// field (D) when tms = 1. Every advance then takes one clock.
package rep_ucode_pkg;
  import useq_pkg::*;

  localparam int N_OUT = 2;
  localparam int C_TMS = 1;
  localparam int RA = 0, RB = 1, RC = 2, RD = 3, RW = 4;

  function automatic image_t image();
    image_t m = '{default: '0};
    m[RA] = basic_word(32'd0, C_TMS, 1'b0, RA);
    m[RB] = basic_word(32'd1, C_TMS, 1'b0, RB);
    m[RC] = basic_word(32'd2, C_TMS, 1'b0, RC);
    m[RD] = basic_word(32'd3, C_TMS, 1'b0, RD);
    m[RW] = basic_word(32'd3, 0,     1'b1, RA);   // unconditional branch
    return m;
  endfunction

  localparam image_t IMAGE = image();

  localparam int FS_TMS = 0;

  function automatic image_t flsc_image();
    image_t  m = '{default: '0};
    fs_ctl_t c;
    for (int s = RA; s <= RC; s++) begin
      c = fs_br(NA_INC, NA_BRANCH);
      if (s == RA) c.cntnload = 1'b0;        // counter <= 0, the address of A
      m[s] = fs_word(3, 32'(s), FS_TMS, c, s);
    end
    m[RD] = fs_word(3, 32'd3, FS_TMS, fs_br(NA_CTR, NA_BRANCH), RD);
    return m;
  endfunction

  localparam image_t FLSC_IMAGE = flsc_image();
endpackage
