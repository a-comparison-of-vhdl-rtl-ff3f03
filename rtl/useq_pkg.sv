// useq_pkg: types and constants shared by the microprogrammed state machine
// sequencers.
//
// A microprogram image is a 256-entry table of 64-bit words; each sequencer
// keeps only the low bits its microinstruction needs. The 8-bit address
// (256 words) is the size used throughout the document; the 64-bit image
// word is this design's own container width, wide enough for every
// microinstruction format here. The helper functions pack the fields of the
// scaled-down, full-scale and basic microinstructions in the bit positions
// the sequencer modules decode.
package useq_pkg;

  localparam int UADDR_W  = 8;
  localparam int UDEPTH   = 1 << UADDR_W;
  localparam int IMG_W    = 64;

  typedef logic [IMG_W-1:0] img_word_t;
  typedef img_word_t        image_t [UDEPTH];

  // Sequencer architecture and microprogram memory style.
  typedef enum logic {ARCH_SCALED_DOWN = 1'b0, ARCH_FULL_SCALE = 1'b1} arch_e;
  typedef enum logic {MEM_EAB = 1'b0, MEM_LUT = 1'b1} mem_e;

  // Select codes of the full-scale MUX4 next-address multiplexers.
  typedef enum logic [1:0] {
    NA_BRANCH = 2'b00,   // A: branch address field of the microinstruction
    NA_CTR    = 2'b01,   // B: STACKCTR counter value
    NA_STACK  = 2'b10,   // C: top of the return-address stack
    NA_INC    = 2'b11    // D: INCREM, address of this microinstruction + 1
  } na_sel_e;

  // Scaled-down word: [7:0] bus A (condition 0), [15:8] bus B (condition 1),
  // [16+sel_w-1:16] condition select, outputs above that.
  function automatic img_word_t sd_word(int sel_w, logic [31:0] outs, int cond,
                                        int next0, int next1);
    img_word_t w = '0;
    w[7:0]  = 8'(next0);
    w[15:8] = 8'(next1);
    w       = w | (img_word_t'(cond) << 16);
    w       = w | (img_word_t'(outs) << (16 + sel_w));
    return w;
  endfunction

  // Full-scale control fields other than the branch address and outputs.
  typedef struct packed {
    logic    stack_en;   // q16 STACK ENABLE
    logic    pushpop;    // q15 1 = push, 0 = pop (stack and counter)
    logic    cnten;      // q14 counter count enable
    logic    cntnload;   // q13 0 = load counter from the branch field
    logic    stacken;    // q12 counter stack enable
    na_sel_e sel1;       // q[11:10] MUX4 feeding MUX2 input B (condition 1)
    na_sel_e sel0;       // q[9:8]   MUX4 feeding MUX2 input A (condition 0)
  } fs_ctl_t;

  localparam fs_ctl_t FS_NOP = '{stack_en: 1'b0, pushpop: 1'b0, cnten: 1'b0,
                                 cntnload: 1'b1, stacken: 1'b0,
                                 sel1: NA_INC, sel0: NA_INC};

  // Full-scale word: [7:0] branch address, [16:8] fs_ctl_t,
  // [17+sel_w-1:17] condition select, outputs above that.
  function automatic img_word_t fs_word(int sel_w, logic [31:0] outs, int cond,
                                        fs_ctl_t ctl, int branch);
    img_word_t w = '0;
    w[7:0]  = 8'(branch);
    w[16:8] = ctl;
    w       = w | (img_word_t'(cond) << 17);
    w       = w | (img_word_t'(outs) << (17 + sel_w));
    return w;
  endfunction

  // Full-scale conditional branch: condition 0 goes through sel0, 1 through
  // sel1; everything else idle.
  function automatic fs_ctl_t fs_br(na_sel_e sel0, na_sel_e sel1);
    fs_ctl_t c = FS_NOP;
    c.sel0 = sel0;
    c.sel1 = sel1;
    return c;
  endfunction

  // Basic (Figure 2-1) word: [7:0] branch address, [10:8] select,
  // [11] polarity, outputs from bit 12.
  function automatic img_word_t basic_word(logic [31:0] outs, int sel,
                                           logic polarity, int branch);
    img_word_t w = '0;
    w[7:0]  = 8'(branch);
    w[10:8] = 3'(sel);
    w[11]   = polarity;
    w       = w | (img_word_t'(outs) << 12);
    return w;
  endfunction

endpackage
