// tap_ucode_pkg: microprograms that make the sequencers behave as the IEEE
// 1149.1 Test Access Port controller (16 states, one input tms).
//
// States carry the document's letters: A Test-Logic-Reset, D Run-Test/Idle,
// E Select-DR-Scan, F Capture-DR, G Shift-DR, H Exit1-DR, I Pause-DR,
// J Exit2-DR, K Update-DR, L Select-IR-Scan, M Capture-IR, N Shift-IR,
// O Exit1-IR, P Pause-IR, Q Exit2-IR, R Update-IR. The sixteen outputs are
// one per state (one-hot, bit 0 = A, bit 1 = D, ... bit 15 = R): the document
// counts 16 outputs without naming them, so this assignment is this design's.
// tms is condition input 0.
//
// Scaled-down image: state k of the list above sits at address k and every
// word carries both successors. Full-scale image: an extra state B (outputs
// all 0) follows A and loads the loop counter with the address of D; D,
// K and R then take their tms = 0 successor (D) from the counter and their
// tms = 1 successor (E) from the branch field. Every other state has one
// successor at the next address and takes the other from the branch field.
package tap_ucode_pkg;
  import useq_pkg::*;

  localparam int N_OUT = 16;
  localparam int SEL_W = 3;
  localparam int C_TMS = 0;

  // Scaled-down addresses (also the output bit of each state).
  localparam int SA = 0,  SD = 1,  SE = 2,  SF = 3,  SG = 4,  SH = 5,
                 SI = 6,  SJ = 7,  SK = 8,  SL = 9,  SM = 10, SN = 11,
                 SO = 12, SP = 13, SQ = 14, SR = 15;

  // Full-scale addresses.
  localparam int FA = 0,  FB = 1,  FD = 2,  FE = 3,  FF = 4,  FG = 5,
                 FH = 6,  FI = 7,  FJ = 8,  FK = 9,  FL = 10, FM = 11,
                 FN = 12, FO = 13, FP = 14, FQ = 15, FR = 16;

  function automatic logic [31:0] onehot(int k);
    return 32'(1) << k;
  endfunction

  function automatic image_t scdn_image();
    image_t m = '{default: '0};
    // address: outputs, tested input, successor if tms=0, successor if tms=1
    m[SA] = sd_word(SEL_W, onehot(SA), C_TMS, SD, SA);
    m[SD] = sd_word(SEL_W, onehot(SD), C_TMS, SD, SE);
    m[SE] = sd_word(SEL_W, onehot(SE), C_TMS, SF, SL);
    m[SF] = sd_word(SEL_W, onehot(SF), C_TMS, SG, SH);
    m[SG] = sd_word(SEL_W, onehot(SG), C_TMS, SG, SH);
    m[SH] = sd_word(SEL_W, onehot(SH), C_TMS, SI, SK);
    m[SI] = sd_word(SEL_W, onehot(SI), C_TMS, SI, SJ);
    m[SJ] = sd_word(SEL_W, onehot(SJ), C_TMS, SG, SK);
    m[SK] = sd_word(SEL_W, onehot(SK), C_TMS, SD, SE);
    m[SL] = sd_word(SEL_W, onehot(SL), C_TMS, SM, SA);
    m[SM] = sd_word(SEL_W, onehot(SM), C_TMS, SN, SO);
    m[SN] = sd_word(SEL_W, onehot(SN), C_TMS, SN, SO);
    m[SO] = sd_word(SEL_W, onehot(SO), C_TMS, SP, SR);
    m[SP] = sd_word(SEL_W, onehot(SP), C_TMS, SP, SQ);
    m[SQ] = sd_word(SEL_W, onehot(SQ), C_TMS, SN, SR);
    m[SR] = sd_word(SEL_W, onehot(SR), C_TMS, SD, SE);
    return m;
  endfunction

  function automatic image_t flsc_image();
    image_t  m = '{default: '0};
    fs_ctl_t load_d = FS_NOP;
    load_d.cntnload = 1'b0;                 // counter <= branch field (= D)
    m[FA] = fs_word(SEL_W, onehot(SA), C_TMS, fs_br(NA_INC,    NA_BRANCH), FA);
    m[FB] = fs_word(SEL_W, '0,         C_TMS, load_d,                      FD);
    m[FD] = fs_word(SEL_W, onehot(SD), C_TMS, fs_br(NA_CTR,    NA_BRANCH), FE);
    m[FE] = fs_word(SEL_W, onehot(SE), C_TMS, fs_br(NA_INC,    NA_BRANCH), FL);
    m[FF] = fs_word(SEL_W, onehot(SF), C_TMS, fs_br(NA_INC,    NA_BRANCH), FH);
    m[FG] = fs_word(SEL_W, onehot(SG), C_TMS, fs_br(NA_BRANCH, NA_INC),    FG);
    m[FH] = fs_word(SEL_W, onehot(SH), C_TMS, fs_br(NA_INC,    NA_BRANCH), FK);
    m[FI] = fs_word(SEL_W, onehot(SI), C_TMS, fs_br(NA_BRANCH, NA_INC),    FI);
    m[FJ] = fs_word(SEL_W, onehot(SJ), C_TMS, fs_br(NA_BRANCH, NA_INC),    FG);
    m[FK] = fs_word(SEL_W, onehot(SK), C_TMS, fs_br(NA_CTR,    NA_BRANCH), FE);
    m[FL] = fs_word(SEL_W, onehot(SL), C_TMS, fs_br(NA_INC,    NA_BRANCH), FA);
    m[FM] = fs_word(SEL_W, onehot(SM), C_TMS, fs_br(NA_INC,    NA_BRANCH), FO);
    m[FN] = fs_word(SEL_W, onehot(SN), C_TMS, fs_br(NA_BRANCH, NA_INC),    FN);
    m[FO] = fs_word(SEL_W, onehot(SO), C_TMS, fs_br(NA_INC,    NA_BRANCH), FR);
    m[FP] = fs_word(SEL_W, onehot(SP), C_TMS, fs_br(NA_BRANCH, NA_INC),    FP);
    m[FQ] = fs_word(SEL_W, onehot(SQ), C_TMS, fs_br(NA_BRANCH, NA_INC),    FN);
    m[FR] = fs_word(SEL_W, onehot(SR), C_TMS, fs_br(NA_CTR,    NA_BRANCH), FE);
    return m;
  endfunction

  localparam image_t SCDN_IMAGE = scdn_image();
  localparam image_t FLSC_IMAGE = flsc_image();
endpackage
