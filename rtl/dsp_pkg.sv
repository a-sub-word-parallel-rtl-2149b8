// dsp_pkg: types and constants shared by the sub-word parallel DSP core.
//
// Holds the operation encodings of the butterfly / complex MAC processor, the
// ALU, the shifter and the program sequencer, and the decoded control word
// that drives the core each cycle. The processor's instruction set is not part
// of this design; the control word below is this design's own encoding of the
// operations the datapath supports.
package dsp_pkg;

  // Butterfly / complex MAC operations.
  typedef enum logic [3:0] {
    BM_NOP    = 4'd0,
    BM_BFLY   = 4'd1,   // DIF butterfly: X = A+B, Y = (A-B)*W
    BM_CADD   = 4'd2,   // complex add/subtract: X = A+B, Y = A-B
    BM_CMUL   = 4'd3,   // complex Q15 multiply: Y = A*B
    BM_RMUL   = 4'd4,   // two real 16x16 products: X = AR*BR, Y = AI*BI
    BM_ACS    = 4'd5,   // Viterbi add-compare-select
    BM_SQD    = 4'd6,   // squared distance accumulate: ACCR += |A-B|^2
    BM_CMAC16 = 4'd7,   // one 16x16 complex MAC
    BM_RMAC16 = 4'd8,   // four 16x16 real MACs (FIR schedule)
    BM_CMAC8  = 4'd9,   // four 8x8 complex MACs (FIR schedule)
    BM_RMAC8  = 4'd10,  // sixteen 8x8 real MACs (FIR schedule)
    BM_FLUSH  = 4'd11   // latch the finished iteration's results
  } bm_op_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR = 3'd3,
    ALU_XOR = 3'd4, ALU_PASSA = 3'd5, ALU_PASSB = 3'd6, ALU_NEG = 3'd7
  } alu_op_e;

  typedef enum logic [1:0] {
    SHF_SLL = 2'd0, SHF_SRL = 2'd1, SHF_SRA = 2'd2, SHF_ROL = 2'd3
  } shf_op_e;

  typedef enum logic [2:0] {
    SEQ_NEXT = 3'd0, SEQ_JUMP = 3'd1, SEQ_BRANCH = 3'd2, SEQ_CALL = 3'd3,
    SEQ_RET  = 3'd4, SEQ_RTI  = 3'd5, SEQ_HOLD = 3'd6
  } seq_op_e;

  // Branch conditions, tested against the ALU flag register.
  typedef enum logic [2:0] {
    CC_ALWAYS = 3'd0, CC_EQ = 3'd1, CC_NE = 3'd2, CC_LT = 3'd3,
    CC_GE = 3'd4, CC_CS = 3'd5, CC_VS = 3'd6, CC_NEVER = 3'd7
  } cond_e;

  // ALU flag positions.
  localparam int FLAG_Z = 3, FLAG_N = 2, FLAG_C = 1, FLAG_V = 0;

  typedef enum logic [1:0] { OPS_MEM = 2'd0, OPS_RF = 2'd1, OPS_XX = 2'd2, OPS_YY = 2'd3 } opsrc_e;
  typedef enum logic [1:0] { MW_RF = 2'd0, MW_XX = 2'd1, MW_YY = 2'd2 } memw_src_e;
  typedef enum logic [2:0] {
    RW_ALU = 3'd0, RW_SHF = 3'd1, RW_MEM0 = 3'd2, RW_MEM1 = 3'd3,
    RW_IMM = 3'd4, RW_BM = 3'd5, RW_ACSQ = 3'd6
  } rfw_src_e;

  // Decoded control word, one per cycle.
  typedef struct packed {
    seq_op_e     seq_op;
    cond_e       cond;
    logic [15:0] target;
    logic [15:0] imm;
    // data address generator
    logic [1:0]  dag_ld;       // load address register i from imm
    logic [1:0]  dag_md;       // load modifier i from imm
    logic [1:0]  dag_inc;      // post-modify address register i
    // data memories (bank 0 = I, bank 1 = Q)
    logic [1:0]  mem_we;
    memw_src_e   mem_wsrc;
    // register file
    logic [3:0]  ra, rb, rw;
    logic        rf_we;
    rfw_src_e    rf_wsrc;
    logic [2:0]  bm_rsel;      // RW_BM: 0 XH 1 XL 2 YH 3 YL 4..7 yout[i] >>> shamt, low 16 bits
    // ALU / shifter
    alu_op_e     alu_op;
    logic        alu_b_imm;
    logic        flags_we;
    shf_op_e     shf_op;
    logic [3:0]  shamt;
    // butterfly / MAC
    logic        ld_a, ld_b;
    opsrc_e      a_src, b_src;
    bm_op_e      bm_op;
    logic        bm_first, bm_scale, bm_conj;
    // twiddle ROM / NCO
    logic        rom_rd;       // read the ROM this cycle
    logic        rom_from_nco; // ROM address from NCO (else imm[9:0])
    logic        nco_ld_freq, nco_ld_phase, nco_step;
  } ctrl_t;

endpackage
