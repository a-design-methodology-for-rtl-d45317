// soar_pkg: shared constants, opcode encodings and helper functions for the
// SOAR (Smalltalk On A RISC) processor model.
//
// Opcodes are handled as 7-bit values {instr[30], instr[28:23]}; the control
// pipe latch CPIPE1 carries 10 bits laid out as
//   [9] instr[31] (must be 0, checked by the illegal-opcode logic)
//   [8] instr[12] (immediate flag)
//   [7] instr[30] (0 = call/jmp "fast shuffle" format)
//   [6] instr[29] (% bit: tagged mode, or software-interrupt bit of call/jmp)
//   [5:0] instr[28:23]
// CPIPE2 holds only the 7-bit opcode: the document's CPIPE2 also passes the
// % bit along, but no write-stage control depends on it, so it is dropped.
// The numeric opcode assignment follows the document's opcode table; call and
// jmp occupy the whole 0xx (call) and 04x..07x (jmp) octal ranges.
//
// Register numbering: 0..15 are windowed (0..7 "lows", shared with the
// callee; 8..15 "highs", shared with the caller), 16..31 are globals.
// Global 16 reads as zero; 17..23 address special registers (PC, SHB, SHA,
// SWP, TB, CWP, PSW/shDST/shOPC). There are no locals. 8 windows x 8
// registers + 16 globals = 80 physical words.
package soar_pkg;

  typedef logic [6:0] opc_t;
  typedef logic [9:0] cpipe1_t;
  typedef opc_t       cpipe2_t;

  // 7-bit opcodes (octal)
  typedef enum opc_t {
    OP_FLUSH   = 7'o104, // forced into the pipe, not user visible
    OP_TRAPX   = 7'o105, // "TRAP": forced on a trap/interrupt
    OP_SKIPX   = 7'o106, // "SKIP": the squashed instruction
    OP_RET0    = 7'o110, // ret0..ret7 = 110..117, option bits W,N,I
    OP_SKIP    = 7'o120, // conditional skip
    OP_TRAP1   = 7'o121, // trap1..trap7 = 121..127, conditional traps
    OP_STORE   = 7'o130,
    OP_STOREM  = 7'o132,
    OP_LOAD    = 7'o134,
    OP_LOADC   = 7'o135,
    OP_LOADM   = 7'o136,
    OP_SRL     = 7'o140,
    OP_SRA     = 7'o142,
    OP_XOR     = 7'o144,
    OP_AND     = 7'o146,
    OP_OR      = 7'o147,
    OP_ADD     = 7'o150,
    OP_SLL     = 7'o151,
    OP_SUB     = 7'o152,
    OP_EXTRACT = 7'o154,
    OP_INSERT  = 7'o156,
    OP_LOAD0   = 7'o160, // load0..load7  = 160..167 data access cycles
    OP_STORE0  = 7'o170  // store0..store7 = 170..177
  } opcode_e;

  // Values jammed into the control pipe latches
  typedef enum cpipe1_t {
    CP1_FLUSH  = 10'o204,
    CP1_TRAP   = 10'o205,
    CP1_SKIP   = 10'o206,
    CP1_LOAD0  = 10'o260,
    CP1_STORE0 = 10'o270
  } cp1_jam_e;

  // Special register numbers (global register space)
  typedef enum logic [4:0] {
    R_ZERO = 5'd16,
    R_PC   = 5'd17,
    R_SHB  = 5'd18,
    R_SHA  = 5'd19,
    R_SWP  = 5'd20,
    R_TB   = 5'd21,
    R_CWP  = 5'd22,
    R_PSW  = 5'd23
  } special_reg_e;

  // Trap reason ("cause") codes
  typedef enum logic [3:0] {
    TR_ILLEGAL   = 4'b0000,
    TR_TAG       = 4'b0001,
    TR_SWI       = 4'b0010,
    TR_WOVERFLOW = 4'b0011,
    TR_WUNDERFLOW= 4'b0100,
    TR_DPAGEF    = 4'b0101,
    TR_TRAPINSTR = 4'b0110,
    TR_GS        = 4'b0111,
    TR_IPAGEF    = 4'b1000,
    TR_IOREQ     = 4'b1001
  } trap_reason_e;

  // Opcode as seen through a control pipe latch
  function automatic opc_t opc_of(input logic op_hi, input logic [5:0] op_lo);
    return {op_hi, op_lo};
  endfunction

  // Window decode: window number and register number to physical word.
  function automatic logic [6:0] regdecode(input logic [2:0] wn, input logic [4:0] rn);
    logic [6:0] r;
    if (rn[4])                        r = {3'b000, rn[3:0]};          // globals 0..15
    else if (wn == 3'd7 && rn[3])     r = 7'(rn) + 7'd8;              // highs of window 7 wrap
    else                              r = 7'(wn) * 7'd8 + 7'(rn) + 7'd16;
    return r;
  endfunction

  // Instruction word encoders (used by testbenches and documentation)
  function automatic logic [31:0] enc_rrr(input opc_t op, input logic tag,
      input logic [4:0] d, input logic [4:0] s1, input logic [4:0] s2);
    return {1'b0, op[6], tag, op[5:0], d, s1, 1'b0, s2, 7'd0};
  endfunction

  function automatic logic [31:0] enc_rri(input opc_t op, input logic tag,
      input logic [4:0] d, input logic [4:0] s1, input logic [11:0] imm);
    return {1'b0, op[6], tag, op[5:0], d, s1, 1'b1, imm};
  endfunction

  // store format: data register in the S2 field, 12-bit constant split into
  // bits 22:18 (upper five) and 6:0 (lower seven)
  function automatic logic [31:0] enc_store(input opc_t op, input logic tag,
      input logic [4:0] data_r, input logic [4:0] base, input logic [11:0] imm);
    return {1'b0, op[6], tag, op[5:0], imm[11:7], base, 1'b1, data_r, imm[6:0]};
  endfunction

  function automatic logic [31:0] enc_call(input logic is_jmp, input logic si, input logic [27:0] target);
    return {1'b0, 1'b0, si, is_jmp, target};
  endfunction

  // Outputs of the first-stage control PLA (decoded from CPIPE1s)
  typedef struct packed {
    logic is_call;          // call (fast shuffle, CWP decrement)
    logic is_jmp;           // jmp (fast shuffle)
    logic is_trap_op;       // forced TRAP instruction
    logic data_access;      // load0..7 / store0..7: memory data cycle
    logic cpipe1_step;      // control pipe takes the next instruction
    logic cpipe1_loadc;     // jam load0 (load, loadc)
    logic cpipe1_store;     // jam store0 (store)
    logic cpipe1_loadm;     // jam load<DST1-1> (loadm, load1..7)
    logic cpipe1_storem;    // jam store<SRC2> (storem, store1..7)
    logic cpipe1_flush;     // flush the instruction being fetched (ret, TRAP)
    logic dst1_min;         // DST1 <- DST1-1 (load1..7)
    logic src2_min;         // SRC2 <- SRC2-1 (storem, store2..7)
    logic pc_incr;          // PC <- PC+1
    logic alu_to_pc;        // PC <- ALU (ret, call, jmp)
    logic alu_to_mal;       // MAL <- ALU (effective address / new PC)
    logic pc_to_mal;        // MAL <- new PC
    logic dst2_step;        // DST2 <- DST1
    logic pc_stuff_on_call; // DST2 <- 15 on call
    logic change_cwp_dec;   // CWP <- CWP-1 (call)
    logic change_cwp_inc;   // CWP <- CWP+1 (ret with W option)
    logic enable_ints;      // PSW<1> <- 1 (ret with I option)
    logic rd_wr;            // 1 = read cycle, 0 = store data cycle
    logic store_sxt;        // immediate is in store format
    logic sxt_to_busl;      // immediate operand into INB
    logic soft_int;         // call/jmp with the SI (%) bit set
    logic azero_force;      // A operand forced to 0 (call, jmp)
    logic busl_to_inb;      // INB takes the L bus
    logic store_write;      // store0: pointer-to-register store write
    logic databus_into_loadl; // LOADL takes the incoming data bus
    logic byte_ex;          // extract
    logic byte_ins;         // insert
    logic ex_ins_pass;      // neither extract nor insert
    logic sel_bi_bar;       // complement the B operand
    logic alu_cin;          // ALU carry in
    logic sel_sum;          // adder result
    logic sel_xor;
    logic sel_or;
    logic sel_and;
    logic sel_sr;           // shift right by one
    logic op_sra;           // arithmetic shift right
    logic predecode_ea;     // load, loadc, store: check for pointer to register
    logic pbus_shadow;      // operands may be shadowed this cycle
    logic illegal;          // illegal opcode
    logic skip_cond_enable; // skip: look at the condition
    logic trap_instr;       // trap1..trap7
    logic tag_arith;        // sll srl sra add sub xor and or skip trap1..7
    logic tag_load;         // load, loadc
    logic tag_store;        // store
    logic tag_ret;          // ret0..ret7
    logic tag_ovf;          // sub add sll: tagged overflow traps
  } ctl1_t;

  // Outputs of the second-stage control PLA (decoded from CPIPE2s)
  typedef struct packed {
    logic load_write;       // write LOADL into the register file (load0..7)
    logic nil_on_return;    // ret with N option: nil the callee's lows
    logic write_rf;         // register write in the third cycle
    logic busd_to_ina;      // INA takes the D bus (EA update in data cycles)
    logic dst_valid;        // DST field names a register written
    logic opc2_load;        // load0 in the write cycle (forward from LOADL)
    logic last_pc_to_busd;  // save the PC chain (call, TRAP)
  } ctl2_t;

endpackage
