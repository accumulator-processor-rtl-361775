// acc_pkg: types and constants shared by the accumulator processor.
//
// The processor is a 16-bit, multicycle, accumulator machine. Every
// instruction is one 16-bit word: IR[2:0] is the opcode, IR[5:3] is func3
// and IR[15:6] carries a 10-bit address or immediate (C-type branches use
// IR[13:6] as an 8-bit forward offset). The opcode/func3 values, the mux
// input orders and the BranchOp codes below follow the processor's green
// sheet, its control-signal list and its state diagram. The struct that
// carries the control bits, the state encoding and the enum names are this
// design's own.
package acc_pkg;

  localparam int unsigned XLEN = 16;

  // 3-bit major opcode, IR[2:0]
  typedef enum logic [2:0] {
    OP_R = 3'b000,   // add, sub, lw, sw
    OP_C = 3'b001,   // beq, bne, blt, bge
    OP_I = 3'b010,   // addi, subi
    OP_J = 3'b011,   // jal
    OP_P = 3'b100    // push, pop
  } opcode_e;

  // func3 values, IR[5:3]
  localparam logic [2:0] F_ADD  = 3'b000, F_SUB  = 3'b001, F_LW = 3'b010, F_SW = 3'b011;
  localparam logic [2:0] F_BEQ  = 3'b000, F_BNE  = 3'b001, F_BLT = 3'b010, F_BGE = 3'b011;
  localparam logic [2:0] F_ADDI = 3'b000, F_SUBI = 3'b001;
  localparam logic [2:0] F_JAL  = 3'b000;
  localparam logic [2:0] F_PUSH = 3'b000, F_POP  = 3'b001;

  // MemIn: memory address source
  typedef enum logic [1:0] {MEMIN_PC = 2'd0, MEMIN_OUT = 2'd1, MEMIN_SP = 2'd2} memin_e;
  // A: first ALU operand
  typedef enum logic [1:0] {A_REG = 2'd0, A_PC = 2'd1, A_ZERO = 2'd2, A_SP = 2'd3} asel_e;
  // B: second ALU operand
  typedef enum logic [1:0] {B_TWO = 2'd0, B_IMM = 2'd1, B_MDR = 2'd2} bsel_e;
  // PCSource: PC input
  typedef enum logic [1:0] {PCS_OUT = 2'd0, PCS_ALU = 2'd1, PCS_MEM = 2'd2} pcsrc_e;
  // ALUOp
  typedef enum logic {ALU_ADD = 1'b0, ALU_SUB = 1'b1} aluop_e;
  // BranchOp
  typedef enum logic [1:0] {BR_EQ = 2'd0, BR_GE = 2'd1, BR_LT = 2'd2, BR_NE = 2'd3} brop_e;
  // DataSRC: memory write data
  typedef enum logic {DS_REG = 1'b0, DS_OUT = 1'b1} datasrc_e;
  // RegSource: REG input
  typedef enum logic {RS_ALU = 1'b0, RS_MEM = 1'b1} regsrc_e;

  // All control bits of the datapath, one cycle's worth
  typedef struct packed {
    logic     sp_write;
    logic     mem_write;
    logic     ir_write;
    logic     out_write;
    logic     pc_write;
    logic     reg_write;
    logic     is_branch;
    memin_e   mem_in;
    asel_e    a_sel;
    bsel_e    b_sel;
    pcsrc_e   pc_source;
    aluop_e   alu_op;
    brop_e    branch_op;
    datasrc_e data_src;
    regsrc_e  reg_source;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    sp_write: 1'b0, mem_write: 1'b0, ir_write: 1'b0, out_write: 1'b0,
    pc_write: 1'b0, reg_write: 1'b0, is_branch: 1'b0,
    mem_in: MEMIN_PC, a_sel: A_REG, b_sel: B_TWO, pc_source: PCS_OUT,
    alu_op: ALU_ADD, branch_op: BR_EQ, data_src: DS_REG, reg_source: RS_ALU
  };

  // Control-unit states, one per box of the state diagram
  typedef enum logic [4:0] {
    S_RESET, S_FETCH, S_DECODE,
    S_ADDSUB_MEM, S_ADD, S_SUB,
    S_LW, S_SW, S_JUMP, S_ADDI, S_SUBI,
    S_COMP_ADDR, S_COMP_MEM, S_BEQ, S_BGE, S_BLT, S_BNE, S_COMPARED,
    S_PC_INC, S_PUSH_STACK, S_PUSH,
    S_SP_INC, S_POP
  } state_e;

endpackage
