// acc_control: multicycle control unit of the accumulator processor.
//
// A Moore state machine: each state drives one fixed set of control bits
// (ctrl_t) and the next state depends only on the current state and, in
// Decode, on the opcode and func3 of the instruction held in IR. The states
// and the control values asserted in each are those of the processor's state
// diagram; any bit a state does not mention is 0. Paths per instruction:
//   add/sub   Fetch, Decode, AddSubMem, Add|Sub                        4 cycles
//   lw/sw     Fetch, Decode, LW|SW                                     3 cycles
//   addi/subi Fetch, Decode, Addi|Subi                                 3 cycles
//   jal       Fetch, Decode, Jump                                      3 cycles
//   branches  Fetch, Decode, CompAddr, ComparisonMem, B<cond>, Compared 6 cycles
//   push      Fetch, Decode, PCInc, PushStack, Push                    5 cycles
//   pop       Fetch, Decode, SPInc, Pop                                4 cycles
// Design choices not fixed by the diagram: an opcode/func3 pair that names
// no instruction returns from Decode to Fetch (a one-word no-op); Fetch does
// not write REG; the Compared state, which writes nothing, is kept so that
// branch timing matches the diagram.
//
// Interface: clk, synchronous active-high rst (forces the Reset state, in
// which every control bit is 0), opcode/func3 from IR, ctrl out, and the
// current state for observation.
module acc_control
  import acc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] opcode,
  input  logic [2:0] func3,
  output ctrl_t      ctrl,
  output state_e     state
);

  state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else     state <= next;
  end

  // next state
  always_comb begin
    next = S_FETCH;
    unique case (state)
      S_RESET:  next = S_FETCH;
      S_FETCH:  next = S_DECODE;
      S_DECODE: begin
        next = S_FETCH;
        case (opcode)
          OP_R: case (func3)
                  F_ADD, F_SUB: next = S_ADDSUB_MEM;
                  F_LW:         next = S_LW;
                  F_SW:         next = S_SW;
                  default:      next = S_FETCH;
                endcase
          OP_C: if (func3 inside {F_BEQ, F_BNE, F_BLT, F_BGE}) next = S_COMP_ADDR;
          OP_I: case (func3)
                  F_ADDI:  next = S_ADDI;
                  F_SUBI:  next = S_SUBI;
                  default: next = S_FETCH;
                endcase
          OP_J: if (func3 == F_JAL) next = S_JUMP;
          OP_P: case (func3)
                  F_PUSH:  next = S_PC_INC;
                  F_POP:   next = S_SP_INC;
                  default: next = S_FETCH;
                endcase
          default: next = S_FETCH;
        endcase
      end
      S_ADDSUB_MEM: next = (func3 == F_SUB) ? S_SUB : S_ADD;
      S_COMP_ADDR:  next = S_COMP_MEM;
      S_COMP_MEM: begin
        unique case (func3)
          F_BEQ:   next = S_BEQ;
          F_BNE:   next = S_BNE;
          F_BLT:   next = S_BLT;
          default: next = S_BGE;
        endcase
      end
      S_BEQ, S_BGE, S_BLT, S_BNE: next = S_COMPARED;
      S_PC_INC:     next = S_PUSH_STACK;
      S_PUSH_STACK: next = S_PUSH;
      S_SP_INC:     next = S_POP;
      default:      next = S_FETCH;  // Add, Sub, LW, SW, Jump, Addi, Subi, Compared, Push, Pop
    endcase
  end

  // control bits of each state
  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      S_RESET: ;
      S_FETCH: begin
        ctrl.mem_in    = MEMIN_PC;
        ctrl.ir_write  = 1'b1;
        ctrl.a_sel     = A_PC;
        ctrl.b_sel     = B_TWO;
        ctrl.alu_op    = ALU_ADD;
        ctrl.pc_source = PCS_ALU;
        ctrl.pc_write  = 1'b1;
      end
      S_DECODE: begin
        ctrl.a_sel     = A_ZERO;
        ctrl.b_sel     = B_IMM;
        ctrl.alu_op    = ALU_ADD;
        ctrl.out_write = 1'b1;
      end
      S_ADDSUB_MEM: ctrl.mem_in = MEMIN_OUT;
      S_ADD, S_SUB: begin
        ctrl.a_sel      = A_REG;
        ctrl.b_sel      = B_MDR;
        ctrl.alu_op     = (state == S_SUB) ? ALU_SUB : ALU_ADD;
        ctrl.reg_source = RS_ALU;
        ctrl.reg_write  = 1'b1;
      end
      S_LW: begin
        ctrl.mem_in     = MEMIN_OUT;
        ctrl.reg_source = RS_MEM;
        ctrl.reg_write  = 1'b1;
      end
      S_SW: begin
        ctrl.data_src  = DS_REG;
        ctrl.mem_in    = MEMIN_OUT;
        ctrl.mem_write = 1'b1;
      end
      S_JUMP: begin
        ctrl.a_sel     = A_ZERO;
        ctrl.b_sel     = B_IMM;
        ctrl.alu_op    = ALU_ADD;
        ctrl.pc_source = PCS_ALU;
        ctrl.pc_write  = 1'b1;
      end
      S_ADDI, S_SUBI: begin
        ctrl.a_sel      = A_REG;
        ctrl.b_sel      = B_IMM;
        ctrl.alu_op     = (state == S_SUBI) ? ALU_SUB : ALU_ADD;
        ctrl.reg_source = RS_ALU;
        ctrl.reg_write  = 1'b1;
      end
      S_COMP_ADDR: begin   // OUT = 0 + 2, the comparison slot
        ctrl.a_sel     = A_ZERO;
        ctrl.b_sel     = B_TWO;
        ctrl.alu_op    = ALU_ADD;
        ctrl.out_write = 1'b1;
      end
      S_COMP_MEM: begin    // MDR = Mem[2]; OUT = PC + offset
        ctrl.mem_in    = MEMIN_OUT;
        ctrl.a_sel     = A_PC;
        ctrl.b_sel     = B_IMM;
        ctrl.out_write = 1'b1;
      end
      S_BEQ, S_BGE, S_BLT, S_BNE: begin
        ctrl.a_sel     = A_REG;
        ctrl.b_sel     = B_MDR;
        ctrl.alu_op    = ALU_SUB;
        ctrl.is_branch = 1'b1;
        ctrl.pc_source = PCS_OUT;
        ctrl.branch_op = (state == S_BEQ) ? BR_EQ :
                         (state == S_BGE) ? BR_GE :
                         (state == S_BLT) ? BR_LT : BR_NE;
      end
      S_COMPARED: begin
        ctrl.a_sel     = A_PC;
        ctrl.b_sel     = B_IMM;
        ctrl.alu_op    = ALU_ADD;
        ctrl.pc_source = PCS_ALU;
      end
      S_PC_INC: begin      // OUT = PC + 2, the return address
        ctrl.a_sel     = A_PC;
        ctrl.b_sel     = B_TWO;
        ctrl.alu_op    = ALU_ADD;
        ctrl.out_write = 1'b1;
      end
      S_PUSH_STACK: begin  // Mem[SP] = OUT
        ctrl.data_src  = DS_OUT;
        ctrl.mem_in    = MEMIN_SP;
        ctrl.mem_write = 1'b1;
      end
      S_PUSH: begin        // SP = SP - 2
        ctrl.a_sel    = A_SP;
        ctrl.b_sel    = B_TWO;
        ctrl.alu_op   = ALU_SUB;
        ctrl.sp_write = 1'b1;
      end
      S_SP_INC: begin      // SP = OUT = SP + 2
        ctrl.a_sel     = A_SP;
        ctrl.b_sel     = B_TWO;
        ctrl.alu_op    = ALU_ADD;
        ctrl.out_write = 1'b1;
        ctrl.sp_write  = 1'b1;
      end
      S_POP: begin         // PC = Mem[OUT]
        ctrl.pc_source = PCS_MEM;
        ctrl.pc_write  = 1'b1;
        ctrl.mem_in    = MEMIN_OUT;
      end
      default: ;
    endcase
  end

endmodule
