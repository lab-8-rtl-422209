// mips_pkg: instruction encodings and control types of the 16-bit MIPS
// processor.
//
// Instructions are 32 bits wide in the usual MIPS fields
// (op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]). Only the
// low three bits of a register field are used, because the machine has eight
// registers. The opcode and function values are those of the processor's
// instruction set table; srl uses function 0x02, the standard MIPS code, so
// that it can be told apart from sll (0x00). The three floating-point
// instructions are R-type with function codes 0x10, 0x12 and 0x14, whose bits
// [2:1] are exactly the FPU opcode (00 add, 01 subtract, 10 multiply).
package mips_pkg;

  localparam int DATA_W = 16;  // datapath width
  localparam int NREGS  = 8;   // general-purpose registers
  localparam int RA_W   = 3;   // register address bits actually decoded
  localparam int LINK_REG = 7; // jal writes its return address here

  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08,
    OP_LUI   = 6'h0F,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  typedef enum logic [5:0] {
    F_SLL    = 6'h00,
    F_SRL    = 6'h02,
    F_JR     = 6'h08,
    F_FPADD  = 6'h10,
    F_FPSUB  = 6'h12,
    F_FPMULT = 6'h14,
    F_ADD    = 6'h20,
    F_ADDU   = 6'h21,
    F_SUB    = 6'h22,
    F_SUBU   = 6'h23,
    F_AND    = 6'h24,
    F_OR     = 6'h25,
    F_SLT    = 6'h2A
  } funct_e;

  // ALUOp from the control unit to the ALU control.
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,  // address and addi
    ALUOP_SUB   = 2'b01,  // beq / bne compare
    ALUOP_FUNCT = 2'b10,  // R-type: decode funct
    ALUOP_LUI   = 2'b11   // pass the immediate
  } aluop_e;

  // Operation performed by the integer ALU.
  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,
    ALU_SUB   = 3'd1,
    ALU_AND   = 3'd2,
    ALU_OR    = 3'd3,
    ALU_SLT   = 3'd4,
    ALU_SLL   = 3'd5,
    ALU_SRL   = 3'd6,
    ALU_PASSB = 3'd7
  } alu_op_e;

  // Main control signals (the control unit's outputs in the reference single-cycle datapath,
  // plus the jump controls the expanded instruction set needs).
  typedef struct packed {
    logic   reg_dst;     // write register = rd (1) or rt (0)
    logic   branch;      // beq
    logic   branch_ne;   // bne
    logic   mem_read;
    logic   mem_to_reg;
    aluop_e alu_op;
    logic   mem_write;
    logic   alu_src;     // ALU B = immediate (1) or Read Data 2 (0)
    logic   reg_write;
    logic   jump;        // j and jal
    logic   link;        // jal: write PC+4 to the link register
  } ctrl_t;

endpackage
