// mips_fpu_top: single-cycle MIPS processor with a 16-bit floating-point
// co-processor.
//
// The processor fetches one 32-bit instruction per clock from the
// instruction memory, reads two of its eight 16-bit registers, computes in
// the ALU and, for lw/sw, accesses the 256 x 16 data memory in the same
// cycle; results are written back at the rising edge. The FPU sits beside
// the ALU: it takes the same two operands (Read Data 1 and Read Data 2) and
// its result joins the ALU result on the way to the register file.
//
// Floating-point instructions (FPadd, FPsub, FPmult) take more than one
// cycle, because the FPU is a state machine. The processor then freezes:
// in the instruction's first cycle it pulses the FPU's data_rdy, it holds
// the PC and blocks the register write while a counter runs through the
// FPU path's fixed number of states N (fp16_pkg::fpu_states), and in cycle
// N+1, when FPU_out holds the result, it writes rd and moves on. An FP
// instruction therefore takes N+2 clocks (6 for add/subtract, 5 for
// multiply); every other instruction takes one. The FPU keeps the port list
// it is specified with, which has no done signal, so the processor relies
// on the known latency.
//
// Interface: clk, a synchronous active-high rst (hold it for at least 20
// clocks after power-up so the FPU, which has no reset, is idle), and
// observation outputs: the PC, the current instruction, the value offered
// to the register file, the register and memory write enables and the FPU
// stall. PROGRAM_FILE and DATA_FILE are the $readmemh images of the two
// memories; the defaults are the floating-point test program and its data.
//
// The datapath, the eight registers, the 16-bit width, the 32-bit
// instruction format, the instruction set and the FPU's place beside the
// ALU follow the processor's specification. The stall mechanism, the jump
// paths, the zero register R0 and the reset are this design's choices.
module mips_fpu_top
  import mips_pkg::*;
  import fp16_pkg::*;
#(
  parameter string PROGRAM_FILE = "rtl/program.hex",
  parameter string DATA_FILE    = "rtl/dmemory.hex",
  parameter int    IMEM_DEPTH   = 256,
  parameter int    DMEM_DEPTH   = 256
) (
  input  logic              clk,
  input  logic              rst,
  output logic [DATA_W-1:0] pc_out,
  output logic [31:0]       instruction_out,
  output logic [DATA_W-1:0] write_data_out,
  output logic              reg_write_out,
  output logic              mem_write_out,
  output logic              fpu_stall_out
);

  // ---------------- fetch ----------------
  logic [DATA_W-1:0] pc, pc_plus4;
  logic [31:0]       instr;

  instruction_memory #(.DEPTH(IMEM_DEPTH), .INIT_FILE(PROGRAM_FILE)) u_imem (
    .addr  (pc[$clog2(IMEM_DEPTH)+1:2]),
    .instr (instr)
  );

  // ---------------- decode ----------------
  ctrl_t ctrl;
  control_unit u_ctrl (.opcode(instr[31:26]), .ctrl(ctrl));

  logic [RA_W-1:0]   rs_a, rt_a, rd_a, wa;
  logic [DATA_W-1:0] rd1, rd2, wd, imm_ext;
  logic              we;

  assign rs_a = instr[21+:RA_W];
  assign rt_a = instr[16+:RA_W];
  assign rd_a = instr[11+:RA_W];
  // Sign extension of Instruction[15:0] to the datapath width.
  assign imm_ext = DATA_W'($signed(instr[15:0]));

  register_file u_regs (
    .clk (clk), .rst (rst),
    .ra1 (rs_a), .ra2 (rt_a), .rd1 (rd1), .rd2 (rd2),
    .we  (we), .wa (wa), .wd (wd)
  );

  // ---------------- execute ----------------
  alu_op_e     alu_sel;
  fpu_op_e     fpu_op;
  logic        fp, jr, reg_ok, zero;
  logic [DATA_W-1:0] alu_b, alu_result, fpu_result;

  alu_control u_aluctl (
    .alu_op (ctrl.alu_op), .funct (instr[5:0]),
    .alu_sel (alu_sel), .fpu_op (fpu_op), .fp (fp), .jr (jr), .reg_ok (reg_ok)
  );

  assign alu_b = ctrl.alu_src ? imm_ext : rd2;

  alu u_alu (
    .a (rd1), .b (alu_b), .shamt (instr[10:6]), .op (alu_sel),
    .result (alu_result), .zero (zero)
  );

  // FPU sequencing: data_rdy in the first cycle, result after N states.
  logic [4:0] fp_cnt;
  logic       data_rdy, fp_done, fp_stall;

  assign data_rdy = fp && (fp_cnt == 5'd0) && !rst;
  assign fp_done  = fp && (fp_cnt == 5'(fpu_states(fpu_op) + 1));
  assign fp_stall = fp && !fp_done;

  always_ff @(posedge clk) begin
    if (rst || !fp || fp_done) fp_cnt <= '0;
    else                       fp_cnt <= fp_cnt + 5'd1;
  end

  fpu u_fpu (
    .clock (clk), .data_rdy (data_rdy), .opcode (fpu_op),
    .A_in (rd1), .B_in (rd2), .FPU_out (fpu_result)
  );

  // ---------------- memory ----------------
  logic [DATA_W-1:0] mem_rdata;

  data_memory #(.DEPTH(DMEM_DEPTH), .INIT_FILE(DATA_FILE)) u_dmem (
    .clk (clk), .addr (alu_result[$clog2(DMEM_DEPTH)-1:0]),
    .we (ctrl.mem_write && !rst), .wdata (rd2), .rdata (mem_rdata)
  );

  // ---------------- write back ----------------
  assign wa = ctrl.link    ? RA_W'(LINK_REG) :
              ctrl.reg_dst ? rd_a : rt_a;
  assign wd = ctrl.link       ? pc_plus4 :
              ctrl.mem_to_reg ? mem_rdata :
              fp              ? fpu_result : alu_result;
  assign we = ctrl.reg_write && reg_ok && !fp_stall && !rst;

  // ---------------- next PC ----------------
  pc_unit u_pc (
    .clk (clk), .rst (rst), .hold (fp_stall),
    .branch (ctrl.branch), .branch_ne (ctrl.branch_ne), .zero (zero),
    .imm (imm_ext), .jump (ctrl.jump), .jump_target (instr[25:0]),
    .jr (jr), .jr_target (rd1),
    .pc (pc), .pc_plus4 (pc_plus4)
  );

  assign pc_out          = pc;
  assign instruction_out = instr;
  assign write_data_out  = wd;
  assign reg_write_out   = we;
  assign mem_write_out   = ctrl.mem_write;
  assign fpu_stall_out   = fp_stall;

endmodule
