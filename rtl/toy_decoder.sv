// toy_decoder: the decode step of the toy pipeline.
//
// Works out, for the instruction held at the decode step, what the pipeline
// needs to know (following the decode step of each instruction):
//   add   A B C   uses the ALU (add), reads B and C, modifies A
//   addi  A C N   uses the ALU (add), reads C and the integer N, modifies A
//   load  A addr  accesses memory, takes input from addr, modifies A
//   store A addr  accesses memory, takes input from A, modifies addr
//   goto  line    is a goto
//   if    A line  is an if, reads A, uses the ALU (compare with 0)
// The output ctrl_t feeds the interlock (toy_hazard) and travels down the
// pipeline with the instruction. N is sign-extended. Combinational.
module toy_decoder
  import toy_pkg::*;
(
  input  instr_t instr,
  output ctrl_t  ctrl
);

  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.imm    = word_t'(signed'(instr.n));
    ctrl.maddr  = instr.n[ADDR_W-1:0];
    ctrl.target = instr.n[LINE_W-1:0];
    unique case (instr.op)
      OP_ADD: begin
        ctrl.uses_alu = 1'b1;
        ctrl.rs1_en   = 1'b1;  ctrl.rs1 = instr.b;
        ctrl.rs2_en   = 1'b1;  ctrl.rs2 = instr.c;
        ctrl.wr_reg   = 1'b1;  ctrl.rd  = instr.a;
      end
      OP_ADDI: begin
        ctrl.uses_alu = 1'b1;
        ctrl.rs1_en   = 1'b1;  ctrl.rs1 = instr.c;
        ctrl.use_imm  = 1'b1;
        ctrl.wr_reg   = 1'b1;  ctrl.rd  = instr.a;
      end
      OP_LOAD: begin
        ctrl.mem_rd   = 1'b1;
        ctrl.wr_reg   = 1'b1;  ctrl.rd  = instr.a;
      end
      OP_STORE: begin
        ctrl.mem_wr   = 1'b1;
        ctrl.rsd_en   = 1'b1;  ctrl.rsd = instr.a;
      end
      OP_GOTO: begin
        ctrl.is_goto  = 1'b1;
      end
      OP_IF: begin
        ctrl.is_if    = 1'b1;
        ctrl.uses_alu = 1'b1;
        ctrl.alu_op   = ALU_NZ;
        ctrl.rs1_en   = 1'b1;  ctrl.rs1 = instr.a;
      end
      default: ;  // OP_NOP and unused codes: no effect
    endcase
  end

endmodule
