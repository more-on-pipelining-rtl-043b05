// tb_toy_decoder: self-checking test of the decode step.
// For each instruction of the toy ISA, with random fields, checks what the
// decoder reports (unit used, registers read, register or address modified,
// goto/if, line, sign-extended N) against the instruction's definition.
module tb_toy_decoder;
  import toy_pkg::*;

  instr_t instr;
  ctrl_t  c;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  toy_decoder dut (.instr(instr), .ctrl(c));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (instr %h)", what, instr);
    end
  endtask

  initial begin
    for (int k = 0; k < 100; k++) begin
      reg_idx_t a, b, cc;
      logic [15:0] n;
      a = reg_idx_t'($urandom); b = reg_idx_t'($urandom); cc = reg_idx_t'($urandom);
      n = 16'($urandom);

      instr = mk_add(a, b, cc); #1;
      chk(c.uses_alu && c.alu_op == ALU_ADD, "add uses ALU add");
      chk(c.rs1_en && c.rs1 == b && c.rs2_en && c.rs2 == cc && !c.use_imm, "add reads B and C");
      chk(c.wr_reg && c.rd == a && !c.mem_rd && !c.mem_wr, "add modifies A");
      chk(!c.is_goto && !c.is_if && !c.rsd_en, "add is not a branch");

      instr = mk_addi(a, cc, n); #1;
      chk(c.uses_alu && c.alu_op == ALU_ADD, "addi uses ALU add");
      chk(c.rs1_en && c.rs1 == cc && !c.rs2_en && c.use_imm, "addi reads C and N");
      chk(c.imm == word_t'(signed'(n)), "addi N sign-extended");
      chk(c.wr_reg && c.rd == a, "addi modifies A");

      instr = mk_load(a, addr_t'(n)); #1;
      chk(c.mem_rd && !c.mem_wr && c.maddr == addr_t'(n), "load reads address");
      chk(c.wr_reg && c.rd == a && !c.rs1_en && !c.rs2_en && !c.rsd_en, "load modifies A only");
      chk(!c.uses_alu, "load does not use the ALU");

      instr = mk_store(a, addr_t'(n)); #1;
      chk(c.mem_wr && !c.mem_rd && c.maddr == addr_t'(n), "store modifies address");
      chk(c.rsd_en && c.rsd == a && !c.wr_reg && !c.rs1_en, "store reads A");

      instr = mk_goto(line_t'(n)); #1;
      chk(c.is_goto && !c.is_if && c.target == line_t'(n), "goto line");
      chk(!c.wr_reg && !c.mem_wr && !c.rs1_en && !c.mem_rd, "goto touches nothing else");

      instr = mk_if(a, line_t'(n)); #1;
      chk(c.is_if && !c.is_goto && c.target == line_t'(n), "if line");
      chk(c.uses_alu && c.alu_op == ALU_NZ && c.rs1_en && c.rs1 == a, "if compares A with 0");
      chk(!c.wr_reg && !c.mem_wr, "if modifies no register");

      instr = '0; #1;
      chk(!c.wr_reg && !c.mem_wr && !c.is_goto && !c.is_if && !c.rs1_en, "nop does nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
