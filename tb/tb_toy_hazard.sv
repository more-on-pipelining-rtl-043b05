// tb_toy_hazard: self-checking test of the decode-step interlock.
// Random decode-step instructions are checked against random older
// instructions at operand fetch and execution; the expected wait is worked
// out in the testbench from the rule "wait until all previous instructions
// have finished modifying what this one reads" (registers, and for a load
// the memory address). Directed cases cover each kind of wait.
module tb_toy_hazard;
  import toy_pkg::*;

  logic  dec_valid;
  ctrl_t dec;
  logic  older_valid [2];
  ctrl_t older [2];
  logic  stall_reg, stall_mem, stall;
  instr_t ins_d, ins_o0, ins_o1;
  int checks = 0, failures = 0;
  int n_reg = 0, n_mem = 0;
  logic clk = 1'b0;

  toy_hazard #(.NOLDER(2)) dut (
    .dec_valid(dec_valid), .dec(dec), .older_valid(older_valid), .older(older),
    .stall_reg(stall_reg), .stall_mem(stall_mem), .stall(stall));

  toy_decoder u_d  (.instr(ins_d),  .ctrl(dec));
  toy_decoder u_o0 (.instr(ins_o0), .ctrl(older[0]));
  toy_decoder u_o1 (.instr(ins_o1), .ctrl(older[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A random instruction of the ISA on few registers and addresses, so that
  // matches are frequent.
  function automatic instr_t rnd();
    reg_idx_t a = reg_idx_t'($urandom_range(0, 3));
    reg_idx_t b = reg_idx_t'($urandom_range(0, 3));
    reg_idx_t c = reg_idx_t'($urandom_range(0, 3));
    addr_t    m = addr_t'($urandom_range(0, 2));
    case ($urandom_range(0, 5))
      0: return mk_add(a, b, c);
      1: return mk_addi(a, c, 16'($urandom));
      2: return mk_load(a, m);
      3: return mk_store(a, m);
      4: return mk_goto(line_t'($urandom));
      default: return mk_if(a, line_t'($urandom));
    endcase
  endfunction

  // Reference: which registers an instruction reads / writes.
  function automatic bit reads_reg(instr_t i, reg_idx_t r);
    case (i.op)
      OP_ADD:   return i.b == r || i.c == r;
      OP_ADDI:  return i.c == r;
      OP_STORE: return i.a == r;
      OP_IF:    return i.a == r;
      default:  return 0;
    endcase
  endfunction
  function automatic bit writes_reg(instr_t i, reg_idx_t r);
    return (i.op == OP_ADD || i.op == OP_ADDI || i.op == OP_LOAD) && i.a == r;
  endfunction

  task automatic run_case(input instr_t d, input bit dv, input instr_t o0, input bit v0,
                          input instr_t o1, input bit v1);
    bit er, em;
    ins_d = d; ins_o0 = o0; ins_o1 = o1;
    dec_valid = dv; older_valid[0] = v0; older_valid[1] = v1;
    #1;
    er = 0; em = 0;
    if (dv) begin
      for (int r = 0; r < 16; r++) begin
        if (reads_reg(d, reg_idx_t'(r)) &&
            ((v0 && writes_reg(o0, reg_idx_t'(r))) || (v1 && writes_reg(o1, reg_idx_t'(r)))))
          er = 1;
      end
      if (d.op == OP_LOAD &&
          ((v0 && o0.op == OP_STORE && o0.n[ADDR_W-1:0] == d.n[ADDR_W-1:0]) ||
           (v1 && o1.op == OP_STORE && o1.n[ADDR_W-1:0] == d.n[ADDR_W-1:0])))
        em = 1;
    end
    n_reg += int'(er);
    n_mem += int'(em);
    checks++;
    if (stall_reg !== er || stall_mem !== em || stall !== (er | em)) begin
      failures++;
      $display("FAIL: dec %h(%0b) older %h(%0b) %h(%0b): reg %0b/%0b mem %0b/%0b",
               d, dv, o0, v0, o1, v1, stall_reg, er, stall_mem, em);
    end
  endtask

  initial begin
    // directed: the example's waits
    run_case(mk_if(1, 6), 1, mk_load(1, 1), 1, mk_load(2, 2), 1);      // if waits on load R1
    run_case(mk_store(4, 10), 1, mk_addi(4, 2, 5), 1, '0, 0);          // store waits on addi R4
    run_case(mk_store(4, 10), 1, '0, 0, mk_addi(4, 2, 5), 1);          // producer at execution
    run_case(mk_store(4, 10), 1, mk_addi(4, 2, 5), 0, '0, 0);          // empty slot: no wait
    run_case(mk_load(2, 20), 1, mk_store(1, 20), 1, '0, 0);            // load waits on store
    run_case(mk_load(2, 21), 1, mk_store(1, 20), 1, '0, 0);            // other address
    run_case(mk_add(8, 2, 3), 1, mk_addi(3, 1, 20), 1, '0, 0);         // second operand
    run_case(mk_add(8, 2, 3), 0, mk_addi(3, 1, 20), 1, '0, 0);         // decode empty
    for (int k = 0; k < 3000; k++)
      run_case(rnd(), $urandom_range(0, 5) != 0, rnd(), $urandom_range(0, 3) != 0,
               rnd(), $urandom_range(0, 3) != 0);
    checks++;
    if (n_reg == 0 || n_mem == 0) begin
      failures++;
      $display("FAIL: register waits %0d, memory waits %0d", n_reg, n_mem);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
