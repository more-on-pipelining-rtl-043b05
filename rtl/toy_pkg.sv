// toy_pkg: shared types and constants of the five-step toy pipeline.
//
// The toy instruction set has six instructions: add, addi, load, store, goto
// and if. Their meaning and the five pipeline steps each one goes through
// (fetch, decode, operand fetch, execution, output save) follow the course
// material the design is built from. The binary encoding below is this
// design's own choice, since the instructions are only given as assembly:
//
//   [31:28] opcode   [27:24] A   [23:20] B   [19:16] C   [15:0] N / address / line
//
//   add   A B C      A <- B + C
//   addi  A C N      A <- C + N          (N is a signed 16-bit integer)
//   load  A address  A <- mem[address]
//   store A address  mem[address] <- A
//   goto  line       PC <- line
//   if    A line     PC <- line when A != 0
//
// Program lines are numbered from 1, as in the examples; line 0 is unused.
// The opcode value 0 is a no-operation that is never produced by a program
// written in the toy ISA but keeps an empty memory word harmless.
package toy_pkg;

  // Data word width. Not given by the source material; 32 bits assumed.
  parameter int unsigned XLEN = 32;
  // Register index width: 16 registers, R0..R15 (the examples use R1..R8).
  parameter int unsigned REG_W = 4;
  // Program line number width (instruction memory of up to 256 lines).
  parameter int unsigned LINE_W = 8;
  // Data memory word-address width (up to 256 words).
  parameter int unsigned ADDR_W = 8;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [REG_W-1:0]  reg_idx_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_ADD   = 4'd1,
    OP_ADDI  = 4'd2,
    OP_LOAD  = 4'd3,
    OP_STORE = 4'd4,
    OP_GOTO  = 4'd5,
    OP_IF    = 4'd6
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    reg_idx_t    a;
    reg_idx_t    b;
    reg_idx_t    c;
    logic [15:0] n;
  } instr_t;

  typedef enum logic {
    ALU_ADD = 1'b0,   // y = in1 + in2
    ALU_NZ  = 1'b1    // y = (in1 != 0) ? 1 : 0
  } alu_op_e;

  // What the decode step determines about an instruction.
  typedef struct packed {
    logic     uses_alu;    // add, addi, if
    alu_op_e  alu_op;
    logic     rs1_en;      // reads register rs1 (first ALU input)
    reg_idx_t rs1;
    logic     rs2_en;      // reads register rs2 (second ALU input)
    reg_idx_t rs2;
    logic     use_imm;     // second ALU input is the integer N
    word_t    imm;
    logic     rsd_en;      // store: reads register A as bus data
    reg_idx_t rsd;
    logic     wr_reg;      // modifies register rd
    reg_idx_t rd;
    logic     mem_rd;      // load: takes input from memory address maddr
    logic     mem_wr;      // store: modifies memory address maddr
    addr_t    maddr;
    logic     is_goto;
    logic     is_if;
    line_t    target;      // goto / if line
  } ctrl_t;

  // What each pipeline step holds in a cycle (line number, 0 = empty), and
  // which pipeline mechanisms act in that cycle.
  typedef struct packed {
    line_t f;          // fetch step
    line_t d;          // decode step
    line_t of;         // operand fetch step
    line_t ex;         // execution step
    line_t os;         // output save step
    line_t pc;         // program counter
    logic  stall_reg;  // decode waits on a register
    logic  stall_mem;  // decode waits on a memory address
    logic  flush;      // goto/if leaves decode: fetched instruction erased
    logic  redirect;   // goto/taken if sets PC at output save
  } trace_t;

  // Assemblers used by testbenches and program loaders.
  function automatic instr_t mk_add(reg_idx_t a, reg_idx_t b, reg_idx_t c);
    return '{op: OP_ADD, a: a, b: b, c: c, n: '0};
  endfunction
  function automatic instr_t mk_addi(reg_idx_t a, reg_idx_t c, logic [15:0] n);
    return '{op: OP_ADDI, a: a, b: '0, c: c, n: n};
  endfunction
  function automatic instr_t mk_load(reg_idx_t a, addr_t addr);
    return '{op: OP_LOAD, a: a, b: '0, c: '0, n: 16'(addr)};
  endfunction
  function automatic instr_t mk_store(reg_idx_t a, addr_t addr);
    return '{op: OP_STORE, a: a, b: '0, c: '0, n: 16'(addr)};
  endfunction
  function automatic instr_t mk_goto(line_t line);
    return '{op: OP_GOTO, a: '0, b: '0, c: '0, n: 16'(line)};
  endfunction
  function automatic instr_t mk_if(reg_idx_t a, line_t line);
    return '{op: OP_IF, a: a, b: '0, c: '0, n: 16'(line)};
  endfunction

endpackage
