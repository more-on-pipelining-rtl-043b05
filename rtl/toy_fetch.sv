// toy_fetch: program counter and fetch step of the toy pipeline.
//
// Each cycle in which fetching is allowed, the instruction at line PC is read
// from instruction memory and PC is incremented; the instruction moves into
// the decode-step register at the clock edge. The unit behaves as follows:
//   - stall: the decode step holds its instruction, so the fetch step holds
//     too (PC and the decode-step register keep their values);
//   - flush: a goto or if leaves the decode step. The instruction fetched
//     meanwhile is erased (the decode-step register becomes empty) and PC is
//     not advanced, so that line is fetched again later if execution falls
//     through (a not-taken if);
//   - stop: while a goto or if is at operand fetch, execution or output save,
//     nothing is fetched;
//   - redirect: when a goto, or an if whose ALU output is 1, completes its
//     output save step, PC is set to its line. Fetching resumes in the next
//     cycle.
// Fetching also ends once PC passes the last program line, prog_len.
// PC is reset to line 1. fetch_valid/fetch_line show the line at the fetch
// step in the current cycle (0 when none).
module toy_fetch
  import toy_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  line_t  prog_len,
  // instruction memory
  output line_t  imem_addr,
  input  instr_t imem_rdata,
  // control
  input  logic   stall,
  input  logic   flush,
  input  logic   stop,
  input  logic   redirect,
  input  line_t  redirect_line,
  // fetch-step status
  output line_t  pc,
  output logic   fetch_valid,
  // decode-step register
  output logic   d_valid,
  output line_t  d_line,
  output instr_t d_instr
);

  logic more;   // PC still inside the program

  assign more        = (pc != '0) && (pc <= prog_len);
  assign fetch_valid = more && !stop;
  assign imem_addr   = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= line_t'(1);
      d_valid <= 1'b0;
      d_line  <= '0;
      d_instr <= '0;
    end else begin
      if (redirect) begin
        pc <= redirect_line;
      end else if (fetch_valid && !stall && !flush) begin
        pc <= pc + line_t'(1);
      end

      if (flush) begin
        d_valid <= 1'b0;
        d_line  <= '0;
        d_instr <= '0;
      end else if (!stall) begin
        d_valid <= fetch_valid;
        d_line  <= fetch_valid ? pc : '0;
        d_instr <= fetch_valid ? imem_rdata : instr_t'('0);
      end
    end
  end

endmodule
