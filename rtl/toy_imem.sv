// toy_imem: instruction memory holding the program, one instruction per line.
//
// LINES words of 32 bits, addressed by program line number (the first
// program line is line 1). The fetch step reads it combinationally at the
// program counter; the instruction is captured into the decode step register
// at the clock edge. A synchronous load port lets a host write the program,
// normally while the pipeline is held in reset. Size and load port are this
// design's choices; the source material only says that instructions are
// fetched from memory.
module toy_imem
  import toy_pkg::*;
#(
  parameter int unsigned LINES = 256
) (
  input  logic   clk,
  // fetch read port
  input  line_t  raddr,
  output instr_t rdata,
  // program load port
  input  logic   we,
  input  line_t  waddr,
  input  instr_t wdata
);

  instr_t mem [LINES];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < int'(LINES)) mem[waddr] <= wdata;
  end

  assign rdata = (int'(raddr) < int'(LINES)) ? mem[raddr] : instr_t'('0);

endmodule
