// toy_regfile: general registers of the toy pipeline.
//
// NREGS registers of XLEN bits. Two combinational read ports serve the
// operand fetch step, which copies registers into the ALU input registers;
// a third serves the execution step of store, where the bus receives the
// contents of register A. One synchronous write port serves the output save
// step. All registers reset to 0. There is no bypass from the write port to
// the read ports: the decode-step interlock keeps a reader back until the
// writer has completed its output save step, so a register is never read in
// the cycle it is written. The number of registers (16) is this design's
// choice; the examples use R1..R8.
module toy_regfile
  import toy_pkg::*;
#(
  parameter int unsigned NREGS = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // operand fetch read ports
  input  reg_idx_t ra1,
  output word_t    rd1,
  input  reg_idx_t ra2,
  output word_t    rd2,
  // execution-step read port (store data)
  input  reg_idx_t ra3,
  output word_t    rd3,
  // output save write port
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd
);

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && int'(wa) < int'(NREGS)) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (int'(ra1) < int'(NREGS)) ? regs[ra1] : '0;
  assign rd2 = (int'(ra2) < int'(NREGS)) ? regs[ra2] : '0;
  assign rd3 = (int'(ra3) < int'(NREGS)) ? regs[ra3] : '0;

endmodule
