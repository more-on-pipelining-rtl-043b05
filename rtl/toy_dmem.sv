// toy_dmem: data memory reached over the bus by load and store.
//
// WORDS words of XLEN bits. A load's execution step reads a word
// combinationally ("the bus brings to the CPU the contents of address"); a
// store's output save step writes one at the clock edge ("the bus saves the
// data at address"). A second, host port reads and writes words so that a
// testbench or host can place the program inputs and collect the outputs.
// If both ports write the same word in one cycle the pipeline's write wins.
// Size, single-cycle access and the host port are this design's choices.
module toy_dmem
  import toy_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic  clk,
  // pipeline side
  input  addr_t cpu_raddr,
  output word_t cpu_rdata,
  input  logic  cpu_we,
  input  addr_t cpu_waddr,
  input  word_t cpu_wdata,
  // host side
  input  logic  host_we,
  input  addr_t host_addr,
  input  word_t host_wdata,
  output word_t host_rdata
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (host_we && int'(host_addr) < int'(WORDS)) mem[host_addr] <= host_wdata;
    if (cpu_we  && int'(cpu_waddr) < int'(WORDS)) mem[cpu_waddr] <= cpu_wdata;
  end

  assign cpu_rdata  = (int'(cpu_raddr) < int'(WORDS)) ? mem[cpu_raddr] : '0;
  assign host_rdata = (int'(host_addr) < int'(WORDS)) ? mem[host_addr] : '0;

endmodule
