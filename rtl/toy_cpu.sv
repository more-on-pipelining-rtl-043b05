// toy_cpu: five-step in-order pipeline for the toy instruction set.
//
// Every instruction goes through five steps, one per clock cycle when
// nothing waits: fetch (toy_fetch), decode (toy_decoder plus the interlock
// toy_hazard), operand fetch (registers into the two ALU input registers),
// execution (toy_alu, or the bus for load/store) and output save (register
// write, memory write over the bus, or PC update for goto/if).
//
// Rules taken from the course material:
//   - An instruction waits at decode until every older instruction has
//     finished modifying the registers (or, for a load, the memory address)
//     it reads: it leaves decode in the cycle its producer is at output save.
//     Waiting inserts an empty slot at operand fetch; fetch holds.
//   - When a goto or if leaves decode, the instruction fetched meanwhile is
//     erased and fetching stops until the goto/if has completed output save.
//     A goto, or an if whose register is not 0, then sets PC to its line; a
//     not-taken if leaves PC at the line after it.
//   - store reads register A during its execution step and the bus writes the
//     word during output save; load reads the bus during execution and writes
//     register A during output save.
// With these rules the 12-line example program takes 31 cycles and its
// reordered version 24.
//
// Interface: load the program through imem_* and the inputs through
// dmem_host_* while rst_n is low, set prog_len to the last program line,
// then release reset. Line 1 is at the fetch step in the first cycle after
// reset. `done` rises once PC has passed prog_len and all steps are empty.
// `trace` shows each step's line number (0 = empty) for observation.
// The instruction encoding, widths, memory sizes, host ports and the end
// condition are this design's choices.
module toy_cpu
  import toy_pkg::*;
#(
  parameter int unsigned IMEM_LINES = 256,
  parameter int unsigned DMEM_WORDS = 256,
  parameter int unsigned NREGS      = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  line_t  prog_len,
  // program load
  input  logic   imem_we,
  input  line_t  imem_waddr,
  input  instr_t imem_wdata,
  // data memory host port
  input  logic   dmem_host_we,
  input  addr_t  dmem_host_addr,
  input  word_t  dmem_host_wdata,
  output word_t  dmem_host_rdata,
  // status
  output logic   done,
  output trace_t trace
);

  // ---------------------------------------------------------------- fetch
  line_t  imem_addr, pc;
  instr_t imem_rdata, d_instr;
  logic   fetch_valid, d_valid;
  line_t  d_line;
  logic   stall, stall_reg, stall_mem, flush, stop, redirect;
  line_t  redirect_line;

  toy_imem #(.LINES(IMEM_LINES)) u_imem (
    .clk   (clk),
    .raddr (imem_addr),
    .rdata (imem_rdata),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  toy_fetch u_fetch (
    .clk           (clk),
    .rst_n         (rst_n),
    .prog_len      (prog_len),
    .imem_addr     (imem_addr),
    .imem_rdata    (imem_rdata),
    .stall         (stall),
    .flush         (flush),
    .stop          (stop),
    .redirect      (redirect),
    .redirect_line (redirect_line),
    .pc            (pc),
    .fetch_valid   (fetch_valid),
    .d_valid       (d_valid),
    .d_line        (d_line),
    .d_instr       (d_instr)
  );

  // --------------------------------------------------------------- decode
  ctrl_t d_ctrl;

  toy_decoder u_dec (
    .instr (d_instr),
    .ctrl  (d_ctrl)
  );

  // Operand fetch, execution and output save step registers.
  logic  of_valid, ex_valid, os_valid;
  line_t of_line,  ex_line,  os_line;
  ctrl_t of_ctrl,  ex_ctrl,  os_ctrl;
  word_t ex_in1, ex_in2;       // ALU input registers
  word_t os_result;            // ALU output, bus data or store data

  // Older instructions that can still hold decode back (see toy_hazard).
  logic  older_valid [2];
  ctrl_t older       [2];
  assign older_valid = '{of_valid, ex_valid};
  assign older       = '{of_ctrl,  ex_ctrl};

  toy_hazard #(.NOLDER(2)) u_hazard (
    .dec_valid   (d_valid),
    .dec         (d_ctrl),
    .older_valid (older_valid),
    .older       (older),
    .stall_reg   (stall_reg),
    .stall_mem   (stall_mem),
    .stall       (stall)
  );

  // A goto/if leaving decode erases the fetched instruction; one in a later
  // step stops fetching.
  assign flush = d_valid && !stall && (d_ctrl.is_goto || d_ctrl.is_if);
  assign stop  = (of_valid && (of_ctrl.is_goto || of_ctrl.is_if)) ||
                 (ex_valid && (ex_ctrl.is_goto || ex_ctrl.is_if)) ||
                 (os_valid && (os_ctrl.is_goto || os_ctrl.is_if));

  // ------------------------------------------------------- register file
  word_t rf_rd1, rf_rd2, rf_rd3;
  logic  rf_we;

  assign rf_we = os_valid && os_ctrl.wr_reg;

  toy_regfile #(.NREGS(NREGS)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (of_ctrl.rs1),
    .rd1   (rf_rd1),
    .ra2   (of_ctrl.rs2),
    .rd2   (rf_rd2),
    .ra3   (ex_ctrl.rsd),
    .rd3   (rf_rd3),
    .we    (rf_we),
    .wa    (os_ctrl.rd),
    .wd    (os_result)
  );

  // ------------------------------------------------ ALU and data memory
  word_t alu_y, bus_rdata, ex_result;

  toy_alu u_alu (
    .op  (ex_ctrl.alu_op),
    .in1 (ex_in1),
    .in2 (ex_in2),
    .y   (alu_y)
  );

  toy_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk        (clk),
    .cpu_raddr  (ex_ctrl.maddr),
    .cpu_rdata  (bus_rdata),
    .cpu_we     (os_valid && os_ctrl.mem_wr),
    .cpu_waddr  (os_ctrl.maddr),
    .cpu_wdata  (os_result),
    .host_we    (dmem_host_we),
    .host_addr  (dmem_host_addr),
    .host_wdata (dmem_host_wdata),
    .host_rdata (dmem_host_rdata)
  );

  always_comb begin
    if (ex_ctrl.mem_rd)      ex_result = bus_rdata;
    else if (ex_ctrl.mem_wr) ex_result = rf_rd3;
    else                     ex_result = alu_y;
  end

  // -------------------------------------------------- output save: PC
  assign redirect      = os_valid && (os_ctrl.is_goto || (os_ctrl.is_if && os_result[0]));
  assign redirect_line = os_ctrl.target;

  // ------------------------------------------------- step registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      of_valid  <= 1'b0;  of_line <= '0;  of_ctrl <= '0;
      ex_valid  <= 1'b0;  ex_line <= '0;  ex_ctrl <= '0;
      ex_in1    <= '0;    ex_in2  <= '0;
      os_valid  <= 1'b0;  os_line <= '0;  os_ctrl <= '0;
      os_result <= '0;
    end else begin
      // decode -> operand fetch (an empty slot while decode waits)
      of_valid <= d_valid && !stall;
      of_line  <= (d_valid && !stall) ? d_line : '0;
      of_ctrl  <= (d_valid && !stall) ? d_ctrl : '0;
      // operand fetch -> execution: load the ALU input registers
      ex_valid <= of_valid;
      ex_line  <= of_line;
      ex_ctrl  <= of_ctrl;
      ex_in1   <= of_ctrl.rs1_en ? rf_rd1 : '0;
      ex_in2   <= of_ctrl.use_imm ? of_ctrl.imm : (of_ctrl.rs2_en ? rf_rd2 : '0);
      // execution -> output save
      os_valid  <= ex_valid;
      os_line   <= ex_line;
      os_ctrl   <= ex_ctrl;
      os_result <= ex_result;
    end
  end

  // ------------------------------------------------------------ status
  assign done = !fetch_valid && !stop && !(pc != '0 && pc <= prog_len) &&
                !d_valid && !of_valid && !ex_valid && !os_valid;

  assign trace = '{f:         fetch_valid ? pc : '0,
                   d:         d_line,
                   of:        of_line,
                   ex:        ex_line,
                   os:        os_line,
                   pc:        pc,
                   stall_reg: stall_reg,
                   stall_mem: stall_mem,
                   flush:     flush,
                   redirect:  redirect};

  // The erased instruction is always the line after the goto/if.
  a_flush_line: assert property (@(posedge clk) disable iff (!rst_n)
    flush |-> pc == d_line + line_t'(1));
  // Nothing is fetched while a goto/if is on its way to output save.
  a_stop_fetch: assert property (@(posedge clk) disable iff (!rst_n)
    stop |-> !fetch_valid);
  // A waiting instruction never reaches operand fetch.
  a_stall_bubble: assert property (@(posedge clk) disable iff (!rst_n)
    stall |=> !of_valid);

endmodule
