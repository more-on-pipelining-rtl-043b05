// toy_hazard: the decode-step interlock of the toy pipeline.
//
// An instruction must wait at the decode step until all previous
// instructions have finished modifying what it reads. An older instruction
// at the output save step finishes at the end of the current cycle, the same
// edge at which the waiting instruction leaves decode; its operand fetch
// step comes one cycle later and sees the new value. So only older
// instructions at the operand fetch and execution steps hold an instruction
// back (NOLDER = 2), which is exactly the timing of the example schedules
// (an instruction leaves decode in the cycle its producer is at output
// save). This unit raises `stall` when the decode-step instruction
//   - reads a register (rs1, rs2 or store data) that an older instruction
//     will write (register hazard, `stall_reg`), or
//   - is a load whose address an older store will write (memory hazard,
//     `stall_mem`).
// There is no forwarding: results are only visible once written, as the
// pipeline schedules of the examples show. Combinational.
module toy_hazard
  import toy_pkg::*;
#(
  parameter int unsigned NOLDER = 2   // operand fetch, execution
) (
  input  logic  dec_valid,
  input  ctrl_t dec,
  input  logic  older_valid [NOLDER],
  input  ctrl_t older       [NOLDER],
  output logic  stall_reg,
  output logic  stall_mem,
  output logic  stall
);

  always_comb begin
    stall_reg = 1'b0;
    stall_mem = 1'b0;
    if (dec_valid) begin
      for (int i = 0; i < int'(NOLDER); i++) begin
        if (older_valid[i] && older[i].wr_reg) begin
          if (dec.rs1_en && dec.rs1 == older[i].rd) stall_reg = 1'b1;
          if (dec.rs2_en && dec.rs2 == older[i].rd) stall_reg = 1'b1;
          if (dec.rsd_en && dec.rsd == older[i].rd) stall_reg = 1'b1;
        end
        if (older_valid[i] && older[i].mem_wr && dec.mem_rd &&
            dec.maddr == older[i].maddr)
          stall_mem = 1'b1;
      end
    end
    stall = stall_reg | stall_mem;
  end

endmodule
