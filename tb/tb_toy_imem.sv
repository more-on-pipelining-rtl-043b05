// tb_toy_imem: self-checking test of the instruction memory.
// Loads a program of random words through the load port, then reads every
// line back through the fetch port and compares with what was written.
module tb_toy_imem;
  import toy_pkg::*;

  localparam int unsigned L = 64;
  logic clk = 1'b0;
  line_t raddr, waddr;
  instr_t rdata, wdata;
  logic we;
  instr_t model [L];
  int checks = 0, failures = 0;

  toy_imem #(.LINES(L)) dut (.clk(clk), .raddr(raddr), .rdata(rdata),
                              .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int i = 0; i < int'(L); i++) begin
      @(negedge clk);
      model[i] = instr_t'($urandom);
      we = 1; waddr = line_t'(i); wdata = model[i];
    end
    @(negedge clk);
    we = 0;
    for (int i = int'(L) - 1; i >= 0; i--) begin
      raddr = line_t'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL: line %0d read %0h expected %0h", i, rdata, model[i]);
      end
    end
    // lines beyond the memory read as 0 (no operation)
    raddr = line_t'(L + 3);
    #1;
    checks++;
    if (rdata !== '0) begin
      failures++;
      $display("FAIL: line beyond memory read %0h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
