// tb_toy_dmem: self-checking test of the data memory.
// Random mixes of pipeline writes, host writes and reads on both ports are
// compared with a reference array; a same-word write from both ports in one
// cycle must leave the pipeline's data.
module tb_toy_dmem;
  import toy_pkg::*;

  localparam int unsigned W = 32;
  logic clk = 1'b0;
  addr_t cpu_raddr, cpu_waddr, host_addr;
  word_t cpu_rdata, cpu_wdata, host_wdata, host_rdata;
  logic cpu_we, host_we;
  word_t model [W];
  int checks = 0, failures = 0;

  toy_dmem #(.WORDS(W)) dut (
    .clk(clk), .cpu_raddr(cpu_raddr), .cpu_rdata(cpu_rdata), .cpu_we(cpu_we),
    .cpu_waddr(cpu_waddr), .cpu_wdata(cpu_wdata), .host_we(host_we),
    .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    cpu_we = 0; host_we = 0; cpu_raddr = 0; cpu_waddr = 0; host_addr = 0;
    cpu_wdata = 0; host_wdata = 0;
    for (int i = 0; i < int'(W); i++) begin
      @(negedge clk);
      host_we = 1; host_addr = addr_t'(i); host_wdata = word_t'(i * 3 + 1);
      model[i] = word_t'(i * 3 + 1);
    end
    @(negedge clk);
    host_we = 0;
    for (int k = 0; k < 400; k++) begin
      cpu_we     = $urandom_range(0, 1);
      host_we    = $urandom_range(0, 3) == 0;
      cpu_waddr  = addr_t'($urandom_range(0, W - 1));
      host_addr  = (k % 17 == 0) ? cpu_waddr : addr_t'($urandom_range(0, W - 1));
      cpu_raddr  = addr_t'($urandom_range(0, W - 1));
      cpu_wdata  = $urandom;
      host_wdata = $urandom;
      #1;
      chk(cpu_rdata, model[cpu_raddr], "bus read");
      chk(host_rdata, model[host_addr], "host read");
      @(posedge clk);
      if (host_we) model[host_addr] = host_wdata;
      if (cpu_we)  model[cpu_waddr] = cpu_wdata;
      @(negedge clk);
    end
    cpu_we = 0; host_we = 0;
    for (int i = 0; i < int'(W); i++) begin
      host_addr = addr_t'(i); #1;
      chk(host_rdata, model[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
