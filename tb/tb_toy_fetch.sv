// tb_toy_fetch: self-checking test of the program counter and fetch step.
// First a directed sequence taken from the example schedule (fetch lines
// 1..4, hold on a wait, erase line 4 when an if leaves decode, fetch nothing
// while the if is in flight, fetch line 4 again after a not-taken if, jump to
// line 7 after a goto, stop after the last line). Then random control
// inputs, with the expected PC and decode-step contents stepped alongside
// from the rules of the fetch step.
module tb_toy_fetch;
  import toy_pkg::*;

  logic   clk = 1'b0, rst_n;
  line_t  prog_len, imem_addr, redirect_line, pc, d_line;
  instr_t imem_rdata, d_instr;
  logic   stall, flush, stop, redirect, fetch_valid, d_valid;
  instr_t mem [256];
  int checks = 0, failures = 0;

  toy_fetch dut (
    .clk(clk), .rst_n(rst_n), .prog_len(prog_len), .imem_addr(imem_addr),
    .imem_rdata(imem_rdata), .stall(stall), .flush(flush), .stop(stop),
    .redirect(redirect), .redirect_line(redirect_line), .pc(pc),
    .fetch_valid(fetch_valid), .d_valid(d_valid), .d_line(d_line), .d_instr(d_instr));

  assign imem_rdata = mem[imem_addr];

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (pc=%0d fv=%0b d=%0b/%0d)", $time, what, pc, fetch_valid, d_valid, d_line);
    end
  endtask

  // One cycle with the given controls; checks the fetch step seen in it.
  task automatic step(input bit s, input bit f, input bit st, input bit r, input int rl,
                      input int exp_fetch, input int exp_d);
    stall = s; flush = f; stop = st; redirect = r; redirect_line = line_t'(rl);
    #1;
    chk((fetch_valid ? int'(pc) : 0) == exp_fetch, $sformatf("fetch step expected %0d", exp_fetch));
    chk((d_valid ? int'(d_line) : 0) == exp_d, $sformatf("decode step expected %0d", exp_d));
    if (d_valid) chk(d_instr == mem[d_line], "decode-step instruction word");
    @(negedge clk);
  endtask

  initial begin
    line_t m_pc, m_dl;
    logic  m_dv;
    for (int i = 0; i < 256; i++) mem[i] = instr_t'($urandom);
    stall = 0; flush = 0; stop = 0; redirect = 0; redirect_line = 0;
    prog_len = 12;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    //    stall flush stop redir line  F  D
    step(0, 0, 0, 0, 0,  1, 0);   // t1
    step(0, 0, 0, 0, 0,  2, 1);   // t2
    step(0, 0, 0, 0, 0,  3, 2);   // t3
    step(1, 0, 0, 0, 0,  4, 3);   // t4: line 3 waits
    step(1, 0, 0, 0, 0,  4, 3);   // t5
    step(0, 1, 0, 0, 0,  4, 3);   // t6: if leaves decode, line 4 erased
    step(0, 0, 1, 0, 0,  0, 0);   // t7: if at operand fetch
    step(0, 0, 1, 0, 0,  0, 0);   // t8
    step(0, 0, 1, 0, 0,  0, 0);   // t9: if at output save, not taken
    step(0, 0, 0, 0, 0,  4, 0);   // t10: line 4 fetched again
    step(0, 0, 0, 0, 0,  5, 4);   // t11
    step(0, 1, 0, 0, 0,  6, 5);   // t12: goto leaves decode
    step(0, 0, 1, 0, 0,  0, 0);   // t13
    step(0, 0, 1, 0, 0,  0, 0);   // t14
    step(0, 0, 1, 1, 7,  0, 0);   // t15: goto at output save, PC <- 7
    step(0, 0, 0, 0, 0,  7, 0);   // t16
    step(0, 0, 0, 0, 0,  8, 7);   // t17
    step(0, 0, 0, 0, 0,  9, 8);
    step(0, 0, 0, 0, 0, 10, 9);
    step(0, 0, 0, 0, 0, 11, 10);
    step(0, 0, 0, 0, 0, 12, 11);
    step(0, 0, 0, 0, 0,  0, 12);  // past the last line
    step(0, 0, 0, 0, 0,  0, 0);

    // random controls against a step-by-step model
    rst_n = 0;
    prog_len = 40;
    @(negedge clk);
    rst_n = 1;
    m_pc = 1; m_dv = 0; m_dl = 0;
    for (int k = 0; k < 3000; k++) begin
      logic s, f, st, r, fv;
      line_t rl;
      s  = $urandom_range(0, 3) == 0;
      f  = !s && $urandom_range(0, 7) == 0;
      st = $urandom_range(0, 4) == 0;
      r  = st && $urandom_range(0, 2) == 0;
      rl = line_t'($urandom_range(1, 45));
      stall = s; flush = f; stop = st; redirect = r; redirect_line = rl;
      #1;
      fv = (m_pc != 0) && (m_pc <= prog_len) && !st;
      chk(pc == m_pc, "pc");
      chk(fetch_valid == fv, "fetch_valid");
      chk(d_valid == m_dv && (!m_dv || d_line == m_dl), "decode-step register");
      if (d_valid) chk(d_instr == mem[d_line], "decode-step instruction word");
      // next state
      if (f)       begin m_dv = 0; m_dl = 0; end
      else if (!s) begin m_dv = fv; m_dl = fv ? m_pc : 0; end
      if (r)                    m_pc = rl;
      else if (fv && !s && !f)  m_pc = m_pc + 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
