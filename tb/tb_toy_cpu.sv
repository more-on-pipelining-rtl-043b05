// tb_toy_cpu: end-to-end test of the five-step toy pipeline at its default
// sizes.
//
// Runs four programs and checks, cycle by cycle, which line each pipeline
// step holds, the total cycle count and the words the program leaves in
// data memory:
//   1. the 12-line example program with address1 = 0, address2 = 10: the
//      31-cycle schedule of the lecture example;
//   2. its reordered version: the 24-cycle schedule;
//   3. the example program with address1 = 3, so that the if is taken:
//      26 cycles, worked out by hand from the same rules;
//   4. a store followed by a load of the same address, which makes the load
//      wait for the memory word: 17 cycles, worked out by hand.
// Every mechanism (register wait, memory wait, flush on goto/if, taken and
// not-taken if, goto) is counted and must occur at least once.
module tb_toy_cpu;
  import toy_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n;
  line_t  prog_len;
  logic   imem_we;
  line_t  imem_waddr;
  instr_t imem_wdata;
  logic   dmem_host_we;
  addr_t  dmem_host_addr;
  word_t  dmem_host_wdata, dmem_host_rdata;
  logic   done;
  trace_t trace;

  int checks = 0, failures = 0;
  int cycle_total = 0;
  int n_stall_reg = 0, n_stall_mem = 0, n_flush = 0, n_redirect = 0;
  int n_goto = 0, n_if_taken = 0, n_if_not_taken = 0;
  instr_t prog [$];

  toy_cpu dut (
    .clk             (clk),
    .rst_n           (rst_n),
    .prog_len        (prog_len),
    .imem_we         (imem_we),
    .imem_waddr      (imem_waddr),
    .imem_wdata      (imem_wdata),
    .dmem_host_we    (dmem_host_we),
    .dmem_host_addr  (dmem_host_addr),
    .dmem_host_wdata (dmem_host_wdata),
    .dmem_host_rdata (dmem_host_rdata),
    .done            (done),
    .trace           (trace)
  );

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count what each instruction does at output save.
  always @(posedge clk) begin
    if (rst_n) begin
      cycle_total++;
      if (trace.stall_reg) n_stall_reg++;
      if (trace.stall_mem) n_stall_mem++;
      if (trace.flush)     n_flush++;
      if (trace.redirect)  n_redirect++;
      if (trace.os != 0 && int'(trace.os) <= prog.size()) begin
        if (prog[trace.os - 1].op == OP_GOTO) n_goto++;
        if (prog[trace.os - 1].op == OP_IF &&  trace.redirect) n_if_taken++;
        if (prog[trace.os - 1].op == OP_IF && !trace.redirect) n_if_not_taken++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected schedule: per cycle {f, d, of, ex, os}
  typedef int row_t [5];
  row_t sched [$];

  task automatic load_and_run(input int inputs_addr [], input int inputs_val [],
                              input int exp_cycles, input bit check_sched);
    int t;
    rst_n = 1'b0;
    imem_we = 1'b0;
    dmem_host_we = 1'b0;
    prog_len = line_t'(prog.size());
    @(negedge clk);
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = line_t'(i + 1); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    // clear the data words used, then set the inputs
    for (int a = 0; a < 32; a++) begin
      dmem_host_we = 1'b1; dmem_host_addr = addr_t'(a); dmem_host_wdata = '0;
      @(negedge clk);
    end
    foreach (inputs_addr[i]) begin
      dmem_host_we = 1'b1; dmem_host_addr = addr_t'(inputs_addr[i]);
      dmem_host_wdata = word_t'(inputs_val[i]);
      @(negedge clk);
    end
    dmem_host_we = 1'b0;
    rst_n = 1'b1;
    // cycle t = 1 is the first cycle after reset
    t = 1;
    while (!done && t < 200) begin
      if (check_sched && t <= sched.size()) begin
        row_t e;
        e = sched[t-1];
        check(int'(trace.f) == e[0] && int'(trace.d) == e[1] && int'(trace.of) == e[2] &&
              int'(trace.ex) == e[3] && int'(trace.os) == e[4],
              $sformatf("cycle %0d: got F%0d D%0d OF%0d EX%0d OS%0d, expected F%0d D%0d OF%0d EX%0d OS%0d",
                        t, trace.f, trace.d, trace.of, trace.ex, trace.os,
                        e[0], e[1], e[2], e[3], e[4]));
      end
      @(negedge clk);
      t++;
    end
    // `done` first shows in the cycle after the last output save
    check(t - 1 == exp_cycles,
          $sformatf("program took %0d cycles, expected %0d", t - 1, exp_cycles));
  endtask

  task automatic expect_word(input int addr, input int value);
    dmem_host_addr = addr_t'(addr);
    #1;
    check(dmem_host_rdata == word_t'(value),
          $sformatf("address%0d = %0d, expected %0d", addr, dmem_host_rdata, value));
  endtask

  task automatic example_program();
    prog = '{};
    prog.push_back(mk_load(2, 2));        //  1 load R2 address2
    prog.push_back(mk_load(1, 1));        //  2 load R1 address1
    prog.push_back(mk_if(1, 6));          //  3 if R1 6
    prog.push_back(mk_addi(3, 1, 20));    //  4 addi R3 R1 20
    prog.push_back(mk_goto(7));           //  5 goto 7
    prog.push_back(mk_addi(3, 1, 10));    //  6 addi R3 R1 10
    prog.push_back(mk_addi(4, 2, 5));     //  7 addi R4 R2 5
    prog.push_back(mk_store(4, 10));      //  8 store R4 address10
    prog.push_back(mk_addi(5, 2, 30));    //  9 addi R5 R2 30
    prog.push_back(mk_store(5, 11));      // 10 store R5 address11
    prog.push_back(mk_add(8, 2, 3));      // 11 add R8 R2 R3
    prog.push_back(mk_store(8, 12));      // 12 store R8 address12
  endtask

  task automatic add_rows(input int rows [][5]);
    sched = '{};
    foreach (rows[i]) begin
      row_t r;
      for (int j = 0; j < 5; j++) r[j] = rows[i][j];
      sched.push_back(r);
    end
  endtask

  initial begin
    int rows_orig [][5];
    int rows_reord [][5];
    rst_n = 1'b0;

    // ---------------------------------------------------------- program 1
    rows_orig = '{
      '{ 1, 0, 0, 0, 0}, '{ 2, 1, 0, 0, 0}, '{ 3, 2, 1, 0, 0}, '{ 4, 3, 2, 1, 0},
      '{ 4, 3, 0, 2, 1}, '{ 4, 3, 0, 0, 2}, '{ 0, 0, 3, 0, 0}, '{ 0, 0, 0, 3, 0},
      '{ 0, 0, 0, 0, 3}, '{ 4, 0, 0, 0, 0}, '{ 5, 4, 0, 0, 0}, '{ 6, 5, 4, 0, 0},
      '{ 0, 0, 5, 4, 0}, '{ 0, 0, 0, 5, 4}, '{ 0, 0, 0, 0, 5}, '{ 7, 0, 0, 0, 0},
      '{ 8, 7, 0, 0, 0}, '{ 9, 8, 7, 0, 0}, '{ 9, 8, 0, 7, 0}, '{ 9, 8, 0, 0, 7},
      '{10, 9, 8, 0, 0}, '{11,10, 9, 8, 0}, '{11,10, 0, 9, 8}, '{11,10, 0, 0, 9},
      '{12,11,10, 0, 0}, '{ 0,12,11,10, 0}, '{ 0,12, 0,11,10}, '{ 0,12, 0, 0,11},
      '{ 0, 0,12, 0, 0}, '{ 0, 0, 0,12, 0}, '{ 0, 0, 0, 0,12}};
    example_program();
    add_rows(rows_orig);
    load_and_run('{1, 2}, '{0, 10}, 31, 1'b1);
    expect_word(10, 15);
    expect_word(11, 40);
    expect_word(12, 30);

    // ---------------------------------------------------------- program 2
    rows_reord = '{
      '{ 1, 0, 0, 0, 0}, '{ 2, 1, 0, 0, 0}, '{ 3, 2, 1, 0, 0}, '{ 4, 3, 2, 1, 0},
      '{ 4, 3, 0, 2, 1}, '{ 0, 0, 3, 0, 2}, '{ 0, 0, 0, 3, 0}, '{ 0, 0, 0, 0, 3},
      '{ 4, 0, 0, 0, 0}, '{ 5, 4, 0, 0, 0}, '{ 6, 5, 4, 0, 0}, '{ 0, 0, 5, 4, 0},
      '{ 0, 0, 0, 5, 4}, '{ 0, 0, 0, 0, 5}, '{ 7, 0, 0, 0, 0}, '{ 8, 7, 0, 0, 0},
      '{ 9, 8, 7, 0, 0}, '{10, 9, 8, 7, 0}, '{11,10, 9, 8, 7}, '{12,11,10, 9, 8},
      '{ 0,12,11,10, 9}, '{ 0, 0,12,11,10}, '{ 0, 0, 0,12,11}, '{ 0, 0, 0, 0,12}};
    prog = '{};
    prog.push_back(mk_load(1, 1));        //  1 load R1 address1
    prog.push_back(mk_load(2, 2));        //  2 load R2 address2
    prog.push_back(mk_if(1, 6));          //  3 if R1 6
    prog.push_back(mk_addi(3, 1, 20));    //  4 addi R3 R1 20
    prog.push_back(mk_goto(7));           //  5 goto 7
    prog.push_back(mk_addi(3, 1, 10));    //  6 addi R3 R1 10
    prog.push_back(mk_addi(4, 2, 5));     //  7 addi R4 R2 5
    prog.push_back(mk_addi(5, 2, 30));    //  8 addi R5 R2 30
    prog.push_back(mk_add(8, 2, 3));      //  9 add R8 R2 R3
    prog.push_back(mk_store(4, 10));      // 10 store R4 address10
    prog.push_back(mk_store(5, 11));      // 11 store R5 address11
    prog.push_back(mk_store(8, 12));      // 12 store R8 address12
    add_rows(rows_reord);
    load_and_run('{1, 2}, '{0, 10}, 24, 1'b1);
    expect_word(10, 15);
    expect_word(11, 40);
    expect_word(12, 30);

    // ---------------------------------------------------------- program 3
    example_program();
    load_and_run('{1, 2}, '{3, 10}, 26, 1'b0);
    expect_word(10, 15);
    expect_word(11, 40);
    expect_word(12, 23);   // R2 + (R1 + 10)

    // ---------------------------------------------------------- program 4
    prog = '{};
    prog.push_back(mk_addi(1, 0, 7));     //  1 addi R1 R0 7
    prog.push_back(mk_store(1, 20));      //  2 store R1 address20
    prog.push_back(mk_load(2, 20));       //  3 load R2 address20
    prog.push_back(mk_addi(3, 2, 1));     //  4 addi R3 R2 1
    prog.push_back(mk_store(3, 21));      //  5 store R3 address21
    load_and_run('{}, '{}, 17, 1'b0);
    expect_word(20, 7);
    expect_word(21, 8);

    // ------------------------------------------------------- mechanisms
    $display("register waits %0d, memory waits %0d, flushes %0d, PC redirects %0d",
             n_stall_reg, n_stall_mem, n_flush, n_redirect);
    $display("goto %0d, if taken %0d, if not taken %0d",
             n_goto, n_if_taken, n_if_not_taken);
    check(n_stall_reg > 0,    "no register wait happened");
    check(n_stall_mem > 0,    "no memory-address wait happened");
    check(n_flush > 0,        "no flush happened");
    check(n_goto > 0,         "no goto completed");
    check(n_if_taken > 0,     "no taken if happened");
    check(n_if_not_taken > 0, "no not-taken if happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
