// tb_toy_regfile: self-checking test of the register file.
// Checks reset to 0, writes through the single write port, reads on all
// three read ports against a reference array, and that a write is visible
// only after its clock edge.
module tb_toy_regfile;
  import toy_pkg::*;

  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n;
  reg_idx_t ra1, ra2, ra3, wa;
  word_t rd1, rd2, rd3, wd;
  logic we;
  word_t model [N];
  int checks = 0, failures = 0;

  toy_regfile #(.NREGS(N)) dut (
    .clk(clk), .rst_n(rst_n), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
    .ra3(ra3), .rd3(rd3), .we(we), .wa(wa), .wd(wd));

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
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(N); i++) model[i] = '0;
    for (int i = 0; i < int'(N); i++) begin
      ra1 = reg_idx_t'(i); #1;
      chk(rd1, 0, $sformatf("R%0d after reset", i));
    end
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wa = reg_idx_t'($urandom);
      wd = $urandom;
      ra1 = reg_idx_t'($urandom); ra2 = reg_idx_t'($urandom); ra3 = reg_idx_t'($urandom);
      #1;
      // before the edge: old contents
      chk(rd1, model[ra1], "rd1");
      chk(rd2, model[ra2], "rd2");
      chk(rd3, model[ra3], "rd3");
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      if (we) begin
        ra1 = wa; #1;
        chk(rd1, wd, "read after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
