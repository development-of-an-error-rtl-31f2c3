// tb_regfile: checks the register file against a plain array model:
// synchronous reads that hold while re is low, write-first on a same-cycle
// read of the written register, and register 0 reading zero.
module tb_regfile;
  import ft_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic re, we;
  logic [RAW-1:0] ra1, ra2, wa;
  logic [XLEN-1:0] rd1, rd2, wd;
  logic [XLEN-1:0] model [NREG];
  logic [XLEN-1:0] exp1, exp2;
  bit reads_held = 0, write_first = 0;

  always #5 clk = ~clk;

  regfile dut (.clk, .re, .raddr1(ra1), .raddr2(ra2), .rdata1(rd1), .rdata2(rd2),
               .we, .waddr(wa), .wdata(wd));

  function automatic logic [XLEN-1:0] mread(logic [RAW-1:0] a);
    if (a == 0) return '0;
    if (we && wa == a) return wd;
    return model[a];
  endfunction

  initial begin
    re = 1'b0; we = 1'b0; ra1 = '0; ra2 = '0; wa = '0; wd = '0;
    exp1 = '0; exp2 = '0;
    // fill every register first
    for (int i = 0; i < NREG; i++) begin
      @(negedge clk);
      we = 1'b1; wa = RAW'(i); wd = $urandom;
      @(posedge clk);
      model[i] = (i == 0) ? '0 : wd;
    end
    @(negedge clk);
    we = 1'b0;
    re = 1'b1; ra1 = '0; ra2 = '0;
    @(posedge clk); #1;
    exp1 = '0; exp2 = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks += 2;
      if (rd1 !== exp1) begin failures += 1; $display("FAIL: rdata1 %h expected %h", rd1, exp1); end
      if (rd2 !== exp2) begin failures += 1; $display("FAIL: rdata2 %h expected %h", rd2, exp2); end
      re  = ($urandom % 4) != 0;
      we  = ($urandom % 2) != 0;
      wa  = RAW'($urandom);
      wd  = $urandom;
      ra1 = RAW'($urandom);
      ra2 = ($urandom % 3 == 0) ? wa : RAW'($urandom);
      if (re) begin
        exp1 = mread(ra1);
        exp2 = mread(ra2);
        if (we && ra2 == wa && wa != 0) write_first = 1;
      end else begin
        reads_held = 1;
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    checks += 2;
    if (!reads_held)  begin failures += 1; $display("FAIL: no held read"); end
    if (!write_first) begin failures += 1; $display("FAIL: no write-first read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures += 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
