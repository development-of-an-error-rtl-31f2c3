// tb_dwc_compare: checks the comparison tree against an independent
// bit-by-bit loop, for equal words, every single-bit difference and random
// words, at two widths.
module tb_dwc_compare;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic        f8;
  logic [99:0] a100, b100;
  logic        f100;

  dwc_compare #(.W(8))   u8   (.a(a8),   .b(b8),   .fault(f8));
  dwc_compare #(.W(100)) u100 (.a(a100), .b(b100), .fault(f100));

  function automatic bit differs(logic [99:0] x, logic [99:0] y, int w);
    for (int i = 0; i < w; i++) if (x[i] != y[i]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(bit got, bit exp, string what);
    checks += 1;
    if (got !== exp) begin
      failures += 1;
      $display("FAIL: %s got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a8 = 8'(i); b8 = 8'(i); #1;
      check(f8, 1'b0, "equal 8-bit");
      for (int k = 0; k < 8; k++) begin
        b8 = 8'(i) ^ (8'd1 << k); #1;
        check(f8, 1'b1, $sformatf("8-bit flip of bit %0d", k));
      end
    end
    for (int k = 0; k < 100; k++) begin
      a100 = {$urandom, $urandom, $urandom, $urandom};
      b100 = a100; #1;
      check(f100, 1'b0, "equal 100-bit");
      b100[k] = ~b100[k]; #1;
      check(f100, 1'b1, $sformatf("100-bit flip of bit %0d", k));
    end
    for (int n = 0; n < 500; n++) begin
      a100 = {$urandom, $urandom, $urandom, $urandom};
      b100 = ($urandom % 2) ? a100 : {$urandom, $urandom, $urandom, $urandom};
      if ($urandom % 3 == 0) b100 = a100 ^ (100'd1 << ($urandom % 100)) ^ (100'd1 << ($urandom % 100));
      #1;
      check(f100, differs(a100, b100, 100), "random 100-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures += 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
