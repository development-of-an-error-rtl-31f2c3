// tb_alt_checker: the output-only checker must report a difference in any
// bit combinationally, latch it as alt_fault at the next edge, keep it while
// the outputs agree again, and clear it only on reset.
module tb_alt_checker;
  localparam int W = 140;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] oa, ob;
  logic mismatch, alt_fault;
  bit m_flag = 0;

  always #5 clk = ~clk;

  alt_checker #(.W(W)) dut (.clk, .rst_n, .out_a(oa), .out_b(ob), .mismatch, .alt_fault);

  initial begin
    oa = '0; ob = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      oa = {$urandom, $urandom, $urandom, $urandom, $urandom};
      ob = oa;
      if (($urandom % 20) == 0) ob[$urandom % W] ^= 1'b1;
      rst_n = ($urandom % 40) != 0;
      #1;
      checks += 2;
      if (mismatch !== (oa != ob)) begin failures += 1; $display("FAIL: mismatch"); end
      if (alt_fault !== m_flag) begin failures += 1; $display("FAIL: alt_fault %0b expected %0b", alt_fault, m_flag); end
      @(posedge clk);
      if (!rst_n) m_flag = 0;
      else if (oa != ob) m_flag = 1;
      @(negedge clk);
    end
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
