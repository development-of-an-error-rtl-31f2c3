// tb_fault_pipe: checks the pipelined fault signals against a model that
// shifts a per-stage fault bit one stage per advancing cycle.
//
// Directed part: a single mismatch in stage k must raise rollback exactly
// 6-k cycles later (the instruction's trip to write-back), a hold cycle must
// delay it by one, and an annulled instruction at write-back must gate the
// write (wb_fault) without a rollback. Random part: random cmp, hold and
// wb_annul, all outputs compared every cycle.
module tb_fault_pipe;
  localparam int N = 7;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, hold = 1'b0, wb_annul = 1'b0;
  logic [N-1:0] cmp = '0;
  logic [N-1:0] stage_fault;
  logic wb_fault, rollback;
  logic [N-1:0] m;   // model of the fault registers
  int rollbacks = 0;

  always #5 clk = ~clk;

  fault_pipe #(.NSTAGES(N)) dut (.clk, .rst_n, .hold, .cmp, .wb_annul,
                                 .stage_fault, .wb_fault, .rollback);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks += 1;
    if (got !== exp) begin
      failures += 1;
      $display("FAIL: %s got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // compare all outputs with the model in the current cycle
  task automatic compare();
    logic [N-1:0] sf;
    #1;
    sf = m | cmp;
    expect_eq(32'(stage_fault), 32'(sf), "stage_fault");
    expect_eq(32'(wb_fault), 32'(sf[N-1]), "wb_fault");
    expect_eq(32'(rollback), 32'(sf[N-1] && !wb_annul && !hold), "rollback");
  endtask

  task automatic step();
    logic [N-1:0] sf;
    compare();
    if (rollback) rollbacks += 1;
    sf = m | cmp;
    @(posedge clk);
    if (!rst_n) m = '0;
    else if (!hold) begin
      for (int i = N - 1; i >= 1; i--) m[i] = sf[i-1];
      m[0] = 1'b0;
    end
    @(negedge clk);
  endtask

  initial begin
    m = '0;
    @(negedge clk); step(); step();
    rst_n = 1'b1;
    // directed: single mismatch in each stage, latency to rollback
    for (int k = 1; k < N; k++) begin
      int lat;
      cmp = '0; cmp[k] = 1'b1;
      lat = 0;
      #1;
      while (!rollback) begin
        step();
        cmp = '0;
        #1;
        lat += 1;
        if (lat > 20) break;
      end
      expect_eq(32'(lat), 32'(N - 1 - k), $sformatf("rollback latency from stage %0d", k));
      step(); step();
    end
    // directed: hold delays by one cycle
    cmp = '0; cmp[2] = 1'b1; step(); cmp = '0;
    hold = 1'b1; step(); hold = 1'b0;
    repeat (2) step();
    expect_eq(32'(m[5]), 32'(1), "fault bit held over the stall");
    step();
    expect_eq(32'(rollback), 32'(1), "rollback after the stall");
    step();
    // directed: annulled instruction at write-back
    cmp = '0; cmp[N-1] = 1'b1; wb_annul = 1'b1; #1;
    expect_eq(32'(wb_fault), 32'(1), "wb_fault on annulled instruction");
    expect_eq(32'(rollback), 32'(0), "no rollback on annulled instruction");
    step(); cmp = '0; wb_annul = 1'b0; step();
    // random
    for (int n = 0; n < 3000; n++) begin
      cmp      = (($urandom % 8) == 0) ? N'($urandom) & ~N'(1) : '0;
      hold     = ($urandom % 5) == 0;
      wb_annul = ($urandom % 4) == 0;
      rst_n    = ($urandom % 200) != 0;
      step();
    end
    checks += 1;
    if (rollbacks == 0) begin failures += 1; $display("FAIL: no rollback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures += 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
