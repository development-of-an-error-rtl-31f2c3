// tb_cfg_fault_detector: checks the persistence test of the configuration-
// fault detector.
//
// The model counts instruction cycles up from the detection (the detection
// cycle included, if it advanced) and checks the recorded stages when seven
// have passed, which is the point where a rolled-back instruction is back in
// the same stage. Directed cases: a transient mismatch gives recovered eight
// cycles after detection; a mismatch that is there again seven cycles later
// gives perm_fault; stalls stretch the window; a mismatch in another stage at
// check time does not count. Then random traffic, compared every cycle.
module tb_cfg_fault_detector;
  localparam int N = 7;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b1;
  logic [N-1:0] cmp = '0;
  logic armed, recovered, perm_event, perm_fault;

  // model
  bit m_armed = 0, m_rec = 0, m_pev = 0, m_perm = 0;
  int m_seen = 0;
  logic [N-1:0] m_mask = '0;
  int n_rec = 0, n_perm = 0;

  always #5 clk = ~clk;

  cfg_fault_detector #(.NSTAGES(N), .CNT_INIT(7)) dut (
    .clk, .rst_n, .adv, .cmp, .armed, .recovered, .perm_event, .perm_fault);

  task automatic expect_eq(int got, int exp, string what);
    checks += 1;
    if (got != exp) begin
      failures += 1;
      $display("FAIL: %s got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step();
    #1;
    expect_eq(int'(armed), int'(m_armed), "armed");
    expect_eq(int'(recovered), int'(m_rec), "recovered");
    expect_eq(int'(perm_event), int'(m_pev), "perm_event");
    expect_eq(int'(perm_fault), int'(m_perm), "perm_fault");
    @(posedge clk);
    m_rec = 0; m_pev = 0;
    if (!rst_n) begin
      m_armed = 0; m_perm = 0; m_seen = 0;
    end else if (!m_armed) begin
      if (cmp != 0) begin m_armed = 1; m_mask = cmp; m_seen = int'(adv); end
    end else if (m_seen == 7) begin
      m_armed = 0;
      if ((m_mask & cmp) != 0) begin m_perm = 1; m_pev = 1; n_perm += 1; end
      else begin m_rec = 1; n_rec += 1; end
    end else begin
      m_seen += int'(adv);
    end
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk); step(); step();
    rst_n = 1'b1; step();
    // transient fault in the execute stage
    cmp = 7'b0001000; step(); cmp = '0;
    repeat (6) step();
    step();                       // check cycle, nothing seen
    expect_eq(int'(recovered), 1, "recovered 8 cycles after detection");
    step();
    // persistent fault: seen again 7 cycles later in the same stage
    cmp = 7'b0000100; step(); cmp = '0;
    repeat (6) step();
    cmp = 7'b0000100; step(); cmp = '0;
    expect_eq(int'(perm_fault), 1, "perm_fault after the repeated mismatch");
    step();
    rst_n = 1'b0; step(); rst_n = 1'b1; step();
    // stall in the window: check moves out by the stalled cycles
    cmp = 7'b0100000; step(); cmp = '0;
    adv = 1'b0; repeat (3) step(); adv = 1'b1;
    repeat (6) step();
    cmp = 7'b0100000; step(); cmp = '0;
    expect_eq(int'(perm_fault), 1, "perm_fault with stalls in the window");
    rst_n = 1'b0; step(); rst_n = 1'b1; step();
    // other stage at check time: not persistent
    cmp = 7'b0000010; step(); cmp = '0;
    repeat (6) step();
    cmp = 7'b1000000; step(); cmp = '0;
    expect_eq(int'(perm_fault), 0, "different stage is not persistent");
    expect_eq(int'(recovered), 1, "different stage counts as recovered");
    repeat (10) step();
    // random
    for (int n = 0; n < 4000; n++) begin
      cmp   = (($urandom % 6) == 0) ? N'(1) << ($urandom % N) : '0;
      adv   = ($urandom % 5) != 0;
      rst_n = ($urandom % 150) != 0;
      step();
    end
    checks += 2;
    if (n_rec == 0)  begin failures += 1; $display("FAIL: no recovery seen"); end
    if (n_perm == 0) begin failures += 1; $display("FAIL: no persistent fault seen"); end
    $display("recovered %0d, persistent %0d", n_rec, n_perm);
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
