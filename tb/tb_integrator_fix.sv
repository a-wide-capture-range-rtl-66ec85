// tb_integrator_fix: checks the phase-fixing filter.
// Directed scenario first (stored code 120): Up rounds with a large level
// step the code +1 per round; a level below 30 restores the stored code;
// Down rounds step -1; a code 50 away from the store is restored; level 0
// gives phase lock with the stored code; then 9 Up requests are only
// counted and the 10th resumes fixing with one step. Then a random run is
// compared with a reference model of the same rules.
module tb_integrator_fix;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, lag = 0, load = 0;
  logic [LV_W-1:0] lv = '0;
  logic [CODE_W-1:0] load_code = '0, dco_code;
  logic phase_locked;
  int checks = 0, failures = 0;

  integrator_fix dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic round(int l, bit dn);
    @(negedge clk);
    en = 1; lv = LV_W'(l); lag = dn;
    @(negedge clk);
    en = 0;
  endtask

  // reference model state
  int m_store, m_code, m_idx, m_acc;
  bit m_lock;
  int series[6] = '{30, 15, 7, 3, 1, 0};
  function automatic void model(int l, bit dn);
    int nc;
    nc = dn ? m_code - 1 : m_code + 1;
    if (l == 0) begin
      m_code = m_store; m_lock = 1; m_acc = 0;
    end else if (m_lock) begin
      m_acc += dn ? -1 : 1;
      if (m_acc >= 10 || m_acc <= -10) begin
        m_lock = 0; m_acc = 0; m_idx = 0;
        m_code = nc < 0 ? 0 : nc > 255 ? 255 : nc;
      end
    end else if (m_idx < 6 && l < series[m_idx]) begin
      m_code = m_store; m_idx++;
    end else if (nc - m_store > 50 || m_store - nc > 50) begin
      m_code = m_store;
    end else begin
      m_code = nc < 0 ? 0 : nc > 255 ? 255 : nc;
    end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    load = 1; load_code = 120;
    @(negedge clk);
    load = 0;
    check(dco_code == 120, "load");
    round(89, 0); check(dco_code == 121, "up step 1");
    round(80, 0); check(dco_code == 122, "up step 2");
    round(25, 0); check(dco_code == 120, "recover below 30");
    round(25, 1); check(dco_code == 119, "down step after recovery");
    round(10, 1); check(dco_code == 120, "recover below 15");
    for (int k = 0; k < 50; k++) round(100, 1);
    check(dco_code == 70, "50 steps down");
    round(100, 1); check(dco_code == 120, "recover at 51 away");
    round(0, 0);
    check(dco_code == 120 && phase_locked, "phase lock");
    for (int k = 0; k < 9; k++) round(5, 0);
    check(dco_code == 120 && phase_locked, "9 requests held");
    round(5, 0);
    check(dco_code == 121 && !phase_locked, "10th request resumes");
    // random run against the model
    @(negedge clk);
    load = 1; load_code = 60;
    @(negedge clk);
    load = 0;
    m_store = 60; m_code = 60; m_idx = 0; m_acc = 0; m_lock = 0;
    for (int k = 0; k < 2000; k++) begin
      int l;
      bit dn;
      l  = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(0, 127);
      dn = 1'($urandom_range(0, 1));
      round(l, dn);
      model(l, dn);
      check(int'(dco_code) == m_code && phase_locked == m_lock,
            $sformatf("random round %0d: code %0d want %0d", k, dco_code, m_code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
