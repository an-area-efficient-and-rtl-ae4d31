`timescale 1ps/1fs
// tb_consec_decision: directed and random checks of the consecutive phase
// decision. Directed: NUM consecutive UPW (DNW) give one UP (DN) pulse in the
// cycle after the NUM-th sample; alternating UPW/DNW never give a decision;
// empty samples neither count nor clear; hold drops the sample and clears;
// LOCK switches from NUM0 to NUM1; NUM = 0 acts as 1. Random: compared with
// a counting model cycle by cycle.
module tb_consec_decision;
  logic       clk, rst_n, upw, dnw, lock, hold, up, dn;
  logic [3:0] num0, num1;
  int checks = 0, failures = 0;
  int m_acc;             // model accumulator
  logic m_up, m_dn;      // model outputs
  int n_up = 0, n_dn = 0;

  consec_decision #(.NUM_W(4)) dut (
    .clk(clk), .rst_n(rst_n), .upw(upw), .dnw(dnw), .lock(lock), .hold(hold),
    .num0(num0), .num1(num1), .up(up), .dn(dn));

  initial begin
    #(1.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0;
    forever #2500 clk = ~clk;
  end

  // one controller cycle with the given inputs; returns the outputs seen
  // after the edge
  task automatic cyc(input logic u, input logic d, input logic h, output logic ou, output logic od);
    @(negedge clk);
    upw = u; dnw = d; hold = h;
    @(posedge clk);
    #1;
    ou = up; od = dn;
  endtask

  task automatic expect_out(input logic ou, input logic od, input logic eu, input logic ed, input string what);
    checks++;
    if (ou !== eu || od !== ed) begin
      failures++;
      $display("FAIL %s: up=%b dn=%b expected %b %b", what, ou, od, eu, ed);
    end
  endtask

  initial begin
    logic ou, od;
    int num;
    rst_n = 0; upw = 0; dnw = 0; lock = 0; hold = 0; num0 = 4; num1 = 8;
    #12000;
    @(negedge clk) rst_n = 1;

    // four UPW with NUM0 = 4: decision after the fourth
    for (int i = 0; i < 3; i++) begin cyc(1, 0, 0, ou, od); expect_out(ou, od, 0, 0, "up count"); end
    cyc(1, 0, 0, ou, od); expect_out(ou, od, 1, 0, "UP after 4");
    cyc(0, 0, 0, ou, od); expect_out(ou, od, 0, 0, "UP is one cycle");
    // four DNW with gaps of empty samples
    for (int i = 0; i < 3; i++) begin
      cyc(0, 1, 0, ou, od); expect_out(ou, od, 0, 0, "dn count");
      cyc(0, 0, 0, ou, od); expect_out(ou, od, 0, 0, "empty sample");
    end
    cyc(0, 1, 0, ou, od); expect_out(ou, od, 0, 1, "DN after 4");
    // back and forth: never a decision
    for (int i = 0; i < 40; i++) begin
      cyc(i % 2 == 0, i % 2 == 1, 0, ou, od); expect_out(ou, od, 0, 0, "alternating");
    end
    // three UPW, hold, three UPW: no decision (hold cleared the count)
    for (int i = 0; i < 3; i++) begin cyc(1, 0, 0, ou, od); expect_out(ou, od, 0, 0, "pre-hold"); end
    cyc(1, 0, 1, ou, od); expect_out(ou, od, 0, 0, "hold");
    for (int i = 0; i < 3; i++) begin cyc(1, 0, 0, ou, od); expect_out(ou, od, 0, 0, "post-hold"); end
    cyc(1, 0, 0, ou, od); expect_out(ou, od, 1, 0, "UP after hold");
    // locked: NUM1 = 8
    lock = 1;
    for (int i = 0; i < 7; i++) begin cyc(0, 1, 0, ou, od); expect_out(ou, od, 0, 0, "locked count"); end
    cyc(0, 1, 0, ou, od); expect_out(ou, od, 0, 1, "DN after 8");
    // NUM = 0 behaves as 1
    num1 = 0;
    cyc(1, 0, 0, ou, od); expect_out(ou, od, 1, 0, "NUM 0");

    // random against the model
    m_acc = 0;
    for (int it = 0; it < 20000; it++) begin
      logic u, d, h;
      int step, nxt;
      if (it % 500 == 0) begin
        num0 = 4'($urandom_range(0, 8));
        num1 = 4'($urandom_range(0, 15));
        lock = 1'($urandom);
      end
      u = ($urandom_range(0, 9) < 6);
      d = ($urandom_range(0, 9) < 4);
      h = ($urandom_range(0, 19) == 0);
      num = lock ? int'(num1) : int'(num0);
      if (num == 0) num = 1;
      step = (u && !d) ? 1 : ((d && !u) ? -1 : 0);
      nxt = m_acc + step;
      m_up = 0; m_dn = 0;
      if (h) m_acc = 0;
      else if (nxt >= num)  begin m_up = 1; m_acc = 0; n_up++; end
      else if (nxt <= -num) begin m_dn = 1; m_acc = 0; n_dn++; end
      else m_acc = nxt;
      cyc(u, d, h, ou, od);
      expect_out(ou, od, m_up, m_dn, "random");
    end
    checks++;
    if (n_up < 100 || n_dn < 10) begin failures++; $display("FAIL few random decisions %0d %0d", n_up, n_dn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
