// tb_current_sharing: the thermal-equalizing split. Checks equal sharing
// before any resistance estimate, weights against sqrt(R2)/(sqrt(R1)+sqrt(R2))
// computed in floating point, equal losses R1*I1^2 = R2*I2^2 (eq. (21)),
// references summing to i_tot, and the freeze used by phase-by-phase
// calibration.
// The 1/sqrt(R) rule follows the document; the resistance values tested
// are this test's choice.
module tb_current_sharing;
  import cpm_pkg::*;
  logic clk = 0, rst_n = 0, upd = 0, rv = 0, freeze = 0, busy;
  logic [0:0] cph;
  cur_t itot, iref [2];
  req_t req [2];
  logic [16:0] w [2];
  int checks = 0, failures = 0;

  current_sharing #(.N(2)) dut (.clk, .rst_n, .upd, .itot, .req, .req_valid(rv), .freeze,
                                .cal_phase(cph), .iref, .weight(w), .busy);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic tick;
    @(posedge clk); upd <= 1; @(posedge clk); upd <= 0; @(posedge clk);
  endtask

  task automatic test_r(input int r1, input int r2);
    real w1, l1, l2;
    req = '{req_t'(r1), req_t'(r2)};
    @(posedge clk); rv <= 1; @(posedge clk); rv <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    w1 = $sqrt(real'(r2)) / ($sqrt(real'(r1)) + $sqrt(real'(r2)));
    chk((real'(w[0]) / 65536.0 - w1) < 0.002 && (w1 - real'(w[0]) / 65536.0) < 0.002,
        $sformatf("weight %f exp %f", real'(w[0]) / 65536.0, w1));
    itot = cur_t'(40000);
    tick;
    l1 = real'(r1) * real'(iref[0]) * real'(iref[0]);
    l2 = real'(r2) * real'(iref[1]) * real'(iref[1]);
    chk((l1 - l2) / l2 < 0.01 && (l2 - l1) / l2 < 0.01, $sformatf("losses %e %e", l1, l2));
    chk(int'(iref[0]) + int'(iref[1]) <= 40000 && int'(iref[0]) + int'(iref[1]) >= 39998, "sum");
  endtask

  initial begin
    cph = '0; itot = '0; req = '{req_t'(0), req_t'(0)};
    repeat (3) @(posedge clk); rst_n = 1;
    itot = cur_t'(30000);
    tick;
    chk(iref[0] == cur_t'(15000) && iref[1] == cur_t'(15000), "equal sharing at start");
    test_r(2621, 3670);   // 10 and 14 mOhm
    test_r(8000, 2000);
    test_r(5000, 5000);
    test_r(3000, 9000);
    // freeze: phase 0 kept, phase 1 takes the change
    begin
      cur_t h0;
      h0 = iref[0];
      freeze = 1; cph = 1'b1; itot = cur_t'(44000);
      tick;
      chk(iref[0] == h0, "frozen phase kept");
      chk(iref[1] == cur_t'(44000 - int'(h0)), "active phase takes the step");
      freeze = 0;
      tick;
      chk(int'(iref[0]) + int'(iref[1]) >= 43998, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
