// tb_thermal_monitor: temperatures from estimated resistances compared with
// the inverse of the default linear resistance model,
// T = 25 + (Req/REQ_25 - 1)/alpha; over-temperature at Req > 34 mOhm,
// overcurrent at I_MAX, the latched shutdown and its clear.
// Resistance-based temperature sensing follows the document; the table
// values (26.3 mOhm at 25 C, 3900 ppm/K) and limits are this design's own.
module tb_thermal_monitor;
  import cpm_pkg::*;
  logic clk = 0, rst_n = 0, upd = 0, rv = 0, clr = 0, ot, oc, sd;
  req_t req [2];
  cur_t iest [2];
  logic [7:0] temp [2];
  int checks = 0, failures = 0;

  thermal_monitor #(.N(2)) dut (.clk, .rst_n, .upd, .req_valid(rv), .clear(clr), .req, .iest,
                                .temp, .ot_flag(ot), .oc_flag(oc), .shutdown(sd));
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

  task automatic temps(input int r1, input int r2);
    real t1, t2;
    req = '{req_t'(r1), req_t'(r2)};
    @(posedge clk); rv <= 1; @(posedge clk); rv <= 0;
    repeat (200) @(posedge clk);
    t1 = 25.0 + (real'(r1) / 6894.0 - 1.0) / 0.0039;
    t2 = 25.0 + (real'(r2) / 6894.0 - 1.0) / 0.0039;
    chk(real'(temp[0]) > t1 - 1.6 && real'(temp[0]) < t1 + 1.6, $sformatf("T0 %0d exp %f", temp[0], t1));
    chk(real'(temp[1]) > t2 - 1.6 && real'(temp[1]) < t2 + 1.6, $sformatf("T1 %0d exp %f", temp[1], t2));
  endtask

  initial begin
    req = '{req_t'(6894), req_t'(6894)}; iest = '{cur_t'(1000), cur_t'(1000)};
    repeat (3) @(posedge clk); rst_n = 1;
    temps(6894, 7500);
    temps(7200, 8400);
    temps(8000, 6500);
    temps(8900, 7000);
    tick;
    chk(!ot && !oc && !sd, "no fault");
    temps(9000, 7000);   // above 34 mOhm
    tick;
    chk(ot && sd && !oc, "over-temperature");
    req = '{req_t'(7000), req_t'(7000)};
    @(posedge clk); clr <= 1; @(posedge clk); clr <= 0;
    tick;
    chk(!ot && !sd, "cleared");
    iest = '{cur_t'(1000), cur_t'(39999)};
    tick;
    chk(!oc && !sd, "just below the current limit");
    iest = '{cur_t'(1000), cur_t'(40001)};
    tick;
    chk(oc && sd && !ot, "overcurrent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
