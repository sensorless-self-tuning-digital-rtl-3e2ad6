// tb_current_estimator: drives the two-phase estimator with fixed and
// stepped ADC codes and duty ratios and compares its outputs with a
// floating-point model of the bilinear R-C observer
//   s[n] = (1-2c2)*s[n-1] + c2*(vL[n]+vL[n-1]),  i = G*s - ioff,
// as well as the final value G*(d*vin - vout) and the 2*N+1 clock latency.
// The observer equation follows the document; the stimulus and the
// fixed-point tolerances are this test's choice.
module tb_current_estimator;
  import cpm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  duty_t duty [2];
  vin_t vin;
  vout_t vout;
  est_param_t prm [2];
  cur_t iest [2];
  int checks = 0, failures = 0;
  real s_m [2], vlp_m [2];

  current_estimator #(.N(2)) dut (.clk, .rst_n, .start, .duty, .vin, .vout_sum(11'(vout) * 11'd8), .prm, .iest, .done);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input bit check);
    int lat;
    real vl, im;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    lat = 1;
    while (!done) begin @(posedge clk); lat++; end
    for (int k = 0; k < 2; k++) begin
      real c2;
      c2 = real'(prm[k].c2) / 65536.0;
      vl = real'(duty[k]) * real'(vin) / 256.0 - 4.0 * real'(vout);
      s_m[k] = (1.0 - 2.0 * c2) * s_m[k] + c2 * (vl + vlp_m[k]);
      vlp_m[k] = vl;
      im = real'(prm[k].g) / 1024.0 * s_m[k] - real'(prm[k].ioff);
      if (check) chk((real'(iest[k]) - im) < 3.0 + 0.002 * (im < 0 ? -im : im) &&
                     (im - real'(iest[k])) < 3.0 + 0.002 * (im < 0 ? -im : im),
                     $sformatf("phase %0d iest %0d model %f", k, iest[k], im));
    end
    // start is sampled one edge after it is driven; done follows 2*N+1 edges later
    if (check) chk(lat == 2 * 2 + 2, $sformatf("latency %0d", lat));
  endtask

  initial begin
    s_m = '{0.0, 0.0}; vlp_m = '{0.0, 0.0};
    duty = '{8'd40, 8'd41}; vin = 12'd3000; vout = 8'd112;
    prm[0] = '{g: gain_t'(400 << 10), c2: c2_of_tau(tau_t'(50 << 8)), ioff: cur_t'(0)};
    prm[1] = '{g: gain_t'(300 << 10), c2: c2_of_tau(tau_t'(20 << 8)), ioff: cur_t'(150)};
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (40) step(1);
    // duty and vin steps
    duty = '{8'd45, 8'd38}; vin = 12'd2900;
    repeat (40) step(1);
    // let it settle, then check the final value G*(d*vin - vout) - ioff
    repeat (600) step(0);
    begin
      real f0, f1;
      f0 = 400.0 * (45.0 * 2900.0 / 256.0 - 448.0);
      f1 = 300.0 * (38.0 * 2900.0 / 256.0 - 448.0) - 150.0;
      chk(iest[0] > cur_t'($rtoi(f0) - 20) && iest[0] < cur_t'($rtoi(f0) + 20), $sformatf("final 0 %0d vs %f", iest[0], f0));
      chk(iest[1] > cur_t'($rtoi(f1) - 20) && iest[1] < cur_t'($rtoi(f1) + 20), $sformatf("final 1 %0d vs %f", iest[1], f1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
