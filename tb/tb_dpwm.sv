// tb_dpwm: checks the two-phase DPWM: on-time per period equals the duty
// code, phase 1 is shifted by half a period, 2*fsw mode halves the period
// with the same duty, force and enable override the gates, and the strobes
// come at fsw, 8*fsw and fsw/8.
// The interleaving, 2*fsw mode and sampling rates follow the document; the
// force/enable behaviour checked is this design's own.
module tb_dpwm;
  import cpm_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, fen = 0, fval = 0;
  logic [1:0] hf = '0;
  logic [7:0] duty [2];
  logic [1:0] gate;
  logic tick, vs, vi;
  int checks = 0, failures = 0;

  dpwm #(.N(2)) dut (.clk, .rst_n, .en, .hf_mode(hf), .duty, .force_en(fen), .force_val(fval),
                     .gate, .cycle_tick(tick), .vout_smp(vs), .vin_smp(vi));
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int on0, on1, nt, nvs, nvi, rise0, rise1, c;
  logic [1:0] gprev;
  initial begin
    duty[0] = 8'd64; duty[1] = 8'd200;
    repeat (3) @(posedge clk); rst_n = 1;
    // skip two periods for the duty latch
    repeat (2) @(posedge clk iff tick);
    on0 = 0; on1 = 0; nt = 0; nvs = 0; nvi = 0; rise0 = -1; rise1 = -1; c = 0; gprev = gate;
    repeat (2048) begin
      @(posedge clk);
      on0 += gate[0]; on1 += gate[1]; nt += tick; nvs += vs; nvi += vi;
      if (gate[0] && !gprev[0] && rise0 < 0) rise0 = c;
      if (gate[1] && !gprev[1] && rise1 < 0) rise1 = c;
      gprev = gate; c++;
    end
    chk(on0 == 8 * 64,  $sformatf("phase0 on-time %0d", on0));
    chk(on1 == 8 * 200, $sformatf("phase1 on-time %0d", on1));
    chk(nt == 8,  $sformatf("cycle ticks %0d", nt));
    chk(nvs == 64, $sformatf("vout strobes %0d", nvs));
    chk(nvi == 1, $sformatf("vin strobes %0d", nvi));
    chk(((rise1 - rise0 + 256) % 256) == 128, $sformatf("phase shift %0d", rise1 - rise0));
    // 2*fsw: same duty, twice the edges
    hf = 2'b01; duty[0] = 8'd65;
    repeat (2) @(posedge clk iff tick);
    on0 = 0; on1 = 0; rise0 = 0; gprev = gate;
    repeat (256) begin
      @(posedge clk);
      on0 += gate[0]; on1 += gate[1];
      if (gate[0] && !gprev[0]) rise0++;
      gprev = gate;
    end
    chk(on0 == 65, $sformatf("hf on-time %0d", on0));
    chk(on1 == 200, $sformatf("other phase unaffected %0d", on1));
    chk(rise0 == 2, $sformatf("hf pulses per period %0d", rise0));
    hf = '0;
    // force and enable
    fen = 1; fval = 1; repeat (3) @(posedge clk);
    chk(gate == 2'b11, "force on");
    fval = 0; repeat (2) @(posedge clk);
    chk(gate == 2'b00, "force off");
    fen = 0; en = 0; on0 = 0;
    repeat (300) begin @(posedge clk); on0 += gate[0] + gate[1]; end
    chk(on0 == 0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
