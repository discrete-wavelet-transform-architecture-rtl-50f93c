// tb_dwt_ctrl_s: self-checking test of the synthesis controller.
// After reset the tap select must count 0,1,2,3 and the phase advance once
// every four clocks modulo 8; smp_end must mark csel = 3, and each select
// must be high exactly in its phases (s2k even, s4k3 3/7, s8k 0, s8k1 1,
// s8k2 2, s8k5 5, s8k6 6).
module tb_dwt_ctrl_s;
  import dwt_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  tap_t   csel;
  phase_t phase;
  logic   smp_end;
  sel_s_t sel;
  int checks = 0, failures = 0;

  dwt_ctrl_s dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++; if (csel != 0 || phase != 0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int ph, tp;
      tp = t % 4;
      ph = (t / 4) % 8;
      checks++;
      if (csel != tap_t'(tp) || phase != phase_t'(ph) || smp_end != (tp == 3)) begin
        failures++; $display("t=%0d csel=%0d phase=%0d", t, csel, phase);
      end
      checks++;
      if (sel.s2k != (ph % 2 == 0) || sel.s4k3 != (ph == 3 || ph == 7) ||
          sel.s8k != (ph == 0) || sel.s8k1 != (ph == 1) || sel.s8k2 != (ph == 2) ||
          sel.s8k5 != (ph == 5) || sel.s8k6 != (ph == 6)) begin
        failures++; $display("t=%0d phase=%0d sel=%b", t, ph, sel);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
