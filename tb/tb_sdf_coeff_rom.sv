// Testbench of sdf_coeff_rom: reads every word and compares it with the
// reference tap lists, checks the one-cycle read latency and the hold of the
// output while rd_en is low, and checks that each stored coefficient is
// within 1/128 of the real-valued wavelet filter and that the low-pass DC
// gain is 1 and the high-pass DC gain is 0.
module tb_sdf_coeff_rom;
  import sdf_pkg::*;
  import sdf_ref_pkg::*;

  logic clk = 1'b0;
  logic rd_en;
  wavelet_e wavelet;
  band_e band;
  logic [2:0] m;
  coef_t coef;
  int checks = 0, failures = 0;

  sdf_coeff_rom dut (.clk, .rd_en, .wavelet, .band, .m, .coef);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // real-valued filters, centre tap first
  real r53l [5] = '{0.75, 0.25, -0.125, 0.0, 0.0};
  real r53h [5] = '{1.0, -0.5, 0.0, 0.0, 0.0};
  real r97l [5] = '{0.6029490182363579, 0.2668641184428723, -0.07822326652898785,
                    -0.01686411844287495, 0.02674875741080976};
  real r97h [5] = '{1.115087052456994, -0.5912717631142470, -0.05754352622849957,
                    0.09127176311424948, 0.0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int c[$];
    int k, expv, dc;
    real rv;
    rd_en = 1'b0; wavelet = WV_LEGALL53; band = BAND_LO; m = '0;
    @(negedge clk);
    for (int wv = 0; wv < 2; wv++) begin
      for (int b = 0; b < 2; b++) begin
        taps(wv, b, c);
        k = (c.size() - 1) / 2;
        dc = 0;
        for (int mm = 0; mm < 8; mm++) begin
          wavelet = wavelet_e'(wv); band = band_e'(b); m = 3'(mm); rd_en = 1'b1;
          @(negedge clk);
          expv = (mm <= k) ? c[k + mm] : 0;
          check(int'(coef) == expv, $sformatf("wv%0d band%0d m%0d got %0d exp %0d",
                                              wv, b, mm, coef, expv));
          if (mm < 5) begin
            rv = (wv == 0) ? ((b == 0) ? r53l[mm] : r53h[mm]) : ((b == 0) ? r97l[mm] : r97h[mm]);
            check((real'(int'(coef)) / 128.0 - rv) < 0.0079 &&
                  (rv - real'(int'(coef)) / 128.0) < 0.0079,
                  $sformatf("wv%0d band%0d m%0d value %0d far from %f", wv, b, mm, coef, rv));
          end
          dc += (mm == 0) ? int'(coef) : 2 * int'(coef);
          // hold: with rd_en low the output must not change
          rd_en = 1'b0; m = 3'(mm + 1);
          @(negedge clk);
          check(int'(coef) == expv, "output not held while rd_en low");
        end
        check(dc == ((b == 0) ? 128 : 0), $sformatf("wv%0d band%0d DC gain %0d", wv, b, dc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
