// Testbench of sdf_window_filter: random and corner-case windows of nine
// 8-bit samples for every wavelet and band, compared with the reference
// tap lists applied to the window centred on p[4]. Windows chosen to drive
// the 9/7 high-pass beyond the 9-bit range check the saturation.
module tb_sdf_window_filter;
  import sdf_pkg::*;
  import sdf_ref_pkg::*;

  wavelet_e wavelet;
  band_e band;
  logic [IN_W-1:0] p [9];
  out_t filter_out;
  int checks = 0, failures = 0;
  int n_sat = 0;

  sdf_window_filter dut (.wavelet, .band, .p, .filter_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    int c[$];
    int k;
    longint s;
    // all-zero window gives zero for every filter
    foreach (p[j]) p[j] = '0;
    for (int f = 0; f < 4; f++) begin
      wavelet = wavelet_e'(f / 2); band = band_e'(f % 2);
      #1;
      checks++;
      if (filter_out != '0) begin
        failures++;
        $display("FAIL: zero window gave %0d", filter_out);
      end
    end
    for (int i = 0; i < 4000; i++) begin
      wavelet = wavelet_e'($urandom % 2);
      band    = band_e'($urandom % 2);
      for (int j = 0; j < 9; j++) begin
        case (i % 4)
          0: p[j] = IN_W'($urandom);
          1: p[j] = ($urandom % 2) ? 8'hFF : 8'h00;
          2: p[j] = ((j % 3) == 1) ? 8'hFF : 8'h00;   // period-3, 9/7 high clips
          default: p[j] = 8'(i);
        endcase
      end
      #1;
      taps(int'(wavelet), int'(band), c);
      k = (c.size() - 1) / 2;
      s = 0;
      for (int j = 0; j < c.size(); j++) s += longint'(c[j]) * p[4 - k + j];
      checks++;
      if (clips(s)) n_sat++;
      if (int'(filter_out) != rsat(s)) begin
        failures++;
        if (failures < 20)
          $display("FAIL: wv%0d band%0d got %0d exp %0d", wavelet, band, filter_out, rsat(s));
      end
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
