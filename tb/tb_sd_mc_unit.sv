// Testbench of the M_C unit: random receive values, diagonal entries, symbols and run-time
// orders (4-, 16-, 64-QAM), compared with |b - R_ii s|^2 >> 6 computed with 64-bit integers,
// including saturation of large metrics.
module tb_sd_mc_unit;
  import sd_ref_pkg::*;
  logic signed [19:0] b_re, b_im;
  logic signed [11:0] rii;
  logic [2:0] re_idx, im_idx;
  logic [3:0] p;
  logic [19:0] mc;
  int checks = 0, failures = 0;

  sd_mc_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp;
    int sat = 0;
    for (int n = 0; n < 4000; n++) begin
      int pp;
      pp = 2 << $urandom_range(2, 0);
      p = 4'(pp);
      re_idx = 3'($urandom_range(pp - 1, 0));
      im_idx = 3'($urandom_range(pp - 1, 0));
      rii = 12'($urandom_range(2047, 0));
      if (n % 2 == 0) begin
        b_re = 20'(int'($urandom_range(8000, 0)) - 4000);
        b_im = 20'(int'($urandom_range(8000, 0)) - 4000);
        rii = 12'($urandom_range(200, 0));
      end else begin
        b_re = 20'($urandom);
        b_im = 20'($urandom);
      end
      #1;
      exp = mc_ref(longint'(b_re), longint'(b_im), longint'(rii), int'(re_idx), int'(im_idx), pp, 6, 20);
      if (exp == 20'hfffff) sat++;
      checks++;
      if (longint'(mc) != exp) begin
        failures++;
        $display("FAIL b=(%0d,%0d) r=%0d s=(%0d,%0d) p=%0d mc=%0d exp=%0d", b_re, b_im, rii, re_idx, im_idx, pp, mc, exp);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
