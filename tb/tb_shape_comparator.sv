// Random test of the side comparator: reference side is the shorter side, the
// box is wide or high only when the side difference is strictly above the
// threshold.
module tb_shape_comparator;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  logic [TCOORD_W:0] w, h, thresh, ref_len;
  shape_e shape;

  shape_comparator dut (.w, .h, .thresh, .ref_len, .shape);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw, nh, nt, er, es;
    for (int n = 0; n < 3000; n++) begin
      nw = $urandom_range(1, 64);
      nh = (n % 3 == 0) ? nw + $urandom_range(0, 12) - 6 : $urandom_range(1, 64);
      if (nh < 1) nh = 1;
      nt = (n % 5 == 0) ? ((nw > nh) ? nw - nh : nh - nw) : $urandom_range(0, 12);
      w = (TCOORD_W+1)'(nw); h = (TCOORD_W+1)'(nh); thresh = (TCOORD_W+1)'(nt);
      er = (nw < nh) ? nw : nh;
      if (nw - nh > nt)      es = 1;
      else if (nh - nw > nt) es = 2;
      else                   es = 0;
      #1;
      checks++;
      if (int'(ref_len) != er || int'(shape) != es) begin
        failures++;
        $display("FAIL w%0d h%0d t%0d -> ref %0d shape %0d, expected %0d %0d", nw, nh, nt,
                 ref_len, shape, er, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
