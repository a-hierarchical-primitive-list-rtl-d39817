// Exhaustive test of the layer select logic: every reference length 1..255
// against ceil(log2(length)) computed by a loop, saturated at layer 4.
module tb_layer_select;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  logic [TCOORD_W:0] len;
  layer_t layer_id;

  layer_select dut (.len, .layer_id);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 1; n < 256; n++) begin
      int exp_l;
      exp_l = 0;
      while ((1 << exp_l) < n) exp_l++;
      if (exp_l > 4) exp_l = 4;
      len = (TCOORD_W+1)'(n);
      #1;
      checks++;
      if (int'(layer_id) != exp_l) begin
        failures++;
        $display("FAIL len=%0d layer=%0d expected %0d", n, layer_id, exp_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
