// Writes random bases into every (layer, kind) entry of the layer offset
// table and reads them back through both read ports, against a shadow copy.
module tb_layer_offset_table;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  layer_t wlayer, ra_layer, rb_layer;
  ltype_e wtype, ra_type, rb_type;
  lidx_t wdata, ra_data, rb_data;
  int shadow [5][4];

  always #5 clk = ~clk;

  layer_offset_table #(.NUM_LAYERS(5)) dut (.clk, .rst_n, .we, .wlayer, .wtype, .wdata,
    .ra_layer, .ra_type, .ra_data, .rb_layer, .rb_type, .rb_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wlayer = '0; wtype = LT_SQUARE; wdata = '0;
    ra_layer = '0; ra_type = LT_SQUARE; rb_layer = '0; rb_type = LT_SQUARE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      for (int l = 0; l < 5; l++)
        for (int t = 0; t < 4; t++) begin
          @(negedge clk);
          we = 1; wlayer = layer_t'(l); wtype = ltype_e'(t);
          shadow[l][t] = $urandom_range(0, 4095);
          wdata = lidx_t'(shadow[l][t]);
        end
      @(negedge clk);
      we = 0;
      for (int n = 0; n < 40; n++) begin
        int l1, t1, l2, t2;
        l1 = $urandom_range(0, 4); t1 = $urandom_range(0, 3);
        l2 = $urandom_range(0, 4); t2 = $urandom_range(0, 3);
        ra_layer = layer_t'(l1); ra_type = ltype_e'(t1);
        rb_layer = layer_t'(l2); rb_type = ltype_e'(t2);
        #1;
        checks++;
        if (int'(ra_data) != shadow[l1][t1] || int'(rb_data) != shadow[l2][t2]) begin
          failures++;
          $display("FAIL read %0d/%0d=%0d %0d/%0d=%0d", l1, t1, ra_data, l2, t2, rb_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
