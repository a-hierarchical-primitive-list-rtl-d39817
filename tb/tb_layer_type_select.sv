// Exhaustive test of the layer type select table: every misalignment status
// and every shape code against the table rows.
module tb_layer_type_select;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  malign_e malign;
  logic [2:0] shape3;
  ltype_e ltype;
  logic step_down;

  layer_type_select dut (.malign, .shape3, .ltype, .step_down);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int et, es;
    automatic malign_e ms [3] = '{MA_NONE, MA_UGRID, MA_BFAIL};
    automatic logic [2:0] ss [5] = '{3'b000, 3'b010, 3'b100, 3'b011, 3'b101};
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 5; j++) begin
        malign = ms[i]; shape3 = ss[j];
        case (ss[j])
          3'b010: begin et = 1; es = 0; end
          3'b100: begin et = 2; es = 0; end
          3'b011: begin et = 1; es = 1; end
          3'b101: begin et = 2; es = 1; end
          default:
            if (ms[i] == MA_NONE)       begin et = 0; es = 0; end
            else if (ms[i] == MA_UGRID) begin et = 3; es = 0; end
            else                        begin et = 0; es = 1; end
        endcase
        #1;
        checks++;
        if (int'(ltype) != et || int'(step_down) != es) begin
          failures++;
          $display("FAIL malign %0d shape %b -> %0d/%0d expected %0d/%0d", ms[i], ss[j],
                   ltype, step_down, et, es);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
