// tb_fault_mux: exhaustive check of the fault-injection cell: every wire value
// against every select code (00 pass, 01 stuck-at-1, 10 stuck-at-0, 11 pass).
module tb_fault_mux;
  import soc_pkg::*;

  logic       d, q;
  fault_sel_e sel;
  int checks = 0, failures = 0;

  fault_mux dut (.d(d), .sel(sel), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 2; v++) begin
        d   = v[0];
        sel = fault_sel_e'(s[1:0]);
        #1;
        exp = (s == 1) ? 1'b1 : (s == 2) ? 1'b0 : v[0];
        checks++;
        if (q !== exp) begin
          failures++;
          $display("FAIL sel=%b d=%b q=%b expected %b", s[1:0], d, q, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
