// tb_tam_mux: random core responses and selects; OUT must equal the selected
// core's response. Also run with a wider select than cores (values past the last
// core give zero) using a second instance with 3 cores.
module tb_tam_mux;
  localparam int N = 4, W = 7, SEL_W = 2;

  logic [SEL_W-1:0] sel;
  logic [W-1:0]     x  [N];
  logic [W-1:0]     x3 [3];
  logic [W-1:0]     out, out3;
  int checks = 0, failures = 0;

  tam_mux #(.N(N), .W(W), .SEL_W(SEL_W)) dut  (.sel(sel), .x(x),  .out(out));
  tam_mux #(.N(3), .W(W), .SEL_W(SEL_W)) dut3 (.sel(sel), .x(x3), .out(out3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp3;
    for (int i = 0; i < 400; i++) begin
      sel = SEL_W'($urandom);
      for (int k = 0; k < N; k++) x[k] = W'($urandom);
      for (int k = 0; k < 3; k++) x3[k] = W'($urandom);
      #1;
      checks++;
      if (out !== x[sel]) begin
        failures++;
        $display("FAIL sel=%0d out=%h expected %h", sel, out, x[sel]);
      end
      exp3 = (sel == 2'd3) ? '0 : x3[sel];
      checks++;
      if (out3 !== exp3) begin
        failures++;
        $display("FAIL (3 cores) sel=%0d out=%h expected %h", sel, out3, exp3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
