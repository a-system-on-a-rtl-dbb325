// tb_core_wrapper: random values on all four data sides of the wrapper in both
// modes. Normal mode: core gets func_in, func_out gets the core, tam_out is 0.
// Test mode: core gets tam_in, tam_out gets the core, func_out is 0.
module tb_core_wrapper;
  localparam int IN_W = 6, OUT_W = 3;

  logic             test_en;
  logic [IN_W-1:0]  func_in, tam_in, core_in;
  logic [OUT_W-1:0] core_out, func_out, tam_out;
  int checks = 0, failures = 0;
  int n_normal = 0, n_test = 0;

  core_wrapper #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (
    .test_en(test_en), .func_in(func_in), .tam_in(tam_in), .core_in(core_in),
    .core_out(core_out), .func_out(func_out), .tam_out(tam_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL test_en=%b %s = %h expected %h", test_en, what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      test_en  = 1'($urandom);
      func_in  = IN_W'($urandom);
      tam_in   = IN_W'($urandom);
      core_out = OUT_W'($urandom);
      #1;
      if (test_en) begin
        n_test++;
        check("core_in",  8'(core_in),  8'(tam_in));
        check("tam_out",  8'(tam_out),  8'(core_out));
        check("func_out", 8'(func_out), 8'd0);
      end else begin
        n_normal++;
        check("core_in",  8'(core_in),  8'(func_in));
        check("func_out", 8'(func_out), 8'(core_out));
        check("tam_out",  8'(tam_out),  8'd0);
      end
    end
    checks++;
    if (n_test == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a mode was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
