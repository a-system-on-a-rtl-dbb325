// tb_tam_demux: random select and bus values, including select values with no
// core behind them; the selected core port must carry Z, every other port zero.
module tb_tam_demux;
  localparam int N = 4, W = 36, SEL_W = 2;

  logic [SEL_W-1:0] sel;
  logic [W-1:0]     z;
  logic [W-1:0]     y [N];
  int checks = 0, failures = 0;
  int hits [N];

  tam_demux #(.N(N), .W(W), .SEL_W(SEL_W)) dut (.sel(sel), .z(z), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) hits[k] = 0;
    for (int i = 0; i < 400; i++) begin
      sel = SEL_W'($urandom);
      z   = {$urandom, $urandom};
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (k == int'(sel)) begin
          hits[k]++;
          if (y[k] !== z) begin
            failures++;
            $display("FAIL sel=%0d port %0d = %h expected %h", sel, k, y[k], z);
          end
        end else if (y[k] !== '0) begin
          failures++;
          $display("FAIL sel=%0d unselected port %0d = %h", sel, k, y[k]);
        end
      end
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (hits[k] == 0) begin
        failures++;
        $display("FAIL port %0d never selected", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
