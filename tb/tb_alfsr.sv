// tb_alfsr: four-stage ALFSR with p(x) = x^4 + x + 1.
// The expected sequence is computed from the recurrence a(n+4) = a(n+1) xor a(n)
// of the polynomial: the stream of bits leaving stage a0 must follow it, the
// register must visit all 15 non-zero states once per 15 clocks (maximal length)
// and come back to the seed, and rst must reload the seed on the next edge.
module tb_alfsr;
  logic       clk = 0, rst;
  logic [3:0] y;
  int checks = 0, failures = 0;

  alfsr dut (.clk(clk), .rst(rst), .y(y));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [63:0] seq;          // bit stream a0, a1, a2, ...
    bit [15:0] seen = '0;
    int wraps = 0;
    // seed 0001 means a3 a2 a1 a0 = 0 0 0 1, so the stream starts 1,0,0,0
    seq[0] = 1; seq[1] = 0; seq[2] = 0; seq[3] = 0;
    for (int n = 0; n + 4 < 64; n++) seq[n+4] = seq[n+1] ^ seq[n];

    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (y !== 4'b0001) begin failures++; $display("FAIL seed %b", y); end
    for (int n = 0; n < 40; n++) begin
      // state after n clocks is a(n+3) a(n+2) a(n+1) a(n)
      checks++;
      if (y !== {seq[n+3], seq[n+2], seq[n+1], seq[n]}) begin
        failures++;
        $display("FAIL clock %0d y=%b expected %b", n, y, {seq[n+3], seq[n+2], seq[n+1], seq[n]});
      end
      if (n < 15) seen[y] = 1;
      if (n > 0 && y == 4'b0001) begin
        wraps++;
        checks++;
        if (n % 15 != 0) begin failures++; $display("FAIL seed returned after %0d clocks", n); end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (seen != 16'hFFFE) begin failures++; $display("FAIL states visited %b", seen); end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL sequence never wrapped"); end
    // reload
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (y !== 4'b0001) begin failures++; $display("FAIL reload %b", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
