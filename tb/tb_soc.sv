// tb_soc: SOC_MIXED (s27, s298, c17, c432 on a 36-bit Z / 7-bit OUT TAM).
// The testbench stands in for the two cores that are not built (s298, c432) by
// answering on ext_core_out with the inverse of what it sees on ext_core_in.
// Checked, against independent expectations:
//  - test mode, c17 selected (ENABLE=2): all 32 input vectors on Z[4:0], random
//    upper Z bits, OUT = {0, N22, N23}; the same with every single stuck-at fault;
//  - test mode, s27 selected (ENABLE=0): clocked random sequence on Z[5:0]
//    (CK = Z[0], rst = Z[1]), OUT[0] = G17, OUT[6:1] = 0;
//  - test mode, s298 / c432 selected: the core sees exactly its low Z bits and
//    OUT carries its response, cut to its own output width;
//  - meanwhile every unselected core stays in normal mode on its func pins;
//  - normal mode: OUT = 0 and each core answers on func_out.
module tb_soc;
  import soc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC = 4, ZW = 36, OW = 7;
  localparam int IWS [NC] = '{6, 5, 5, 36};
  localparam int OWS [NC] = '{1, 6, 2, 7};

  logic [1:0]    enable;
  logic [ZW-1:0] z;
  logic [OW-1:0] out;
  logic          test_mode;
  logic [ZW-1:0] func_in [NC];
  logic [OW-1:0] func_out [NC];
  logic [ZW-1:0] ext_core_in [NC];
  logic [OW-1:0] ext_core_out [NC];
  fault_sel_e    c17_fsel [C17_WIRES];
  fault_sel_e    s27_fsel [S27_WIRES];
  int checks = 0, failures = 0;

  soc dut (.*);

  // stand-in for the cores outside the design
  always_comb for (int k = 0; k < NC; k++) ext_core_out[k] = OW'(~ext_core_in[k]);

  function automatic logic [ZW-1:0] inmask(int k);
    return (ZW'(1) << IWS[k]) - 1;
  endfunction
  function automatic logic [OW-1:0] outmask(int k);
    return OW'((64'(1) << OWS[k]) - 1);
  endfunction
  function automatic logic [OW-1:0] ext_resp(int k, logic [ZW-1:0] v);
    return OW'(~(v & inmask(k))) & outmask(k);
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (enable=%0d test_mode=%b)", what, got, exp, enable, test_mode);
    end
  endtask

  task automatic clear_faults();
    for (int i = 0; i < C17_WIRES; i++) c17_fsel[i] = FI_PASS;
    for (int i = 0; i < S27_WIRES; i++) s27_fsel[i] = FI_PASS;
  endtask

  task automatic random_func();
    for (int k = 0; k < NC; k++) func_in[k] = {$urandom, $urandom};
    func_in[0][1:0] = 2'b00;  // s27 idle in normal mode: no clock, no reset
  endtask

  // unselected cores (other than the s27) must be in normal mode
  task automatic check_normal_cores(int sel);
    for (int k = 1; k < NC; k++) begin
      if (test_mode && k == sel) continue;
      if (k == 2) check("c17 func_out", 64'(func_out[2]), 64'(c17_ref(func_in[2][4:0])));
      else        check($sformatf("core %0d func_out", k), 64'(func_out[k]), 64'(ext_resp(k, func_in[k])));
      if (k != 2) check($sformatf("core %0d ext_core_in", k), 64'(ext_core_in[k]), 64'(func_in[k] & inmask(k)));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s27_state_t st;
    #1;
    clear_faults();
    random_func();
    // ---------------- c17 through the TAM
    test_mode = 1; enable = 2'd2;
    for (int w = -1; w < C17_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        if (w == -1 && v == 1) continue;
        clear_faults();
        if (w >= 0) c17_fsel[w] = v ? FI_SA1 : FI_SA0;
        for (int i = 0; i < 32; i++) begin
          z = {$urandom, $urandom};
          z[4:0] = 5'(i);
          random_func();
          #1;
          check($sformatf("c17 OUT wire %0d sa%0d", w, v), 64'(out), 64'(c17_ref(5'(i), w, v[0])));
          if (i % 8 == 0) check_normal_cores(2);
        end
      end
    end
    clear_faults();
    // ---------------- s27 through the TAM
    enable = 2'd0;
    z = '0; z[1] = 1'b1; #1; z[1] = 1'b0; #1;
    st = '{q5: 0, q6: 0, q7: 0, ck_prev: 0};
    void'(s27_ref(6'b000010, st));
    void'(s27_ref(6'b000000, st));
    for (int i = 0; i < 300; i++) begin
      logic [5:0] v;
      v = {4'($urandom), 1'b0, i[0]};
      if (i == 150) v[1] = 1'b1;  // one mid-sequence reset
      z = {$urandom, $urandom};
      z[5:0] = v;
      random_func();
      #1;
      check("s27 OUT", 64'(out), 64'(s27_ref(v, st)));
      if (i % 10 == 0) check_normal_cores(0);
    end
    // ---------------- external cores through the TAM
    for (int k = 1; k < NC; k += 2) begin
      enable = 2'(k);
      for (int i = 0; i < 50; i++) begin
        z = {$urandom, $urandom};
        random_func();
        #1;
        check($sformatf("core %0d ext_core_in", k), 64'(ext_core_in[k]), 64'(z & inmask(k)));
        check($sformatf("core %0d OUT", k), 64'(out), 64'(ext_resp(k, z)));
        check_normal_cores(k);
      end
    end
    // ---------------- normal mode
    test_mode = 0;
    for (int i = 0; i < 50; i++) begin
      enable = 2'($urandom);
      z = {$urandom, $urandom};
      random_func();
      #1;
      check("OUT in normal mode", 64'(out), 64'd0);
      check_normal_cores(-1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
