// tb_workload_mixed_socs: the four further mixed systems (MIXED_1..MIXED_4)
// built from the same soc module, each driven through its own TAM.
// For every configuration, in one generate branch per configuration:
//  - every ENABLE value in test mode: a core outside the design (answered by a
//    stand-in that returns the inverse of its inputs, cut to its output width)
//    must see exactly its own low Z bits and its response must come out on OUT,
//    with the unused OUT bits 0; while it is selected every other
//    outside core must still answer its functional pins (normal mode);
//  - c17 (MIXED_1, ENABLE 4): all 32 patterns through Z, each against the
//    reference model, and every one of the 22 single stuck-at faults must be
//    detected on OUT by the 32 patterns;
//  - s27 (MIXED_1, ENABLE 0): reset, then 200 clocked random vectors through Z
//    (CK = Z[0], rst = Z[1]) against the reference model;
//  - normal mode: OUT stays 0 for random ENABLE and Z.
// The bus widths are checked against the pin counts: Z as wide as the widest
// core input, OUT as wide as the widest core output.
module tb_workload_mixed_socs;
  import soc_pkg::*;
  import tb_ref_pkg::*;

  localparam soc_kind_e KINDS [4] = '{MIXED_1, MIXED_2, MIXED_3, MIXED_4};
  localparam int EXP_ZW [4] = '{41, 60, 60, 41};
  localparam int EXP_OW [4] = '{32, 26, 31, 32};

  int checks = 0, failures = 0, done = 0;
  int c17_faults_detected = 0;

  task automatic check(string what, logic [159:0] got, logic [159:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 4; g++) begin : g_soc
    localparam soc_kind_e K = KINDS[g];
    localparam int NC = num_cores(K);
    localparam int SW = sel_width(K);
    localparam int ZW = tam_in_width(K);
    localparam int OW = tam_out_width(K);
    localparam int C17_AT = slot_of(K, C17);
    localparam int S27_AT = slot_of(K, S27);

    logic [SW-1:0] enable;
    logic [ZW-1:0] z;
    logic [OW-1:0] out;
    logic          test_mode;
    logic [ZW-1:0] func_in [NC];
    logic [OW-1:0] func_out [NC];
    logic [ZW-1:0] ext_core_in [NC];
    logic [OW-1:0] ext_core_out [NC];
    fault_sel_e    c17_fsel [C17_WIRES];
    fault_sel_e    s27_fsel [S27_WIRES];

    soc #(.KIND(K)) dut (.*);

    // stand-in for the cores outside the design
    always_comb for (int k = 0; k < NC; k++) ext_core_out[k] = OW'(~ext_core_in[k]);

    function automatic logic [ZW-1:0] inmask(int k);
      logic [ZW-1:0] m = '0;
      for (int b = 0; b < core_in_width(K, k); b++) m[b] = 1'b1;
      return m;
    endfunction
    function automatic logic [OW-1:0] outmask(int k);
      logic [OW-1:0] m = '0;
      for (int b = 0; b < core_out_width(K, k); b++) m[b] = 1'b1;
      return m;
    endfunction
    function automatic logic [OW-1:0] ext_resp(int k, logic [ZW-1:0] v);
      return OW'(~(v & inmask(k))) & outmask(k);
    endfunction
    function automatic logic [ZW-1:0] rand_z();
      logic [ZW-1:0] v;
      for (int b = 0; b < ZW; b += 32) v = (v << 32) | ZW'($urandom);
      return v;
    endfunction

    task automatic random_func();
      for (int k = 0; k < NC; k++) func_in[k] = rand_z();
      if (S27_AT >= 0) func_in[S27_AT][1:0] = 2'b00;  // s27 idle: no clock, no reset
    endtask

    task automatic check_other_cores(int sel);
      for (int k = 0; k < NC; k++) begin
        if (k == sel || k == C17_AT || k == S27_AT) continue;
        check($sformatf("%s core %0d func_out", K.name(), k), 160'(func_out[k]), 160'(ext_resp(k, func_in[k])));
      end
    endtask

    initial begin
      #1;
      for (int i = 0; i < C17_WIRES; i++) c17_fsel[i] = FI_PASS;
      for (int i = 0; i < S27_WIRES; i++) s27_fsel[i] = FI_PASS;
      check($sformatf("%s Z width", K.name()), 160'(ZW), 160'(EXP_ZW[g]));
      check($sformatf("%s OUT width", K.name()), 160'(OW), 160'(EXP_OW[g]));
      test_mode = 1'b1;
      for (int k = 0; k < NC; k++) begin
        enable = SW'(k);
        if (k == C17_AT) begin
          // fault-free run, then each single stuck-at fault with all 32 patterns
          for (int w = -1; w < C17_WIRES; w++) begin
            for (int v = 0; v < 2; v++) begin
              bit seen;
              if (w == -1 && v == 1) continue;
              seen = 0;
              for (int i = 0; i < C17_WIRES; i++) c17_fsel[i] = FI_PASS;
              if (w >= 0) c17_fsel[w] = (v != 0) ? FI_SA1 : FI_SA0;
              for (int i = 0; i < 32; i++) begin
                z = rand_z();
                z[4:0] = 5'(i);
                random_func();
                #1;
                check($sformatf("%s c17 wire %0d sa%0d", K.name(), w, v), 160'(out),
                      160'(c17_ref(5'(i), w, v[0])));
                if (out[1:0] != c17_ref(5'(i))) seen = 1;
              end
              if (w >= 0 && seen) c17_faults_detected++;
            end
          end
          for (int i = 0; i < C17_WIRES; i++) c17_fsel[i] = FI_PASS;
        end else if (k == S27_AT) begin
          s27_state_t st;
          st = '{q5: 0, q6: 0, q7: 0, ck_prev: 0};
          for (int i = 0; i < 201; i++) begin
            logic [5:0] v;
            v = (i == 0) ? 6'b000010 : {4'($urandom), 1'b0, i[0]};
            z = rand_z();
            z[5:0] = v;
            random_func();
            #1;
            check($sformatf("%s s27 OUT", K.name()), 160'(out), 160'(s27_ref(v, st)));
          end
        end else begin
          for (int i = 0; i < 100; i++) begin
            z = rand_z();
            random_func();
            #1;
            check($sformatf("%s core %0d ext_core_in", K.name(), k), 160'(ext_core_in[k]), 160'(z & inmask(k)));
            check($sformatf("%s core %0d OUT", K.name(), k), 160'(out), 160'(ext_resp(k, z)));
            check_other_cores(k);
          end
        end
      end
      test_mode = 1'b0;
      for (int i = 0; i < 50; i++) begin
        enable = SW'($urandom);
        z = rand_z();
        random_func();
        #1;
        check($sformatf("%s OUT in normal mode", K.name()), 160'(out), 160'd0);
        check_other_cores(-1);
      end
      done++;
    end
  end

  initial begin
    wait (done == 4);
    checks++;
    if (c17_faults_detected != 22) begin
      failures++;
      $display("FAIL c17 in MIXED_1: %0d of 22 faults detected", c17_faults_detected);
    end
    $display("c17 in MIXED_1: %0d/22 faults detected by 32 patterns through the TAM", c17_faults_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
