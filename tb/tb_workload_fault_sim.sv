// tb_workload_fault_sim: the fault-simulation runs reported for the two built
// cores, carried out through the test access mechanism of the SOC that holds them.
//  - s27 in SOC_SEQ (ENABLE = 0): 14,999 random input vectors, each clocked once
//    through Z[0], for the fault-free core and each of its 38 single stuck-at
//    faults. Every response on OUT is compared with the reference model; a fault
//    counts as detected when some response differs from the fault-free one.
//  - c17 in SOC_COMB (ENABLE = 0): the 20 logged random patterns (all 22 faults
//    must be detected, as reported) and a run of 23 fresh random patterns.
// The coverage measured on the design must equal the coverage the reference
// model predicts for the same patterns. The s27 coverage is printed twice: over
// all 38 faults (two per wire, clock and reset wires included) and over the 34
// faults left when the clock and reset wires are not faulted, the count used in
// the published s27 results.
module tb_workload_fault_sim;
  import soc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NVEC = 14999;

  // SOC_SEQ pins
  logic [3:0]  s_enable;  logic [20:0] s_z;  logic [18:0] s_out;  logic s_test_mode;
  logic [20:0] s_func_in [10];  logic [18:0] s_func_out [10];
  logic [20:0] s_ext_in [10];   logic [18:0] s_ext_out [10];
  fault_sel_e  s_c17 [C17_WIRES];  fault_sel_e s_s27 [S27_WIRES];
  // SOC_COMB pins
  logic [3:0]   c_enable;  logic [156:0] c_z;  logic [63:0] c_out;  logic c_test_mode;
  logic [156:0] c_func_in [10];  logic [63:0] c_func_out [10];
  logic [156:0] c_ext_in [10];   logic [63:0] c_ext_out [10];
  fault_sel_e   c_c17 [C17_WIRES];  fault_sel_e c_s27 [S27_WIRES];

  soc #(.KIND(SOC_SEQ)) u_seq (
    .enable(s_enable), .z(s_z), .out(s_out), .test_mode(s_test_mode),
    .func_in(s_func_in), .func_out(s_func_out), .ext_core_in(s_ext_in),
    .ext_core_out(s_ext_out), .c17_fsel(s_c17), .s27_fsel(s_s27));

  soc #(.KIND(SOC_COMB)) u_comb (
    .enable(c_enable), .z(c_z), .out(c_out), .test_mode(c_test_mode),
    .func_in(c_func_in), .func_out(c_func_out), .ext_core_in(c_ext_in),
    .ext_core_out(c_ext_out), .c17_fsel(c_c17), .s27_fsel(c_s27));

  localparam logic [6:0] LOG [20] = '{
    7'b01110_00, 7'b00010_00, 7'b01110_00, 7'b00001_01, 7'b01010_11,
    7'b10101_11, 7'b10000_00, 7'b00010_00, 7'b10101_11, 7'b10000_00,
    7'b11110_10, 7'b11101_11, 7'b01101_11, 7'b01011_11, 7'b01010_11,
    7'b11111_10, 7'b11011_11, 7'b00000_00, 7'b10000_00, 7'b01101_11};

  int checks = 0, failures = 0;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic s27_fault(int w, logic v);
    for (int i = 0; i < S27_WIRES; i++) s_s27[i] = FI_PASS;
    if (w >= 0) s_s27[w] = v ? FI_SA1 : FI_SA0;
  endtask

  task automatic c17_fault(int w, logic v);
    for (int i = 0; i < C17_WIRES; i++) c_c17[i] = FI_PASS;
    if (w >= 0) c_c17[w] = v ? FI_SA1 : FI_SA0;
  endtask

  // c17 coverage of a pattern set, measured on the design and on the model
  task automatic c17_run(string name, logic [4:0] pats [], output int det, output int det_ref);
    logic [1:0] good;
    bit hit, hit_ref;
    det = 0; det_ref = 0;
    for (int w = 0; w < C17_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        c17_fault(w, v[0]);
        hit = 0; hit_ref = 0;
        foreach (pats[i]) begin
          c_z = {5{$urandom}};
          c_z[4:0] = pats[i];
          #1;
          good = c17_ref(pats[i]);
          check({name, " c17 OUT"}, 64'(c_out), 64'(c17_ref(pats[i], w, v[0])));
          if (c_out[1:0] !== good) hit = 1;
          if (c17_ref(pats[i], w, v[0]) !== good) hit_ref = 1;
        end
        det += hit; det_ref += hit_ref;
      end
    end
    c17_fault(-1, 0);
  endtask

  initial begin
    logic [3:0] pat [];
    bit         good [];
    s27_state_t st, st_ref;
    logic [4:0] cp [];
    int det, det_ref, s_det = 0, s_det_ref = 0, s_det_data = 0;
    bit hit, hit_ref;
    logic gref, fref;

    #1;
    s_test_mode = 1; s_enable = 4'd0;
    c_test_mode = 1; c_enable = 4'd0;
    for (int k = 0; k < 10; k++) begin
      s_func_in[k] = '0; c_func_in[k] = '0; s_ext_out[k] = '0; c_ext_out[k] = '0;
    end
    for (int i = 0; i < C17_WIRES; i++) s_c17[i] = FI_PASS;
    for (int i = 0; i < S27_WIRES; i++) c_s27[i] = FI_PASS;
    s27_fault(-1, 0);
    c17_fault(-1, 0);

    // ---------------- s27, 14,999 random vectors
    pat  = new[NVEC];
    good = new[2 * NVEC];
    for (int i = 0; i < NVEC; i++) pat[i] = 4'($urandom);
    for (int w = -1; w < S27_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        if (w == -1 && v == 1) continue;
        s27_fault(-1, 0);
        s_z = 21'b000010; #1;
        s_z = 21'b000000; #1;
        st = '{q5: 0, q6: 0, q7: 0, ck_prev: 0};
        st_ref = st;
        s27_fault(w, v[0]);
        #1;
        void'(s27_ref(6'b000000, st, w, v[0]));
        hit = 0; hit_ref = 0;
        for (int i = 0; i < 2 * NVEC; i++) begin
          logic [5:0] in;
          in = {pat[i/2], 1'b0, i[0]};
          s_z = {15'($urandom), in};
          #1;
          fref = s27_ref(in, st, w, v[0]);
          check("s27 OUT", 64'(s_out), 64'(fref));
          if (w == -1) good[i] = s_out[0];
          else begin
            if (s_out[0] !== good[i]) hit = 1;
            gref = s27_ref(in, st_ref);
            if (fref !== gref) hit_ref = 1;
          end
        end
        if (w >= 0) begin
          s_det += hit; s_det_ref += hit_ref;
          if (w != 4 && w != 5) s_det_data += hit;
          if (!hit) $display("s27 fault not detected: wire %0d stuck-at-%0d", w, v);
        end
      end
    end
    $display("s27 in SOC_SEQ: %0d of 38 faults detected by %0d random vectors (%0d.%02d %%); reported: 30 of 34 (88.23 %%)",
             s_det, NVEC, s_det * 100 / 38, (s_det * 10000 / 38) % 100);
    $display("s27 in SOC_SEQ, clock and reset faults left out: %0d of 34 faults detected (%0d.%02d %%)",
             s_det_data, s_det_data * 100 / 34, (s_det_data * 10000 / 34) % 100);
    check("s27 coverage, design against model", 64'(s_det), 64'(s_det_ref));

    // ---------------- c17, logged patterns
    cp = new[20];
    foreach (cp[i]) cp[i] = LOG[i][6:2];
    c17_run("logged", cp, det, det_ref);
    $display("c17 in SOC_COMB: %0d of 22 faults detected by the 20 logged patterns; reported: 22 of 22", det);
    check("c17 logged coverage", 64'(det), 64'd22);
    check("c17 logged coverage, model", 64'(det_ref), 64'd22);

    // ---------------- c17, 23 fresh random patterns
    cp = new[23];
    foreach (cp[i]) cp[i] = 5'($urandom);
    c17_run("random", cp, det, det_ref);
    $display("c17 in SOC_COMB: %0d of 22 faults detected by 23 random patterns", det);
    check("c17 random coverage, design against model", 64'(det), 64'(det_ref));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
