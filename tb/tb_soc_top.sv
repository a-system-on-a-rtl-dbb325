// tb_soc_top: end-to-end test session on the whole design at its default size.
//
// For each of the three systems-on-chip the testbench acts as the external tester
// of the methodology: it puts the SOC in normal mode and checks every core on its
// functional pins, then selects every core in turn through ENABLE in test mode and
// drives it through the Z bus, reading OUT. The cores that are not part of the
// design are stood in for by the testbench (their response is the inverse of what
// reaches them). For the built cores it runs a stuck-at fault simulation through
// the TAM: each single stuck-at fault is injected with the fault-select pins, the
// test patterns are applied on Z, OUT is compared with the reference model and
// with the fault-free response, and the fault coverage is counted. The c17
// patterns come from the on-chip ALFSR (five bits taken from its outputs at
// successive clocks); the s27 patterns are random, clocked through Z[0].
// Every mechanism of the design is counted and must occur at least once.
module tb_soc_top;
  import soc_pkg::*;
  import tb_ref_pkg::*;

  // ---------------- design pins
  logic [1:0]   mixed_enable;       logic [35:0]  mixed_z;     logic [6:0]  mixed_out;
  logic         mixed_test_mode;
  logic [35:0]  mixed_func_in [4];  logic [6:0]   mixed_func_out [4];
  logic [35:0]  mixed_ext_core_in [4];  logic [6:0] mixed_ext_core_out [4];
  fault_sel_e   mixed_c17_fsel [C17_WIRES];  fault_sel_e mixed_s27_fsel [S27_WIRES];
  logic [3:0]   comb_enable;        logic [156:0] comb_z;      logic [63:0] comb_out;
  logic         comb_test_mode;
  logic [156:0] comb_func_in [10];  logic [63:0]  comb_func_out [10];
  logic [156:0] comb_ext_core_in [10];  logic [63:0] comb_ext_core_out [10];
  fault_sel_e   comb_c17_fsel [C17_WIRES];
  logic [3:0]   seq_enable;         logic [20:0]  seq_z;       logic [18:0] seq_out;
  logic         seq_test_mode;
  logic [20:0]  seq_func_in [10];   logic [18:0]  seq_func_out [10];
  logic [20:0]  seq_ext_core_in [10];   logic [18:0] seq_ext_core_out [10];
  fault_sel_e   seq_s27_fsel [S27_WIRES];
  logic         lfsr_clk, lfsr_rst;
  logic [3:0]   lfsr_y;

  soc_top dut (.*);

  // ---------------- configuration tables (pin counts per core, in ENABLE order)
  localparam int NCS [3] = '{4, 10, 10};
  localparam int ZWS [3] = '{36, 157, 21};
  localparam int OWS [3] = '{7, 64, 19};
  localparam int IW [3][10] = '{'{6, 5, 5, 36, 0, 0, 0, 0, 0, 0},
                                '{5, 36, 41, 60, 41, 33, 157, 50, 32, 14},
                                '{6, 5, 11, 11, 5, 5, 20, 5, 21, 16}};
  localparam int OW [3][10] = '{'{1, 6, 2, 7, 0, 0, 0, 0, 0, 0},
                                '{2, 7, 32, 26, 32, 25, 64, 22, 31, 8},
                                '{1, 6, 11, 11, 6, 6, 1, 6, 19, 14}};
  localparam int C17_AT [3] = '{2, 0, -1};
  localparam int S27_AT [3] = '{0, -1, 0};
  localparam string NAME [3] = '{"SOC_MIXED", "SOC_COMB", "SOC_SEQ"};

  // stand-in for the cores outside the design
  always_comb begin
    for (int k = 0; k < 4; k++)  mixed_ext_core_out[k] = 7'(~mixed_ext_core_in[k]);
    for (int k = 0; k < 10; k++) comb_ext_core_out[k]  = 64'(~comb_ext_core_in[k]);
    for (int k = 0; k < 10; k++) seq_ext_core_out[k]   = 19'(~seq_ext_core_in[k]);
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_normal, n_select, n_ext, n_sa0, n_sa1, n_detect, n_undetect, n_clock, n_reset;
  int n_nosel, n_wrap, n_isolated;

  task automatic check(string what, logic [156:0] got, logic [156:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [156:0] mask(int w);
    logic [156:0] m = '0;
    for (int i = 0; i < w; i++) m[i] = 1'b1;
    return m;
  endfunction

  // ---------------- pin access by SOC index
  task automatic set_tam(int s, int en, logic [156:0] zz, logic tm);
    case (s)
      0: begin mixed_enable = 2'(en); mixed_z = 36'(zz);  mixed_test_mode = tm; end
      1: begin comb_enable  = 4'(en); comb_z  = zz;       comb_test_mode  = tm; end
      default: begin seq_enable = 4'(en); seq_z = 21'(zz); seq_test_mode  = tm; end
    endcase
  endtask

  function automatic logic [156:0] get_out(int s);
    case (s)
      0: return 157'(mixed_out);
      1: return 157'(comb_out);
      default: return 157'(seq_out);
    endcase
  endfunction

  task automatic set_func(int s, int k, logic [156:0] v);
    case (s)
      0: mixed_func_in[k] = 36'(v);
      1: comb_func_in[k]  = v;
      default: seq_func_in[k] = 21'(v);
    endcase
  endtask

  function automatic logic [156:0] get_func_out(int s, int k);
    case (s)
      0: return 157'(mixed_func_out[k]);
      1: return 157'(comb_func_out[k]);
      default: return 157'(seq_func_out[k]);
    endcase
  endfunction

  function automatic logic [156:0] get_ext_in(int s, int k);
    case (s)
      0: return 157'(mixed_ext_core_in[k]);
      1: return 157'(comb_ext_core_in[k]);
      default: return 157'(seq_ext_core_in[k]);
    endcase
  endfunction

  task automatic set_fault(int s, bit is_c17, int w, logic v);
    fault_sel_e f;
    for (int i = 0; i < C17_WIRES; i++) begin
      f = (is_c17 && i == w) ? (v ? FI_SA1 : FI_SA0) : FI_PASS;
      if (s == 0) mixed_c17_fsel[i] = f; else comb_c17_fsel[i] = f;
    end
    for (int i = 0; i < S27_WIRES; i++) begin
      f = (!is_c17 && i == w) ? (v ? FI_SA1 : FI_SA0) : FI_PASS;
      if (s == 0) mixed_s27_fsel[i] = f; else seq_s27_fsel[i] = f;
    end
    if (w >= 0) begin
      if (v) n_sa1++; else n_sa0++;
    end
  endtask

  function automatic logic [156:0] rnd();
    logic [156:0] r;
    for (int i = 0; i < 5; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic lfsr_tick();
    lfsr_clk = 1; #1; lfsr_clk = 0; #1;
  endtask

  // the wrapped cores other than the selected one must stay on their func pins
  task automatic check_isolation(int s, int sel);
    logic [156:0] v;
    for (int k = 0; k < NCS[s]; k++) begin
      if (k == sel || k == S27_AT[s]) continue;
      v = rnd();
      set_func(s, k, v);
      #1;
      if (k == C17_AT[s])
        check($sformatf("%s core %0d func_out", NAME[s], k), get_func_out(s, k), 157'(c17_ref(v[4:0])));
      else begin
        check($sformatf("%s core %0d ext_core_in", NAME[s], k), get_ext_in(s, k), v & mask(IW[s][k]));
        check($sformatf("%s core %0d func_out", NAME[s], k), get_func_out(s, k),
              ~(v & mask(IW[s][k])) & mask(OW[s][k]));
      end
      n_isolated++;
    end
  endtask

  // ---------------- c17 fault simulation through the TAM
  task automatic fault_sim_c17(int s, int k);
    logic [4:0] pat [24];
    logic [1:0] good [24];
    logic [156:0] zz;
    int det = 0, det_ref = 0;
    bit hit, hit_ref;
    // patterns from the on-chip ALFSR
    lfsr_rst = 1; lfsr_tick(); lfsr_rst = 0;
    for (int i = 0; i < 24; i++) begin
      logic [3:0] a;
      a = lfsr_y; lfsr_tick();
      pat[i] = {a, lfsr_y[3]};
    end
    for (int w = -1; w < C17_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        if (w == -1 && v == 1) continue;
        set_fault(s, 1, w, v[0]);
        hit = 0; hit_ref = 0;
        for (int i = 0; i < 24; i++) begin
          zz = rnd();
          zz[4:0] = pat[i];
          set_tam(s, k, zz, 1);
          #1;
          check($sformatf("%s c17 OUT wire %0d sa%0d", NAME[s], w, v), get_out(s), 157'(c17_ref(pat[i], w, v[0])));
          if (w == -1) good[i] = 2'(get_out(s));
          else begin
            if (2'(get_out(s)) !== good[i]) hit = 1;
            if (c17_ref(pat[i], w, v[0]) !== c17_ref(pat[i])) hit_ref = 1;
          end
        end
        if (w >= 0) begin
          det += hit; det_ref += hit_ref;
          if (hit) n_detect++; else n_undetect++;
        end
      end
    end
    set_fault(s, 1, -1, 0);
    $display("%s c17: %0d of 22 stuck-at faults detected by 24 ALFSR patterns (%0d%%)", NAME[s], det,
             det * 100 / 22);
    check($sformatf("%s c17 coverage", NAME[s]), 157'(det), 157'(det_ref));
  endtask

  // ---------------- s27 fault simulation through the TAM
  task automatic s27_apply(int s, int k, logic [5:0] v, int w, logic fval, ref s27_state_t st,
                           output logic o);
    logic [156:0] zz;
    zz = rnd();
    zz[5:0] = v;
    set_tam(s, k, zz, 1);
    #1;
    o = get_out(s)[0];
    check($sformatf("%s s27 OUT wire %0d sa%0d", NAME[s], w, fval), get_out(s), 157'(s27_ref(v, st, w, fval)));
    if (v[0]) n_clock++;
    if (v[1]) n_reset++;
  endtask

  task automatic fault_sim_s27(int s, int k, int nvec);
    logic [3:0] pat [];
    logic good [];
    s27_state_t st;
    logic o;
    int det = 0;
    bit hit;
    pat = new[nvec];
    good = new[2 * nvec];
    for (int i = 0; i < nvec; i++) pat[i] = 4'($urandom);
    for (int w = -1; w < S27_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        if (w == -1 && v == 1) continue;
        set_fault(s, 0, -1, 0);
        st = '{q5: 0, q6: 0, q7: 0, ck_prev: 0};
        s27_apply(s, k, 6'b000010, -1, 0, st, o);
        s27_apply(s, k, 6'b000000, -1, 0, st, o);
        // injecting a fault on CK or rst is itself an event for the flip-flops
        set_fault(s, 0, w, v[0]);
        #1;
        void'(s27_ref(6'b000000, st, w, v[0]));
        hit = 0;
        for (int i = 0; i < nvec; i++) begin
          s27_apply(s, k, {pat[i], 2'b00}, w, v[0], st, o);
          if (w == -1) good[2*i] = o; else if (o !== good[2*i]) hit = 1;
          s27_apply(s, k, {pat[i], 2'b01}, w, v[0], st, o);
          if (w == -1) good[2*i+1] = o; else if (o !== good[2*i+1]) hit = 1;
        end
        if (w >= 0) begin
          det += hit;
          if (hit) n_detect++; else n_undetect++;
        end
      end
    end
    set_fault(s, 0, -1, 0);
    $display("%s s27: %0d of 38 stuck-at faults detected by %0d random vectors", NAME[s], det, nvec);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_normal, n_select, n_ext, n_sa0, n_sa1, n_detect, n_undetect, n_clock, n_reset} = '0;
    {n_nosel, n_wrap, n_isolated} = '0;
    lfsr_clk = 0; lfsr_rst = 1;
    #1;
    for (int s = 0; s < 3; s++) begin
      set_fault(s, 1, -1, 0);
      set_fault(s, 0, -1, 0);
      for (int k = 0; k < NCS[s]; k++) set_func(s, k, '0);
      set_tam(s, 0, '0, 0);
    end
    #1;
    lfsr_tick();

    for (int s = 0; s < 3; s++) begin
      // ---- normal mode: every core on its functional pins, OUT quiet
      set_tam(s, 0, rnd(), 0);
      check_isolation(s, -1);
      check($sformatf("%s OUT in normal mode", NAME[s]), get_out(s), '0);
      n_normal++;
      // ---- test mode, every core in turn
      for (int k = 0; k < NCS[s]; k++) begin
        n_select++;
        if (k == C17_AT[s]) fault_sim_c17(s, k);
        else if (k == S27_AT[s]) fault_sim_s27(s, k, 60);
        else begin
          for (int i = 0; i < 10; i++) begin
            logic [156:0] zz;
            zz = rnd() & mask(ZWS[s]);
            set_tam(s, k, zz, 1);
            #1;
            check($sformatf("%s core %0d sees Z", NAME[s], k), get_ext_in(s, k), zz & mask(IW[s][k]));
            check($sformatf("%s core %0d on OUT", NAME[s], k), get_out(s),
                  ~(zz & mask(IW[s][k])) & mask(OW[s][k]));
            n_ext++;
          end
        end
        set_tam(s, k, rnd(), 1);
        check_isolation(s, k);
      end
      // ---- a select value with no core behind it (4-bit ENABLE, 10 cores)
      if (NCS[s] < 16 && s != 0) begin
        set_tam(s, 13, rnd(), 1);
        #1;
        check($sformatf("%s OUT with no core selected", NAME[s]), get_out(s), '0);
        check_isolation(s, -1);
        n_nosel++;
      end
    end

    // ---- ALFSR runs through its full period
    lfsr_rst = 1; lfsr_tick(); lfsr_rst = 0;
    for (int i = 1; i <= 30; i++) begin
      lfsr_tick();
      if (lfsr_y == 4'b0001) begin
        n_wrap++;
        check("ALFSR period", 157'(i % 15), '0);
      end
    end

    $display("mechanisms: normal=%0d select=%0d ext_core=%0d sa0=%0d sa1=%0d detected=%0d undetected=%0d",
             n_normal, n_select, n_ext, n_sa0, n_sa1, n_detect, n_undetect);
    $display("            s27_clock=%0d s27_reset=%0d no_core_selected=%0d lfsr_wrap=%0d isolated=%0d",
             n_clock, n_reset, n_nosel, n_wrap, n_isolated);
    if (n_normal == 0 || n_select != 24 || n_ext == 0 || n_sa0 == 0 || n_sa1 == 0 || n_detect == 0 ||
        n_clock == 0 || n_reset == 0 || n_nosel == 0 || n_wrap == 0 || n_isolated == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
