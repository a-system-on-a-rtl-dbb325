// tb_s27: s27 core with its fault-injection cells, clocked through its CK input bit.
// For the fault-free core and for each of the 38 single stuck-at faults
// (19 wires x 2): reset the core fault-free, inject the fault, then apply 200
// random input vectors, each as a CK-low phase and a CK-high phase, and compare
// G17 after every event with the reference model. A few directed checks pin the
// reset value and the one-cycle state delay. Fault coverage of the sequence is
// printed.
module tb_s27;
  import soc_pkg::*;
  import tb_ref_pkg::*;

  logic [5:0] in_dat;   // {G0,G1,G2,G3,rst,CK}
  logic       out_dat;
  fault_sel_e fsel [S27_WIRES];
  int checks = 0, failures = 0;

  s27 dut (.in_dat(in_dat), .fsel(fsel), .out_dat(out_dat));

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_fault(int w, logic v);
    for (int i = 0; i < S27_WIRES; i++) fsel[i] = FI_PASS;
    if (w >= 0) fsel[w] = v ? FI_SA1 : FI_SA0;
  endtask

  // apply one input value, compare, return whether the output differed from good
  task automatic step(logic [5:0] v, int w, logic fval, ref s27_state_t st, output logic o);
    logic exp;
    in_dat = v;
    #1;
    exp = s27_ref(v, st, w, fval);
    o = out_dat;
    checks++;
    if (out_dat !== exp) begin
      failures++;
      $display("FAIL wire %0d sa%0d in=%b out=%b expected %b", w, fval, v, out_dat, exp);
    end
  endtask

  initial begin
    s27_state_t st;
    logic o;
    logic [3:0] pat [200];
    logic good [400];
    int detected = 0;
    bit hit;

    #1;
    for (int i = 0; i < 200; i++) pat[i] = 4'($urandom);

    // directed: after reset all flip-flops are 0, so with G0=1 (G14=0, G8=0),
    // G1=1 (G12=0), G3=0: G16=0, G9=1, G11=0, G17=1.
    set_fault(-1, 0);
    in_dat = 6'b000010; #1; in_dat = 6'b000000; #1;
    in_dat = 6'b110000; #1;
    checks++;
    if (out_dat !== 1'b1) begin failures++; $display("FAIL directed reset value"); end
    // G0=0,G3=1 -> G14=1, G16=1; G1=1 -> G12=0, G15=G8=G14&G6=0 -> G9=1, G11=0 -> G17=1.
    // One CK edge stores G11=0 in G6, G10=NOR(1,0)=0 in G5: output stays 1.
    in_dat = 6'b010100; #1; in_dat = 6'b010101; #1;
    checks++;
    if (out_dat !== 1'b1) begin failures++; $display("FAIL directed after one clock"); end

    for (int w = -1; w < S27_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        if (w == -1 && v == 1) continue;
        // fault-free reset, CK low
        set_fault(-1, 0);
        st = '{q5: 0, q6: 0, q7: 0, ck_prev: 0};
        step(6'b000010, -1, 0, st, o);
        step(6'b000000, -1, 0, st, o);
        // inject, then run
        // injecting a fault on CK or rst is itself an event for the flip-flops
        set_fault(w, v[0]);
        #1;
        void'(s27_ref(6'b000000, st, w, v[0]));
        hit = 0;
        for (int i = 0; i < 200; i++) begin
          step({pat[i], 2'b00}, w, v[0], st, o);
          if (w == -1) good[2*i] = o; else if (o !== good[2*i]) hit = 1;
          step({pat[i], 2'b01}, w, v[0], st, o);
          if (w == -1) good[2*i+1] = o; else if (o !== good[2*i+1]) hit = 1;
        end
        if (w >= 0 && hit) detected++;
      end
    end
    $display("s27: %0d of 38 stuck-at faults detected by 200 random vectors", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
