// tb_c17: c17 core with its fault-injection cells.
//  1. The 20 logged random test patterns of the c17 fault-simulation report, with
//     the fault-free responses printed there, {N1 N2 N3 N6 N7} -> {N22 N23}.
//  2. All 32 input vectors, fault-free and with each of the 22 single stuck-at
//     faults (11 wires x 2), against the reference model.
//  3. Fault coverage of the 20 logged patterns: each of the 22 faults must be
//     detected (output differs from the fault-free response) by at least one of
//     them, as the report gives 22 of 22 faults detected (100 %).
module tb_c17;
  import soc_pkg::*;
  import tb_ref_pkg::*;

  logic [4:0] in_dat;
  logic [1:0] out_dat;
  fault_sel_e fsel [C17_WIRES];
  int checks = 0, failures = 0;

  c17 dut (.in_dat(in_dat), .fsel(fsel), .out_dat(out_dat));

  // logged patterns: {inputs, outputs}
  localparam logic [6:0] LOG [20] = '{
    7'b01110_00, 7'b00010_00, 7'b01110_00, 7'b00001_01, 7'b01010_11,
    7'b10101_11, 7'b10000_00, 7'b00010_00, 7'b10101_11, 7'b10000_00,
    7'b11110_10, 7'b11101_11, 7'b01101_11, 7'b01011_11, 7'b01010_11,
    7'b11111_10, 7'b11011_11, 7'b00000_00, 7'b10000_00, 7'b01101_11};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_fault(int w, logic v);
    for (int i = 0; i < C17_WIRES; i++) fsel[i] = FI_PASS;
    if (w >= 0) fsel[w] = v ? FI_SA1 : FI_SA0;
  endtask

  initial begin
    int detected;
    bit hit;
    // 1. logged patterns
    set_fault(-1, 0);
    for (int t = 0; t < 20; t++) begin
      in_dat = LOG[t][6:2];
      #1;
      checks++;
      if (out_dat !== LOG[t][1:0]) begin
        failures++;
        $display("FAIL logged test %0d in=%b out=%b expected %b", t + 1, in_dat, out_dat, LOG[t][1:0]);
      end
    end
    // 2. exhaustive, every fault
    for (int w = -1; w < C17_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        if (w == -1 && v == 1) continue;
        set_fault(w, v[0]);
        for (int i = 0; i < 32; i++) begin
          in_dat = 5'(i);
          #1;
          checks++;
          if (out_dat !== c17_ref(in_dat, w, v[0])) begin
            failures++;
            $display("FAIL wire %0d sa%0d in=%b out=%b expected %b", w, v, in_dat, out_dat,
                     c17_ref(in_dat, w, v[0]));
          end
        end
      end
    end
    // 3. coverage of the logged patterns, detection measured on the DUT
    detected = 0;
    for (int w = 0; w < C17_WIRES; w++) begin
      for (int v = 0; v < 2; v++) begin
        hit = 0;
        set_fault(w, v[0]);
        for (int t = 0; t < 20; t++) begin
          in_dat = LOG[t][6:2];
          #1;
          if (out_dat !== LOG[t][1:0]) hit = 1;
        end
        if (hit) detected++;
      end
    end
    $display("c17: %0d of 22 stuck-at faults detected by the 20 logged patterns", detected);
    checks++;
    if (detected != 22) begin
      failures++;
      $display("FAIL fault coverage %0d/22", detected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
