// soc_pkg: types and constants shared by the SOC test architecture.
//
// fault_sel_e is the 2-bit select of a fault-injection cell: 00 and 11 leave the
// wire alone, 01 forces stuck-at-1, 10 forces stuck-at-0. The encoding is the
// one of the hardware fault-injection scheme this design follows.
//
// core_e lists the twenty ISCAS benchmark cores with their pin counts, and
// soc_kind_e names the configurations built from the same TAM and wrapper, with
// their cores in ENABLE order:
//   SOC_MIXED  s27, s298, c17, c432                          (ENABLE 2 bits, Z 36, OUT 7)
//   SOC_COMB   c17, c432, c499, c880, c1355, c1908, c2670,
//              c3540, c6288, c74181                          (ENABLE 4 bits, Z 157, OUT 64)
//   SOC_SEQ    s27, s298, s344, s349, s382, s400, s420,
//              s444, s820, s1196                             (ENABLE 4 bits, Z 21, OUT 19)
//   MIXED_1    s27, s298, s344, s349, c17, c1355, c1908      (ENABLE 3 bits, Z 41, OUT 32)
//   MIXED_2    s444, s820, c880, c3540                       (ENABLE 2 bits, Z 60, OUT 26)
//   MIXED_3    s420, s444, s820, c880, c3540, c6288, c74181  (ENABLE 3 bits, Z 60, OUT 31)
//   MIXED_4    s349, s382, c432, c499, c74181                (ENABLE 3 bits, Z 41, OUT 32)
// The constant functions below derive, per configuration, the number of cores,
// the pin counts of each core, the bus widths (Z as wide as the core with the
// most inputs, OUT as wide as the core with the most outputs), the ENABLE width
// (enough bits to number the cores) and the ENABLE value at which a given core
// sits. The core lists and pin counts are the methodology's; the core order of
// MIXED_1..MIXED_4 and their ENABLE widths are this design's choice.
package soc_pkg;

  typedef enum logic [1:0] {
    FI_PASS  = 2'b00,
    FI_SA1   = 2'b01,
    FI_SA0   = 2'b10,
    FI_PASS2 = 2'b11
  } fault_sel_e;

  // The benchmark cores the configurations are made of.
  typedef enum int {
    C17, C432, C499, C880, C1355, C1908, C2670, C3540, C6288, C74181,
    S27, S298, S344, S349, S382, S400, S420, S444, S820, S1196
  } core_e;

  // Input pins of a core (clock and reset included for the sequential ones)
  // and output pins, as they appear on the core's ports.
  function automatic int core_in_pins(core_e c);
    case (c)
      C17:  return 5;    C432:  return 36;   C499:  return 41;   C880:  return 60;
      C1355: return 41;  C1908: return 33;   C2670: return 157;  C3540: return 50;
      C6288: return 32;  C74181: return 14;
      S27:  return 6;    S298:  return 5;    S344:  return 11;   S349:  return 11;
      S382: return 5;    S400:  return 5;    S420:  return 20;   S444:  return 5;
      S820: return 21;   default: return 16;  // S1196
    endcase
  endfunction

  function automatic int core_out_pins(core_e c);
    case (c)
      C17:  return 2;    C432:  return 7;    C499:  return 32;   C880:  return 26;
      C1355: return 32;  C1908: return 25;   C2670: return 64;   C3540: return 22;
      C6288: return 31;  C74181: return 8;
      S27:  return 1;    S298:  return 6;    S344:  return 11;   S349:  return 11;
      S382: return 6;    S400:  return 6;    S420:  return 1;    S444:  return 6;
      S820: return 19;   default: return 14;  // S1196
    endcase
  endfunction

  // Configurations. The first three are the systems-on-chip of the full
  // architecture; MIXED_1..MIXED_4 are the further mixed systems it was
  // evaluated on.
  typedef enum int {
    SOC_MIXED = 0,
    SOC_COMB  = 1,
    SOC_SEQ   = 2,
    MIXED_1   = 3,
    MIXED_2   = 4,
    MIXED_3   = 5,
    MIXED_4   = 6
  } soc_kind_e;

  function automatic int num_cores(soc_kind_e k);
    case (k)
      SOC_MIXED: return 4;
      MIXED_1:   return 7;
      MIXED_2:   return 4;
      MIXED_3:   return 7;
      MIXED_4:   return 5;
      default:   return 10;
    endcase
  endfunction

  // Core at ENABLE value i of configuration k.
  function automatic core_e core_at(soc_kind_e k, int i);
    core_e mixed [4]  = '{S27, S298, C17, C432};
    core_e comb  [10] = '{C17, C432, C499, C880, C1355, C1908, C2670, C3540, C6288, C74181};
    core_e seq   [10] = '{S27, S298, S344, S349, S382, S400, S420, S444, S820, S1196};
    core_e m1    [7]  = '{S27, S298, S344, S349, C17, C1355, C1908};
    core_e m2    [4]  = '{S444, S820, C880, C3540};
    core_e m3    [7]  = '{S420, S444, S820, C880, C3540, C6288, C74181};
    core_e m4    [5]  = '{S349, S382, C432, C499, C74181};
    if (i < 0 || i >= num_cores(k)) return C17;
    case (k)
      SOC_MIXED: return mixed[i];
      SOC_COMB:  return comb[i];
      SOC_SEQ:   return seq[i];
      MIXED_1:   return m1[i];
      MIXED_2:   return m2[i];
      MIXED_3:   return m3[i];
      default:   return m4[i];
    endcase
  endfunction

  // Input and output pins of core i of configuration k (0 past the last core).
  function automatic int core_in_width(soc_kind_e k, int i);
    return (i < num_cores(k)) ? core_in_pins(core_at(k, i)) : 0;
  endfunction

  function automatic int core_out_width(soc_kind_e k, int i);
    return (i < num_cores(k)) ? core_out_pins(core_at(k, i)) : 0;
  endfunction

  // TAM widths: the largest input and output pin counts of the configuration.
  function automatic int tam_in_width(soc_kind_e k);
    int w = 1;
    for (int i = 0; i < num_cores(k); i++)
      if (core_in_width(k, i) > w) w = core_in_width(k, i);
    return w;
  endfunction

  function automatic int tam_out_width(soc_kind_e k);
    int w = 1;
    for (int i = 0; i < num_cores(k); i++)
      if (core_out_width(k, i) > w) w = core_out_width(k, i);
    return w;
  endfunction

  // ENABLE width: enough bits to number every core.
  function automatic int sel_width(soc_kind_e k);
    return (num_cores(k) > 1) ? $clog2(num_cores(k)) : 1;
  endfunction

  // ENABLE value of the first core of type c in configuration k, -1 if none.
  function automatic int slot_of(soc_kind_e k, core_e c);
    for (int i = 0; i < num_cores(k); i++)
      if (core_at(k, i) == c) return i;
    return -1;
  endfunction

  // Number of fault-injection cells (one per wire) in each of the two built cores.
  localparam int C17_WIRES = 11;
  localparam int S27_WIRES = 19;

  // Value of a wire after its fault-injection cell.
  function automatic logic inject(logic d, fault_sel_e sel);
    case (sel)
      FI_SA1:  return 1'b1;
      FI_SA0:  return 1'b0;
      default: return d;
    endcase
  endfunction

endpackage
