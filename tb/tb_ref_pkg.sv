// tb_ref_pkg: reference models used by the testbenches, written from the gate
// equations of the benchmark circuits and independent of the RTL structure.
//
// A fault is given as (wire index, stuck value); wire index -1 means fault-free.
// Wire numbering matches the fault-select numbering of the cores:
//   c17: 0-4 N1 N2 N3 N6 N7, 5-6 N22 N23, 7-10 N10 N11 N16 N19
//   s27: 0-5 G0 G1 G2 G3 rst CK, 6 G17, 7-18 G5 G10 G6 G11 G7 G13 G14 G8 G15 G12 G16 G9
// The s27 model is event based: each call applies one new input value, resets
// the state while the (possibly faulty) rst is high, otherwise advances it when
// the (possibly faulty) CK has risen since the previous call.
package tb_ref_pkg;

  function automatic logic fv(int fw, logic fval, int idx, logic v);
    return (fw == idx) ? fval : v;
  endfunction

  // in = {N1,N2,N3,N6,N7}, returns {N22,N23}
  function automatic logic [1:0] c17_ref(logic [4:0] in, int fw = -1, logic fval = 1'b0);
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19, n22, n23;
    n1  = fv(fw, fval, 0, in[4]);
    n2  = fv(fw, fval, 1, in[3]);
    n3  = fv(fw, fval, 2, in[2]);
    n6  = fv(fw, fval, 3, in[1]);
    n7  = fv(fw, fval, 4, in[0]);
    n10 = fv(fw, fval, 7,  !(n1 && n3));
    n11 = fv(fw, fval, 8,  !(n3 && n6));
    n16 = fv(fw, fval, 9,  !(n2 && n11));
    n19 = fv(fw, fval, 10, !(n11 && n7));
    n22 = fv(fw, fval, 5,  !(n10 && n16));
    n23 = fv(fw, fval, 6,  !(n16 && n19));
    return {n22, n23};
  endfunction

  typedef struct {
    logic q5, q6, q7;
    logic ck_prev;
  } s27_state_t;

  // in = {G0,G1,G2,G3,rst,CK}; returns G17 after applying the event.
  function automatic logic s27_ref(logic [5:0] in, ref s27_state_t st, input int fw = -1,
                                   input logic fval = 1'b0);
    logic g0, g1, g2, g3, rst, ck;
    logic g5, g6, g7, g8, g9, g10, g11, g12, g13, g14, g15, g16, g17;
    g0  = fv(fw, fval, 0, in[5]);
    g1  = fv(fw, fval, 1, in[4]);
    g2  = fv(fw, fval, 2, in[3]);
    g3  = fv(fw, fval, 3, in[2]);
    rst = fv(fw, fval, 4, in[1]);
    ck  = fv(fw, fval, 5, in[0]);
    // state update
    if (rst) begin
      st.q5 = 0; st.q6 = 0; st.q7 = 0;
    end else if (ck && !st.ck_prev) begin
      g5  = fv(fw, fval, 7, st.q5);
      g6  = fv(fw, fval, 9, st.q6);
      g7  = fv(fw, fval, 11, st.q7);
      g14 = fv(fw, fval, 13, !g0);
      g8  = fv(fw, fval, 14, g14 && g6);
      g12 = fv(fw, fval, 16, !(g1 || g7));
      g13 = fv(fw, fval, 12, !(g2 || g12));
      g15 = fv(fw, fval, 15, g12 || g8);
      g16 = fv(fw, fval, 17, g3 || g8);
      g9  = fv(fw, fval, 18, !(g16 && g15));
      g11 = fv(fw, fval, 10, !(g5 || g9));
      g10 = fv(fw, fval, 8, !(g14 || g11));
      st.q5 = g10; st.q6 = g11; st.q7 = g13;
    end
    st.ck_prev = ck;
    // output with the present state
    g5  = fv(fw, fval, 7, st.q5);
    g6  = fv(fw, fval, 9, st.q6);
    g7  = fv(fw, fval, 11, st.q7);
    g14 = fv(fw, fval, 13, !g0);
    g8  = fv(fw, fval, 14, g14 && g6);
    g12 = fv(fw, fval, 16, !(g1 || g7));
    g15 = fv(fw, fval, 15, g12 || g8);
    g16 = fv(fw, fval, 17, g3 || g8);
    g9  = fv(fw, fval, 18, !(g16 && g15));
    g11 = fv(fw, fval, 10, !(g5 || g9));
    g17 = fv(fw, fval, 6, !g11);
    return g17;
  endfunction

endpackage
