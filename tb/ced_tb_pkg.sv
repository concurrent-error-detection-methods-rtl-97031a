// Reference model shared by the testbenches: the flow table of the example
// burst-mode machine, its transition prediction function and the Berger
// check symbol, written from the specification and independent of the RTL
// covers, plus helpers that choose legal input bursts.
package ced_tb_pkg;

  typedef enum logic [1:0] {ST_S0 = 2'd0, ST_S1 = 2'd1, ST_S2 = 2'd2} sym_state_e;

  typedef struct packed {
    logic        ok;     // entry specified
    sym_state_e  nxt;
    logic [1:0]  xw;     // {x,w}
  } entry_t;

  // Flow table; col = {a,b,c,d}.
  function automatic entry_t flow(sym_state_e s, logic [3:0] col);
    entry_t e;
    e = '{ok: 1'b0, nxt: s, xw: 2'b00};
    unique case (s)
      ST_S0: unique case (col)
        4'b0000: e = '{1'b1, ST_S0, 2'b00};
        4'b1000: e = '{1'b1, ST_S0, 2'b01};
        4'b1001: e = '{1'b1, ST_S0, 2'b00};
        4'b1010: e = '{1'b1, ST_S2, 2'b00};
        4'b1100: e = '{1'b1, ST_S1, 2'b00};
        default: ;
      endcase
      ST_S1: unique case (col)
        4'b0000: e = '{1'b1, ST_S0, 2'b00};
        4'b1000: e = '{1'b1, ST_S1, 2'b10};
        4'b1001: e = '{1'b1, ST_S1, 2'b11};
        4'b1100: e = '{1'b1, ST_S1, 2'b00};
        default: ;
      endcase
      default: unique case (col)
        4'b1000: e = '{1'b1, ST_S2, 2'b00};
        4'b1001: e = '{1'b1, ST_S0, 2'b00};
        4'b1010: e = '{1'b1, ST_S2, 2'b00};
        4'b1011: e = '{1'b1, ST_S2, 2'b00};
        default: ;
      endcase
    endcase
    return e;
  endfunction

  // Transition prediction: 0 only inside the multi-bit burst of S2.
  function automatic logic tpf_ref(sym_state_e s, logic [3:0] col);
    return !(s == ST_S2 && (col == 4'b1000 || col == 4'b1011));
  endfunction

  // Berger check symbol of r = 2 information bits.
  function automatic logic [1:0] berger_ref(logic [1:0] info);
    logic [1:0] n;
    n = {1'b0, info[1]} + {1'b0, info[0]};
    return ~n;
  endfunction

  // State codes of the RTL machines.
  function automatic logic [1:0] code2(sym_state_e s);
    return (s == ST_S0) ? 2'b00 : (s == ST_S1) ? 2'b10 : 2'b01;
  endfunction
  function automatic logic [3:0] code_invf(sym_state_e s);
    return (s == ST_S0) ? 4'b0011 : (s == ST_S1) ? 4'b0110 : 4'b1001;
  endfunction

  // Choose the next burst target from a stable point, r is a random number.
  function automatic logic [3:0] pick_target(sym_state_e s, logic [3:0] col, int unsigned r);
    logic [3:0] t;
    t = col;
    unique case ({s, col})
      {ST_S0, 4'b0000}: t = 4'b1000;
      {ST_S0, 4'b1000}: unique case (r % 4)
                           0: t = 4'b0000;
                           1: t = 4'b1001;
                           2: t = 4'b1010;
                           default: t = 4'b1100;
                         endcase
      {ST_S0, 4'b1001}: t = 4'b1000;
      {ST_S1, 4'b1100}: t = 4'b1000;
      {ST_S1, 4'b1000}: t = (r % 2 == 0) ? 4'b1001 : 4'b0000;
      {ST_S1, 4'b1001}: t = 4'b1000;
      {ST_S2, 4'b1010}: t = 4'b1001;
      default: t = col;
    endcase
    return t;
  endfunction

endpackage
