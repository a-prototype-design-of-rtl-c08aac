// readout_ref_pkg: reference model used by the readout testbenches. It keeps
// the waveform of every hit input and, at every main clock edge, works out
// what each delay line must capture there: tap i of a line holds the input
// level of (ENTRY + (i + 1) * T_tap) earlier, the code is the number of taps
// that are high, and a line reports when its tap 0 is high at this edge and
// was low at the one before. Reports of a channel's two lines are then paired
// as the averaging stage specifies (same edge: sum of codes; one edge apart:
// sum + TAPS_PER_CLK on the later edge; no partner: twice the code, single),
// giving the words the packaging stage must deliver, per channel, in order.
`timescale 1ps / 1fs
package readout_ref_pkg;

  typedef struct {
    int channel;
    int coarse;
    int fine;
    bit single;
    int kind;     // 0 same-clock pair, 1 skewed pair, 2 single
  } word_t;

  class readout_ref;
    int  nch;
    int  nt;
    int  p;
    real tau [2];
    real ent [2];
    // hit waveform per channel: times and levels of changes
    realtime ev_t [][$];
    bit      ev_v [][$];
    // per channel, per line: tap 0 at the previous edge
    bit      prev0 [][2];
    // per channel: held report
    bit      pend [];
    int      pend_line [];
    int      pend_code [];
    int      pend_coarse [];
    word_t   expect_q [][$];
    int      n_kind [3];

    function new(int nch_i, int nt_i, int p_i, real tau_a, real tau_b, real ent_a, real ent_b);
      nch = nch_i; nt = nt_i; p = p_i;
      tau[0] = tau_a; tau[1] = tau_b;
      ent[0] = ent_a; ent[1] = ent_b;
      ev_t = new[nch]; ev_v = new[nch]; prev0 = new[nch];
      pend = new[nch]; pend_line = new[nch]; pend_code = new[nch]; pend_coarse = new[nch];
      expect_q = new[nch];
      for (int c = 0; c < nch; c++) begin
        ev_t[c].push_back(-1.0e9);
        ev_v[c].push_back(1'b0);
        prev0[c][0] = 0; prev0[c][1] = 0;
        pend[c] = 0;
      end
    endfunction

    function void record(int c, realtime t, bit v);
      ev_t[c].push_back(t);
      ev_v[c].push_back(v);
      // forget what no tap can still hold
      while (ev_t[c].size() > 2 && ev_t[c][1] < t - 20000.0) begin
        void'(ev_t[c].pop_front());
        void'(ev_v[c].pop_front());
      end
    endfunction

    function bit level_at(int c, realtime t);
      bit v = ev_v[c][0];
      for (int k = 0; k < ev_t[c].size(); k++)
        if (ev_t[c][k] <= t) v = ev_v[c][k];
      return v;
    endfunction

    // called at clock edge time te; coarse is the count before that edge
    function void on_edge(realtime te, int coarse);
      for (int c = 0; c < nch; c++) begin
        bit det [2];
        int code [2];
        for (int l = 0; l < 2; l++) begin
          bit t0 = level_at(c, te - ent[l] - tau[l]);
          code[l] = 0;
          for (int i = 0; i < nt; i++)
            if (level_at(c, te - ent[l] - (i + 1) * tau[l])) code[l]++;
          det[l] = t0 && !prev0[c][l];
          prev0[c][l] = t0;
        end
        if (pend[c]) begin
          word_t w;
          w.channel = c;
          if (det[1 - pend_line[c]]) begin
            w.coarse = coarse; w.fine = pend_code[c] + code[1 - pend_line[c]] + p;
            w.single = 0; w.kind = 1;
          end else begin
            w.coarse = pend_coarse[c]; w.fine = 2 * pend_code[c]; w.single = 1; w.kind = 2;
          end
          expect_q[c].push_back(w);
          n_kind[w.kind]++;
          pend[c] = 0;
        end else if (det[0] && det[1]) begin
          word_t w;
          w.channel = c; w.coarse = coarse; w.fine = code[0] + code[1]; w.single = 0; w.kind = 0;
          expect_q[c].push_back(w);
          n_kind[0]++;
        end else if (det[0] || det[1]) begin
          pend[c] = 1;
          pend_line[c] = det[0] ? 0 : 1;
          pend_code[c] = code[pend_line[c]];
          pend_coarse[c] = coarse;
        end
      end
    endfunction
  endclass

endpackage
