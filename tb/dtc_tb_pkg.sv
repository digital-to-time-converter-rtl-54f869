// Reference calculations shared by the DTC testbenches.
//
// expect_train() works out, element by element, the waveform at the output
// of a multiplexer delay line after the trigger rises: element i first
// switches from its pattern bit to the level of element i-1, then repeats
// every edge of element i-1 one element delay later (tplh for a rising edge,
// tphl for a falling one). A pulse whose two edges meet or cross inside an
// element has vanished and both edges are removed there. The result is the
// list of output edges, as times after the trigger edge and levels after the
// edge. This is an independent, stage-by-stage derivation of what the DTC
// delay line model computes in closed form.
package dtc_tb_pkg;
  localparam int unsigned MAXN = 256;

  typedef struct {
    longint t;
    bit     v;
  } edge_t;

  function automatic void expect_train(input logic [MAXN:0] p, input int n,
                                       input longint tplh, input longint tphl,
                                       ref edge_t out[$]);
    edge_t cur[$];
    edge_t nxt[$];
    edge_t e;
    cur = {};
    for (int i = 1; i <= n; i++) begin
      nxt = {};
      if (p[i-1] != p[i]) begin
        e.t = p[i-1] ? tplh : tphl;
        e.v = p[i-1];
        nxt.push_back(e);
      end
      foreach (cur[j]) begin
        e.t = cur[j].t + (cur[j].v ? tplh : tphl);
        e.v = cur[j].v;
        if (nxt.size() > 0 && e.t <= nxt[nxt.size()-1].t)
          void'(nxt.pop_back());
        else
          nxt.push_back(e);
      end
      cur = nxt;
    end
    out = cur;
  endfunction
endpackage
