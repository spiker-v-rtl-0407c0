// spiker_ref_pkg - behavioural reference model of the LIF network, for the
// testbenches. It is written from the neuron rules alone (leak by arithmetic
// shift, integration of the weight rows of active inputs in ascending input
// order with saturation, fire at or above threshold, reset to zero), in plain
// integer arithmetic, and also predicts the step length in clocks:
// a layer that receives n input spikes takes n + 4 clocks (3 when n = 0).
package spiker_ref_pkg;

  localparam int MAXN = 1024;
  localparam int MAXL = 8;
  typedef bit [MAXN-1:0] vec_t;

  class lif_ref;
    int n_in, n_hid, n_layers, n_out, ww, vw, th, ls;
    int v [MAXL][MAXN];
    bit sat;          // some addition of the last step saturated
    int cycles;       // predicted length of the last step
    int spikes_in [MAXL];

    function new(int n_in, int n_hid, int num_hidden, int n_out, int ww, int vw, int th, int ls);
      this.n_in = n_in; this.n_hid = n_hid; this.n_layers = num_hidden + 1;
      this.n_out = n_out; this.ww = ww; this.vw = vw; this.th = th; this.ls = ls;
      clear();
    endfunction

    function void clear();
      foreach (v[l, j]) v[l][j] = 0;
    endfunction

    function int weight(int l, int i, int j);
      int w;
      w = spiker_pkg::weight_value(l, i, j);
      w = (w <<< (32 - ww)) >>> (32 - ww);
      return w;
    endfunction

    // one layer, exposed so layer-level tests can use it
    function vec_t layer_step(int l, int nin, int nout, vec_t in);
      vec_t out;
      int vmax, vmin, s, n;
      vmax = (1 <<< (vw - 1)) - 1;
      vmin = -(1 <<< (vw - 1));
      out = '0;
      n = 0;
      for (int j = 0; j < nout; j++) v[l][j] = v[l][j] - (v[l][j] >>> ls);
      for (int i = 0; i < nin; i++) begin
        if (in[i]) begin
          n++;
          for (int j = 0; j < nout; j++) begin
            s = v[l][j] + weight(l, i, j);
            if (s > vmax) begin s = vmax; sat = 1; end
            if (s < vmin) begin s = vmin; sat = 1; end
            v[l][j] = s;
          end
        end
      end
      for (int j = 0; j < nout; j++) begin
        if (v[l][j] >= th) begin
          out[j] = 1'b1;
          v[l][j] = 0;
        end
      end
      spikes_in[l] = n;
      cycles += (n == 0) ? 3 : n + 4;
      return out;
    endfunction

    function vec_t step(vec_t in);
      vec_t cur;
      cur = in;
      sat = 0;
      cycles = 0;
      for (int l = 0; l < n_layers; l++) begin
        cur = layer_step(l, (l == 0) ? n_in : n_hid, (l == n_layers - 1) ? n_out : n_hid, cur);
      end
      return cur;
    endfunction
  endclass

endpackage
