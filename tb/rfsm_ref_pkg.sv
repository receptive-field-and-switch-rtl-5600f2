// rfsm_ref_pkg: reference arithmetic for the RFSM testbenches.
//
// Computes what a fused layer group must produce, straight from the
// definition of an unpadded convolution followed by the reverse clipper
// (negative -> 0, then >> shift), optional 2x2 max pooling and the
// bidirectional clipper (0..255). Tensors are flat arrays in
// (y*W + x)*C + c order. It also gives the physical crossbar, row and
// column that hold a weight under the documented allocation order, so a
// testbench can program weights through the host port.
package rfsm_ref_pkg;
  import rfsm_pkg::*;

  typedef int q_t[$];

  // one conv layer: in (h x w x ci) -> out ((h-k)/s+1 x ... x co), weights
  // wt[((ky*k + kx)*ci + c)*co + o]
  function automatic q_t conv_layer(q_t in, int h, int w, int ci, int k, int s, int co,
                                    q_t wt, int shift, output int oh, output int ow);
    q_t o;
    oh = (h - k) / s + 1;
    ow = (w - k) / s + 1;
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int oc = 0; oc < co; oc++) begin
          automatic int acc = 0;
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++)
              for (int c = 0; c < ci; c++)
                acc += in[((y*s + ky)*w + (x*s + kx))*ci + c] * wt[((ky*k + kx)*ci + c)*co + oc];
          o.push_back(acc < 0 ? 0 : (acc >>> shift));
        end
    return o;
  endfunction

  function automatic q_t pool_clip(q_t in, int h, int w, int c, bit pool, output int oh, output int ow);
    q_t o;
    oh = pool ? h / 2 : h;
    ow = pool ? w / 2 : w;
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int ch = 0; ch < c; ch++) begin
          automatic int m;
          if (pool) begin
            m = in[((2*y)*w + 2*x)*c + ch];
            if (in[((2*y)*w + 2*x+1)*c + ch] > m) m = in[((2*y)*w + 2*x+1)*c + ch];
            if (in[((2*y+1)*w + 2*x)*c + ch] > m) m = in[((2*y+1)*w + 2*x)*c + ch];
            if (in[((2*y+1)*w + 2*x+1)*c + ch] > m) m = in[((2*y+1)*w + 2*x+1)*c + ch];
          end else m = in[(y*w + x)*c + ch];
          o.push_back(m > 255 ? 255 : m);
        end
    return o;
  endfunction

  // physical location of weight (layer l, position p, ky, kx, c, o)
  function automatic void weight_loc(group_cfg_t cfg, int l, int p, int ky, int kx, int c, int o,
                                     output int xb, output int row, output int col,
                                     input int R = XB_ROWS, input int C = XB_COLS);
    group_geom_t geo = group_geom(cfg);
    int base = 0;
    int k, ci, co, nv, nh, lr;
    for (int m = 1; m < l; m++) begin
      automatic int km = cfg.layer[m-1].k;
      base += geo.g[m] * geo.g[m] * ((km*km*geo.ch[m-1] + R - 1) / R) *
              ((geo.ch[m] + C - 1) / C);
    end
    k  = cfg.layer[l-1].k;
    ci = geo.ch[l-1];
    co = geo.ch[l];
    nv = (k*k*ci + R - 1) / R;
    nh = (co + C - 1) / C;
    lr = (ky*k + kx)*ci + c;
    xb  = base + (p*nh + o / C)*nv + lr / R;
    row = lr % R;
    col = o % C;
  endfunction
endpackage
