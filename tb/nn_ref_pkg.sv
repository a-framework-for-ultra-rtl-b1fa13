// Reference model of the AFib network for the testbenches.
//
// Computes the network with plain integer arithmetic, layer by layer on whole
// sequences, independently of the streaming hardware: valid convolution with
// stride, SBBN as (acc * 2^e) + bias saturated to the layer's BN width, global
// max pooling after the last convolution's SBBN, and ReLU N as
// clamp(floor(z / 256), 0, 15).
package nn_ref_pkg;
  import afib_pkg::*;

  typedef int seq_t[$];
  typedef seq_t chan_t[$];

  function automatic int sat(longint v, int bits);
    longint mx = (longint'(1) <<< (bits - 1)) - 1;
    longint mn = -(longint'(1) <<< (bits - 1));
    if (v > mx) return int'(mx);
    if (v < mn) return int'(mn);
    return int'(v);
  endfunction

  function automatic int relu(int z);
    automatic int s = z >>> RELU_RSH;
    if (s < 0) return 0;
    if (s > 15) return 15;
    return s;
  endfunction

  // Random trit in the {neg,nz} encoding.
  function automatic trit_t rand_trit();
    case ($urandom_range(2))
      0: return 2'b00;
      1: return 2'b01;
      default: return 2'b11;
    endcase
  endfunction

  // Valid convolution of one output channel (weights w[c][k]).
  function automatic seq_t conv1d(chan_t xin, int w[][], int k_len, int stride);
    seq_t r;
    automatic int len = (xin[0].size() - k_len) / stride + 1;
    for (int j = 0; j < len; j++) begin
      automatic int acc = 0;
      for (int c = 0; c < xin.size(); c++)
        for (int k = 0; k < k_len; k++)
          acc += w[c][k] * xin[c][j*stride + k];
      r.push_back(acc);
    end
    return r;
  endfunction

  // One stage of the network, parameters taken from the flat trit vector.
  function automatic chan_t stage(chan_t xin, logic [N_TRITS-1:0][1:0] p, int l, bit pool);
    chan_t outc;
    automatic int ci = L_CIN[l], co = L_COUT[l], kk = L_K[l];
    automatic int base = layer_base(l), nw = co * ci * kk;
    for (int o = 0; o < co; o++) begin
      int w[][];
      seq_t a, z;
      int e, b;
      w = new[ci];
      for (int c = 0; c < ci; c++) begin
        w[c] = new[kk];
        for (int k = 0; k < kk; k++) w[c][k] = trit_val(p[base + (o*ci + c)*kk + k]);
      end
      a = conv1d(xin, w, kk, L_S[l]);
      e = bt2({p[base + nw + 2*o + 1], p[base + nw + 2*o]}) + 4;
      b = bt4({p[base + nw + 2*co + 4*o + 3], p[base + nw + 2*co + 4*o + 2],
               p[base + nw + 2*co + 4*o + 1], p[base + nw + 2*co + 4*o]});
      foreach (a[j]) z.push_back(sat((longint'(a[j]) <<< e) + b, L_ACCW[l] + BN_GROW));
      if (pool) begin
        automatic int m = z[0];
        foreach (z[j]) if (z[j] > m) m = z[j];
        z = {m};
      end
      foreach (z[j]) z[j] = relu(z[j]);
      outc.push_back(z);
    end
    return outc;
  endfunction

  function automatic chan_t network(seq_t xin, logic [N_TRITS-1:0][1:0] p);
    chan_t a;
    a.push_back(xin);
    for (int l = 0; l < N_LAYERS; l++) a = stage(a, p, l, l == 3);
    return a;
  endfunction
endpackage
