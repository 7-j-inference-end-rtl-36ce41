// Reference model of the ternary hybrid CNN/TCN, for the testbenches.
//
// Plain integer loops, written straight from the network equations rather
// than from the hardware's structure: 3x3 convolution with zero padding,
// 2x2 max pooling of the integer pre-activations, then the channel-wise
// two-threshold activation (y = -1 if z < t_lo, +1 if z >= t_hi, else 0);
// causal dilated 1D convolutions over the window of the last n CNN output
// vectors; the last layer's pre-activations are the class scores.
// Also generates random networks with the layer structure of the design's
// network (3x3 same-padded 2D layers with pooling down to 4x4, a valid 3x3
// layer with pooling to 1x1, three causal 1D layers of kernel size 2 with
// dilations 1, 2, 4, and a final valid 1D layer spanning the window).
package tnn_ref_pkg;
  import cutie_pkg::*;

  localparam int MC = 96, MW = 64, ML = 9, MT = 24;

  int w   [ML][MC][TAPS][MC];   // layer, output channel, tap, input channel
  int tlo [ML][MC];
  int thi [ML][MC];
  layer_cfg_t lc [ML];
  int n_layers;

  int fm   [MC][MW][MW];        // feature map: channel, y, x
  int zt   [MC][MW][MW];
  int hist [MT][MC];            // TCN buffer model
  int hist_wp;
  int seq  [MW][MC];
  int scores [MC];

  function automatic int act(int z, int lo, int hi);
    if (z < lo) return -1;
    if (z >= hi) return 1;
    return 0;
  endfunction

  function automatic int rnd_tern();
    int r;
    r = int'($urandom % 3);
    return r - 1;
  endfunction

  function automatic void reset_hist();
    for (int t = 0; t < MT; t++) for (int c = 0; c < MC; c++) hist[t][c] = 0;
    hist_wp = 0;
  endfunction

  // Random network for an input of width in_w (a power of two >= 4) with
  // c_in input frames, n_ch channels and a TCN window of n_tcn vectors.
  function automatic void gen_network(int in_w, int c_in, int n_ch, int n_tcn, int first_out);
    int l, wdt;
    l = 0; wdt = in_w;
    while (wdt > 4) begin
      lc[l] = '0; lc[l].pad_same = 1; lc[l].pool = 1; lc[l].in_w = 7'(wdt);
      l++; wdt = wdt / 2;
    end
    lc[l] = '0; lc[l].pad_same = 0; lc[l].pool = 1; lc[l].to_tcn = 1; lc[l].in_w = 7'(wdt); l++;
    for (int d = 1; d <= 4; d = d * 2) begin
      lc[l] = '0; lc[l].is_1d = 1; lc[l].pad_same = 1; lc[l].ksize = 5'd2; lc[l].dil = 5'(d);
      lc[l].in_w = 7'(n_tcn); lc[l].src_tcn = (d == 1); l++;
    end
    lc[l] = '0; lc[l].is_1d = 1; lc[l].pad_same = 0; lc[l].ksize = 5'(n_tcn); lc[l].dil = 5'd1;
    lc[l].in_w = 7'(n_tcn); lc[l].last = 1; l++;
    n_layers = l;
    for (int ly = 0; ly < n_layers; ly++)
      for (int o = 0; o < MC; o++) begin
        int n_out, n_in;
        n_out = (ly == 0) ? first_out : n_ch;
        n_in  = (ly == 0) ? c_in : n_ch;
        for (int t = 0; t < TAPS; t++)
          for (int i = 0; i < MC; i++) begin
            w[ly][o][t][i] = 0;
            if (o < n_out && i < n_in && (!lc[ly].is_1d || t < int'(lc[ly].ksize))) w[ly][o][t][i] = rnd_tern();
          end
        if (o < n_out) begin
          tlo[ly][o] = -1 - int'($urandom % 3);
          thi[ly][o] =  1 + int'($urandom % 3);
        end else begin
          tlo[ly][o] = 0;
          thi[ly][o] = 1;
        end
      end
  endfunction

  // Run the whole network on fm (input frames in channels 0..c_in-1).
  function automatic void run(int n_ch);
    for (int ly = 0; ly < n_layers; ly++) begin
      layer_cfg_t c;
      c = lc[ly];
      if (!c.is_1d) begin
        int wi, wo, off, wp;
        wi = int'(c.in_w);
        off = c.pad_same ? -1 : 0;
        wo = c.pad_same ? wi : wi - 2;
        for (int o = 0; o < n_ch; o++)
          for (int y = 0; y < wo; y++)
            for (int x = 0; x < wo; x++) begin
              int z;
              z = 0;
              for (int r = 0; r < 3; r++)
                for (int q = 0; q < 3; q++) begin
                  int yy, xx;
                  yy = y + r + off; xx = x + q + off;
                  if (yy >= 0 && yy < wi && xx >= 0 && xx < wi)
                    for (int i = 0; i < n_ch; i++) z += w[ly][o][3 * r + q][i] * fm[i][yy][xx];
                end
              zt[o][y][x] = z;
            end
        wp = wo;
        if (c.pool) begin
          wp = wo / 2;
          for (int o = 0; o < n_ch; o++)
            for (int y = 0; y < wp; y++)
              for (int x = 0; x < wp; x++) begin
                int m;
                m = zt[o][2 * y][2 * x];
                if (zt[o][2 * y][2 * x + 1] > m) m = zt[o][2 * y][2 * x + 1];
                if (zt[o][2 * y + 1][2 * x] > m) m = zt[o][2 * y + 1][2 * x];
                if (zt[o][2 * y + 1][2 * x + 1] > m) m = zt[o][2 * y + 1][2 * x + 1];
                zt[o][y][x] = m;
              end
        end
        for (int o = 0; o < MC; o++)
          for (int y = 0; y < MW; y++)
            for (int x = 0; x < MW; x++)
              fm[o][y][x] = (o < n_ch && y < wp && x < wp) ? act(zt[o][y][x], tlo[ly][o], thi[ly][o]) : 0;
        if (c.to_tcn) begin
          for (int o = 0; o < MC; o++) hist[hist_wp][o] = fm[o][0][0];
          hist_wp = (hist_wp + 1) % MT;
        end
      end else begin
        int n, k, d, tout, shift;
        n = int'(c.in_w); k = int'(c.ksize); d = int'(c.dil);
        for (int t = 0; t < n; t++)
          for (int i = 0; i < MC; i++)
            seq[t][i] = c.src_tcn ? hist[(hist_wp - n + t + 2 * MT) % MT][i] : fm[i][0][t];
        tout  = c.pad_same ? n : n - (k - 1) * d;
        shift = c.pad_same ? 0 : (k - 1) * d;
        for (int o = 0; o < n_ch; o++)
          for (int t = 0; t < tout; t++) begin
            int z;
            z = 0;
            for (int j = 0; j < k; j++) begin
              int ts;
              ts = t + shift - d * (k - 1 - j);
              if (ts >= 0) for (int i = 0; i < n_ch; i++) z += w[ly][o][j][i] * seq[ts][i];
            end
            zt[o][0][t] = z;
          end
        if (c.last) begin
          for (int o = 0; o < MC; o++) scores[o] = (o < n_ch) ? zt[o][0][0] : 0;
          return;
        end
        for (int o = 0; o < MC; o++)
          for (int t = 0; t < MW; t++)
            fm[o][0][t] = (o < n_ch && t < tout) ? act(zt[o][0][t], tlo[ly][o], thi[ly][o]) : 0;
      end
    end
  endfunction

  function automatic tern_t to_tern(int v);
    if (v > 0) return T_POS;
    if (v < 0) return T_NEG;
    return T_ZERO;
  endfunction

endpackage
