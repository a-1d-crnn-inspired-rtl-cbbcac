// kws_model_pkg: behavioural model of the accelerator at the level of the
// layer program. It holds images of Buffer1, Buffer2, the Conv Output Buffer
// and the four weight SRAMs and executes one layer_t at a time with plain
// integer loops (no pipeline, no PE array), using the documented memory
// layouts and number formats. Testbenches compare the RTL against it.
package kws_model_pkg;
  import kws_pkg::*;
  import kws_ref_pkg::*;

  int mb1 [3200];          // bytes 0..255
  int mb2 [3200];
  int mco [1680];
  int wimg [4][2048][5];   // signed weights
  int scores [5];
  int cls;
  int n_scores;

  function automatic int rd(buf_e b, int a);
    a = a & 12'hFFF;
    unique case (b)
      BUF_1:   return (a < 3200) ? mb1[a] : 0;
      BUF_2:   return (a < 3200) ? mb2[a] : 0;
      default: return (a < 1680) ? mco[a] : 0;
    endcase
  endfunction

  function automatic void wr(buf_e b, int a, int v);
    a = a & 12'hFFF;
    unique case (b)
      BUF_1:   if (a < 3200) mb1[a] = v & 255;
      BUF_2:   if (a < 3200) mb2[a] = v & 255;
      default: if (a < 1680) mco[a] = v & 255;
    endcase
  endfunction

  function automatic buf_e other(buf_e b);
    return (b == BUF_1) ? BUF_2 : BUF_1;
  endfunction

  // weight (oc, c, k) of a CONV layer
  function automatic int conv_w(layer_t L, int oc, int c, int k);
    int addr;
    if (!L.k10) begin
      addr = int'(L.wbase) + (oc / 4) * int'(L.cin) + c;
      return wimg[oc % 4][addr][k];
    end else begin
      addr = int'(L.wbase) + (oc / 2) * int'(L.cin) + c;
      return (k < 5) ? wimg[2 * (oc % 2)][addr][k] : wimg[2 * (oc % 2) + 1][addr][k - 5];
    end
  endfunction

  function automatic void run_layer(layer_t L);
    int hb, vb, sh;
    hb = int'(L.hbl); vb = int'(L.vbl); sh = int'(L.shift);
    unique case (L.op)
      OP_CONV: begin
        int kt;
        kt = L.k10 ? 10 : 5;
        for (int oc = 0; oc < int'(L.cout); oc++)
          for (int p = 0; p < int'(L.lout); p++) begin
            int acc, y;
            acc = 0;
            for (int c = 0; c < int'(L.cin); c++)
              for (int k = 0; k < kt; k++)
                acc += ref_mult(s8(rd(L.src, int'(L.src_base) + c * int'(L.lin) + p * int'(L.stride) + k)),
                                conv_w(L, oc, c, k), hb, vb);
            y = sat8(acc >>> sh);
            if (L.relu && y < 0) y = 0;
            wr(L.dst, int'(L.dst_base) + oc * int'(L.lout) + p, y);
          end
      end
      OP_MAXPOOL, OP_AVGPOOL: begin
        for (int c = 0; c < int'(L.cin); c++)
          for (int p = 0; p < int'(L.lout); p++) begin
            int mx, sm, v;
            mx = -1000; sm = 0;
            for (int k = 0; k < int'(L.win); k++) begin
              v = s8(rd(L.src, int'(L.src_base) + c * int'(L.lin) + p * int'(L.stride) + k));
              if (v > mx) mx = v;
              sm += v;
            end
            wr(L.dst, int'(L.dst_base) + c * int'(L.lout) + p,
               (L.op == OP_MAXPOOL) ? mx : sat8((sm * int'(L.recip)) >>> 8));
          end
      end
      OP_LSTM: begin
        int nin, H;
        H = int'(L.cout);
        nin = int'(L.cin) + H;
        for (int t = 0; t < int'(L.lin); t++) begin
          buf_e hw, hr;
          hw = t[0] ? other(L.dst) : L.dst;
          hr = other(hw);
          for (int j = 0; j < H; j++) begin
            int acc [4], cp, cn, h, base;
            base = int'(L.dst_base) + 4 * j;
            for (int r = 0; r < 4; r++) begin
              acc[r] = 0;
              for (int i = 0; i < nin; i++) begin
                int xin;
                if (i < int'(L.cin)) xin = s8(rd(BUF_CO, int'(L.src_base) + i * int'(L.lin) + t));
                else xin = (t == 0) ? 0 : s8(rd(hr, int'(L.dst_base) + 4 * (i - int'(L.cin))));
                acc[r] += ref_mult(xin, wimg[r][int'(L.wbase) + (j / 5) * nin + i][j % 5], hb, vb);
              end
            end
            cp = (t == 0) ? 0 : (rd(hr, base + 2) | (s8(rd(hr, base + 3)) << 8));
            lstm_cell(acc[0], acc[1], acc[2], acc[3], sh, cp, cn, h);
            wr(hw, base, h);
            wr(hw, base + 1, 0);
            wr(hw, base + 2, cn);
            wr(hw, base + 3, cn >> 8);
          end
        end
      end
      OP_FC: begin
        n_scores = int'(L.cout);
        cls = 0;
        for (int k = 0; k < int'(L.cout); k++) begin
          int acc;
          acc = 0;
          for (int j = 0; j < int'(L.cin); j++)
            acc += ref_mult(s8(rd(L.src, int'(L.src_base) + 4 * j)), wimg[0][int'(L.wbase) + j][k], hb, vb);
          scores[k] = sat16(acc >>> sh);
          if (scores[k] > scores[cls]) cls = k;
        end
      end
      default: ;
    endcase
  endfunction

  // Pre-emphasis and 8-bit quantisation of one input sample.
  function automatic int preemph(int x, int prev, int qshift);
    return sat8((x - prev + (prev >>> 5)) >>> qshift);
  endfunction

  // A layer descriptor.
  function automatic layer_t mk(op_e op, logic k10, logic relu, int stride, buf_e src, buf_e dst,
                                int cin, int cout, int lin, int lout, int src_base,
                                int dst_base, int wbase, int shift, int hbl, int vbl,
                                int win, int recip);
    layer_t L;
    L = '0;
    L.op = op; L.k10 = k10; L.relu = relu; L.stride = 3'(stride);
    L.src = src; L.dst = dst; L.cin = 8'(cin); L.cout = 8'(cout);
    L.lin = 12'(lin); L.lout = 12'(lout); L.src_base = 12'(src_base);
    L.dst_base = 12'(dst_base); L.wbase = 11'(wbase); L.shift = 5'(shift);
    L.hbl = 3'(hbl); L.vbl = 4'(vbl); L.win = 4'(win); L.recip = 8'(recip);
    return L;
  endfunction

endpackage
