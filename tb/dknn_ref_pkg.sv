// dknn_ref_pkg: software reference model of the DKNN classifier, used by the
// testbenches to compute expected predictions independently of the RTL.
//
// The model keeps the training set in plain arrays and follows the algorithm
// directly: ideal resolution check, masked Manhattan distances, the K nearest
// (ties: lower training index first), neighbour counts per label, a ranking by
// (count desc, nearest-neighbour bit array desc, label asc), and the
// replacement of the nearest neighbour with the first wrong label.
package dknn_ref_pkg;

  class dknn_ref;
    int M, K, N;
    int feat[][];
    int label[];
    // results of the last classify()
    int nn_idx[$];
    int rank[$];
    bit ideal, nofault;
    int stalls;

    function new(int m, int k, int n);
      M = m; K = k; N = n;
      feat = new[N];
      label = new[N];
      foreach (feat[i]) feat[i] = new[M];
    endfunction

    function void classify(int tv[]);
      int nz, last, cnt[], hit[], d[], order[$];
      nz = 0; last = 0;
      for (int m = 0; m < M; m++) if (tv[m] != 0) begin nz++; last = m; end
      nofault = (nz == 0);
      ideal   = (nz == 1);
      rank.delete(); nn_idx.delete(); stalls = 0;
      if (nofault) return;
      if (ideal) begin rank.push_back(last); return; end
      d = new[N];
      for (int n = 0; n < N; n++) begin
        if (tv[label[n]] == 0) begin stalls++; continue; end
        d[n] = 0;
        for (int m = 0; m < M; m++) d[n] += (tv[m] > feat[n][m]) ? tv[m] - feat[n][m] : feat[n][m] - tv[m];
        // insert keeping (distance, index) order
        begin
          automatic int pos = order.size();
          for (int j = 0; j < order.size(); j++) if (d[n] < d[order[j]]) begin pos = j; break; end
          order.insert(pos, n);
        end
      end
      for (int j = 0; j < K && j < order.size(); j++) nn_idx.push_back(order[j]);
      cnt = new[M]; hit = new[M];
      foreach (nn_idx[j]) begin
        cnt[label[nn_idx[j]]]++;
        hit[label[nn_idx[j]]] += 1 << (K - 1 - j);
      end
      for (int l = 0; l < M; l++) begin
        automatic int pos = rank.size();
        for (int j = 0; j < rank.size(); j++)
          if (cnt[l] > cnt[rank[j]] || (cnt[l] == cnt[rank[j]] && hit[l] > hit[rank[j]])) begin
            pos = j; break;
          end
        rank.insert(pos, l);
      end
    endfunction

    // After the true label was found at rank position `tries` (> 0):
    // returns the replaced training index, or -1.
    function int learn(int tv[], int true_label);
      foreach (nn_idx[j]) if (label[nn_idx[j]] == rank[0]) begin
        int idx = nn_idx[j];
        for (int m = 0; m < M; m++) feat[idx][m] = tv[m];
        label[idx] = true_label;
        return idx;
      end
      return -1;
    endfunction
  endclass

endpackage
