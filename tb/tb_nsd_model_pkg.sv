// tb_nsd_model_pkg: reference model of the spike-based data reduction, used by
// the controller, unit and platform testbenches.
//
// The model works on whole sample sequences, not on clock cycles. Samples are
// stored per global channel ID (gid) and round r (the r-th sample of every
// channel). For one unit u it replays the algorithm channel by channel:
//   rounds 0..7               warm-up, nothing happens;
//   rounds 8..8+N-1           |NEO| summed, threshold = (sum >> log2 N) << 4;
//   later rounds              NEO[n] = x[n]^2 - x[n-4] x[n+4] with n = r-4;
//                             NEO > threshold starts a record that occupies the
//                             channel for rounds r+1..r+31.
// A record is: time stamp (r-4 mod 2^16), gid, then x[r-14..r+31] (46 samples).
// Records are produced in round order, then channel order, which is the order
// the hardware allocates and completes them. cap >= 0 models an output FIFO of
// cap blocks that is never read (later spikes are dropped); cap < 0 models one
// that never fills. Records whose last sample falls after the final round are
// counted as incomplete and not emitted.
package tb_nsd_model_pkg;

  class nsd_model;
    int nu, ch, win_log2, rounds;
    shortint smp[];                 // [r * nu * ch + gid]

    function new(int nu_i, int ch_i, int win_log2_i, int rounds_i);
      nu = nu_i; ch = ch_i; win_log2 = win_log2_i; rounds = rounds_i;
      smp = new[rounds * nu * ch];
    endfunction

    function shortint x(int gid, int r);
      return smp[r * nu * ch + gid];
    endfunction

    function void set(int gid, int r, shortint v);
      smp[r * nu * ch + gid] = v;
    endfunction

    function longint neo(int gid, int r);
      longint a, b, c;
      a = longint'(x(gid, r - 4));
      b = longint'(x(gid, r - 8));
      c = longint'(x(gid, r));
      return a * a - b * c;
    endfunction

    // Fills the samples: uniform noise of +-noise plus, per channel, spikes
    // (4-sample biphasic pulses) spaced gap_min..gap_max rounds apart.
    function void generate_signal(int noise, int gap_min, int gap_max, int first_spike);
      for (int gid = 0; gid < nu * ch; gid++) begin
        int next;
        next = first_spike + int'($urandom_range(gap_max - gap_min, 0));
        for (int r = 0; r < rounds; r++)
          set(gid, r, shortint'(int'($urandom_range(2 * noise, 0)) - noise));
        while (next + 4 < rounds) begin
          int amp;
          amp = int'($urandom_range(3000, 800));
          set(gid, next,     shortint'(int'(x(gid, next))     + amp));
          set(gid, next + 1, shortint'(int'(x(gid, next + 1)) - amp / 2));
          set(gid, next + 2, shortint'(int'(x(gid, next + 2)) - amp / 4));
          set(gid, next + 3, shortint'(int'(x(gid, next + 3)) - amp / 8));
          next += gap_min + int'($urandom_range(gap_max - gap_min, 0));
        end
      end
    endfunction

    // Fills the samples with a window of `period` samples per channel, holding
    // uniform noise of +-noise and one biphasic spike, repeated cyclically (a
    // stored window read over and over). The spike of channel gid sits at
    // offset 8 + (gid * 37) mod (period - 16) of every window.
    function void generate_cyclic(int noise, int period);
      shortint w[];
      w = new[period];
      for (int gid = 0; gid < nu * ch; gid++) begin
        int off, amp;
        off = 8 + (gid * 37) % (period - 16);
        amp = int'($urandom_range(3000, 800));
        foreach (w[i]) w[i] = shortint'(int'($urandom_range(2 * noise, 0)) - noise);
        w[off]     = shortint'(int'(w[off])     + amp);
        w[off + 1] = shortint'(int'(w[off + 1]) - amp / 2);
        w[off + 2] = shortint'(int'(w[off + 2]) - amp / 4);
        w[off + 3] = shortint'(int'(w[off + 3]) - amp / 8);
        for (int r = 0; r < rounds; r++) set(gid, r, w[r % period]);
      end
    endfunction

    function void run_unit(int u, int cap, ref logic [15:0] q[$],
                           output int nrec, output int ndrop, output int nincomplete,
                           output longint thr_out[]);
      longint sum[], thr[];
      int     busy_until[];
      int     alloc;
      int     n_win;
      n_win = 1 << win_log2;
      sum = new[ch]; thr = new[ch]; busy_until = new[ch];
      thr_out = new[ch];
      foreach (busy_until[i]) busy_until[i] = -1;
      nrec = 0; ndrop = 0; nincomplete = 0; alloc = 0;
      for (int r = 8; r < rounds; r++) begin
        for (int b = 0; b < ch; b++) begin
          int gid;
          longint v, a;
          gid = b * nu + u;
          if (r < 8 + n_win) begin
            v = neo(gid, r);
            a = (v < 0) ? -v : v;
            sum[b] = ((r == 8) ? 0 : sum[b]) + a;
            if (r == 8 + n_win - 1) begin
              thr[b] = (sum[b] >> win_log2) << 4;
              thr_out[b] = thr[b];
            end
            continue;
          end
          if (r <= busy_until[b]) continue;
          v = neo(gid, r);
          if (v > thr[b]) begin
            if (cap >= 0 && alloc >= cap) begin
              ndrop++;
              continue;
            end
            alloc++;
            busy_until[b] = r + 31;
            if (r + 31 < rounds) begin
              q.push_back(16'((r - 4) & 16'hFFFF));
              q.push_back(16'(gid));
              for (int k = r - 14; k <= r + 31; k++) q.push_back(16'(x(gid, k)));
              nrec++;
            end else begin
              nincomplete++;
            end
          end
        end
      end
    endfunction
  endclass

endpackage
