// tb_apv_pkg: stimulus and reference model shared by the FED testbenches.
//
// It builds the sample stream a pair of multiplexed APV25s puts on one fibre
// (idle baseline with tick marks, then a frame: 3 start bits, 8 pipeline
// address bits and an active-low error bit per APV, interleaved sample by
// sample, followed by the 256 analogue samples in APV output order) and
// predicts, independently of the RTL, the bytes the front-end processing must
// produce for a frame: pedestal subtraction, median common mode per APV,
// cluster selection and 8-bit saturation, or the raw two-byte format.
package tb_apv_pkg;

  localparam int LOW_LVL  = 100;   // digital '0' on the fibre
  localparam int HIGH_LVL = 1000;  // digital '1'

  // physical strip of APV output index n
  function automatic int phys(int n);
    return 32 * (n % 4) + 8 * ((n / 4) % 4) + n / 16;
  endfunction

  // idle samples with a tick mark (two '1' samples) every 70 samples; the
  // stretch starts and ends with '0' samples so that a following header
  // stays separate from the last tick
  function automatic void add_idle(ref int q[$], input int nsamp);
    for (int i = 0; i < nsamp; i++)
      q.push_back(((i % 70) inside {10, 11} && i < nsamp - 3) ? HIGH_LVL : LOW_LVL);
  endfunction

  // one frame; raw[] is indexed by physical strip (apv*128 + strip)
  function automatic void add_frame(ref int q[$], input int pa0, input int pa1,
                                    input bit err0, input bit err1, input int raw[256]);
    for (int i = 0; i < 6; i++) q.push_back(HIGH_LVL);
    for (int b = 7; b >= 0; b--) begin
      q.push_back(((pa0 >> b) & 1) ? HIGH_LVL : LOW_LVL);
      q.push_back(((pa1 >> b) & 1) ? HIGH_LVL : LOW_LVL);
    end
    q.push_back(err0 ? LOW_LVL : HIGH_LVL);
    q.push_back(err1 ? LOW_LVL : HIGH_LVL);
    for (int j = 0; j < 256; j++) begin
      int a, n;
      a = j % 2; n = j / 2;
      q.push_back(raw[a * 128 + phys(n)]);
    end
  endfunction

  // random frame content: pedestals, common mode, a few clusters
  function automatic void make_raw(input int ped[256], input int nclus, output int raw[256],
                                   input int seed_cm);
    int cm [2];
    cm[0] = seed_cm % 40 - 20;
    cm[1] = (seed_cm / 7) % 40 - 20;
    for (int s = 0; s < 256; s++)
      raw[s] = ped[s] + cm[s / 128] + int'($urandom_range(0, 4)) - 2;
    for (int c = 0; c < nclus; c++) begin
      int s0, w, amp;
      s0 = int'($urandom_range(0, 250));
      w = int'($urandom_range(1, 4));
      amp = int'($urandom_range(10, 300));
      for (int k = 0; k < w; k++)
        if (s0 + k < 256) raw[s0 + k] += amp / (k + 1);
    end
    for (int s = 0; s < 256; s++) if (raw[s] > 1023) raw[s] = 1023; else if (raw[s] < 0) raw[s] = 0;
  endfunction

  // k-th smallest (k from 1) by counting, no sorting needed
  function automatic int kth(int v[$], int k);
    foreach (v[i]) begin
      int lt, le;
      lt = 0; le = 0;
      foreach (v[j]) begin
        if (v[j] < v[i]) lt++;
        if (v[j] <= v[i]) le++;
      end
      if (lt < k && k <= le) return v[i];
    end
    return 0;
  endfunction

  function automatic int median64(int v[$]);
    return kth(v, 64);
  endfunction

  // expected channel bytes of one frame
  function automatic void expect_bytes(ref byte unsigned q[$], input int raw[256],
                                       input int ped[256], input int low, input int high,
                                       input bit raw_mode);
    int v [256];
    if (raw_mode) begin
      for (int s = 0; s < 256; s++) begin
        q.push_back(byte'(raw[s] >> 8));
        q.push_back(byte'(raw[s] & 255));
      end
      return;
    end
    for (int a = 0; a < 2; a++) begin
      int t[$];
      int m;
      for (int s = 0; s < 128; s++) t.push_back(raw[a*128+s] - ped[a*128+s]);
      m = median64(t);
      for (int s = 0; s < 128; s++) v[a*128+s] = raw[a*128+s] - ped[a*128+s] - m;
    end
    for (int a = 0; a < 2; a++) begin
      bit keep [128];
      for (int s = 0; s < 128; s++) begin
        bit l, r;
        l = (s > 0)   && v[a*128+s-1] > low;
        r = (s < 127) && v[a*128+s+1] > low;
        keep[s] = (v[a*128+s] > high) || (v[a*128+s] > low && (l || r));
      end
      for (int s = 0; s < 128; s++) begin
        if (keep[s] && (s == 0 || !keep[s-1])) begin
          int e;
          e = s;
          while (e < 127 && keep[e+1]) e++;
          q.push_back(byte'(a*128 + s));
          q.push_back(byte'(e - s + 1));
          for (int k = s; k <= e; k++) begin
            int x;
            x = v[a*128+k];
            q.push_back(byte'((x < 0) ? 0 : (x > 255) ? 255 : x));
          end
        end
      end
    end
  endfunction

endpackage
