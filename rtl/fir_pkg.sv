// fir_pkg: constants, types and elaboration-time helpers shared by the
// coefficient-ordered FIR filter cores (direct form and transpose direct form).
//
// Contents:
//  * the default filter: 24 taps, 16-bit data and coefficients (as specified
//    for the evaluated filter); the coefficient values themselves are this
//    design's own choice (see LP24 below),
//  * the coefficient processing orders: the normal order 0..N-1 and a
//    minimum-Hamming-distance order, built greedily,
//  * the sizing rules of the transpose-form partial-sum ring (accu_ring),
//    whose depth grows when coefficients are processed out of order.
// All functions are constant functions used to compute parameters; none of
// them becomes hardware.
package fir_pkg;

  localparam int N_TAPS   = 24;   // filter length of the evaluated filter
  localparam int DATA_W   = 16;   // data and coefficient wordlength
  localparam int IDX_W    = 8;    // width of one LUT entry (coefficient index)
  localparam int MAX_TAPS = 128;  // largest N the helper functions accept
  localparam int MAX_W    = 32;   // largest W the helper functions accept

  // Processing order of the coefficients.
  typedef enum logic {
    ORDER_NORM = 1'b0,  // h0, h1, ..., h(N-1)
    ORDER_MIN  = 1'b1   // successive coefficients at minimum Hamming distance
  } order_e;

  // Control bundle of the direct-form core, one bit per action per cycle.
  typedef struct packed {
    logic wr;     // store the accepted sample in the data ring
    logic fetch;  // read coefficient and sample into h_reg / x_reg, step the counters
    logic mac;    // accu <= alpha + h_reg * x_reg
    logic first;  // with mac: alpha = 0 (first product of an output)
    logic out;    // o_reg <= rounded accu
  } df_ctl_t;

  // Control bundle of the transpose-form core.
  typedef struct packed {
    logic load_x;      // x_reg <= accepted sample
    logic fetch;       // h_reg <= next coefficient, step the coefficient counter
    logic mac;         // write alpha + h_reg * x_reg into the ring, step its counters
    logic zero_alpha;  // with mac: the ring word read is a finished output, add 0
    logic out;         // o_reg <= rounded ring word read
  } tdf_ctl_t;

  // Flat containers used to hand parameter arrays of any N/W to the helpers.
  // Element i of an order sits at bits [i*IDX_W +: IDX_W], coefficient i at
  // bits [i*W +: W] (the layout of a packed [N-1:0][W-1:0] array).
  typedef logic [MAX_TAPS*IDX_W-1:0] order_flat_t;
  typedef logic [MAX_TAPS*MAX_W-1:0] coef_flat_t;

  // Default coefficients: 24-tap linear-phase low-pass, Hamming-windowed sinc
  // with cutoff 0.2*fs, scaled to unity DC gain in Q1.15:
  //   h[n] = round(0.999 * 32768 * s[n] / sum(s)),
  //   s[n] = sinc(0.4*(n-11.5)) * (0.54 - 0.46*cos(2*pi*n/23)).
  function automatic logic [DATA_W-1:0] lp24_coeff(int i);
    case (i)
      0, 23:   return 16'(69);
      1, 22:   return 16'(56);
      2, 21:   return 16'(-94);
      3, 20:   return 16'(-263);
      4, 19:   return 16'(0);
      5, 18:   return 16'(679);
      6, 17:   return 16'(635);
      7, 16:   return 16'(-942);
      8, 15:   return 16'(-2274);
      9, 14:   return 16'(0);
      10, 13:  return 16'(6338);
      default: return 16'(12164);  // taps 11 and 12
    endcase
  endfunction

  function automatic logic [N_TAPS-1:0][DATA_W-1:0] lp24_coeffs();
    logic [N_TAPS-1:0][DATA_W-1:0] c;
    for (int i = 0; i < N_TAPS; i++) c[i] = lp24_coeff(i);
    return c;
  endfunction

  localparam logic [N_TAPS-1:0][DATA_W-1:0] LP24 = lp24_coeffs();

  function automatic order_flat_t norm_order(int n);
    order_flat_t o = '0;
    for (int k = 0; k < n; k++) o[k*IDX_W +: IDX_W] = IDX_W'(k);
    return o;
  endfunction

  // Greedy minimum-Hamming-distance order: start with h0, then repeatedly take
  // the unused coefficient whose bit pattern differs from the current one in
  // the fewest bits (lowest index on a tie).
  function automatic order_flat_t min_hamming_order(coef_flat_t c, int n, int w);
    order_flat_t     o    = '0;
    logic [MAX_TAPS-1:0] used = '0;
    int cur  = 0;
    int best, bestd, d;
    used[0] = 1'b1;
    for (int k = 1; k < n; k++) begin
      best  = 0;
      bestd = w + 1;
      for (int j = 0; j < n; j++) begin
        if (!used[j]) begin
          d = 0;
          for (int b = 0; b < w; b++)
            if (c[cur*w + b] != c[j*w + b]) d++;
          if (d < bestd) begin
            bestd = d;
            best  = j;
          end
        end
      end
      o[k*IDX_W +: IDX_W] = IDX_W'(best);
      used[best] = 1'b1;
      cur = best;
    end
    return o;
  endfunction

  // Slot (processing step within one sample) at which coefficient idx is used.
  function automatic int slot_of(order_flat_t o, int n, int idx);
    int s = 0;
    for (int k = 0; k < n; k++)
      if (int'(o[k*IDX_W +: IDX_W]) == idx) s = k;
    return s;
  endfunction

  // Transpose form: in slot k coefficient j = order[k] is used, and the
  // partial sum P_j(n) = h_j*x(n) + P_(j+1)(n-1) is written.  The ring is
  // written at consecutive addresses, one per slot, so a value read in slot k
  // was written L(k) slots earlier:
  //   j < N-1 : reads P_(j+1)(n-1)          L = N + k - slot(j+1)
  //   j = N-1 : reads the finished output P_0, of this sample if slot(0) < k
  //             (L = k - slot(0)), else of the previous sample (L = N + k - slot(0)).
  function automatic int tdf_lifetime(order_flat_t o, int n, int k);
    int j = int'(o[k*IDX_W +: IDX_W]);
    int s;
    if (j == n - 1) begin
      s = slot_of(o, n, 0);
      return (s < k) ? k - s : n + k - s;
    end
    s = slot_of(o, n, j + 1);
    return n + k - s;
  endfunction

  // Ring depth: one more than the longest lifetime, so that no location is
  // read and rewritten in the same cycle.  The normal order gives N.
  function automatic int tdf_depth(order_flat_t o, int n);
    int m = 0;
    for (int k = 0; k < n; k++)
      if (tdf_lifetime(o, n, k) > m) m = tdf_lifetime(o, n, k);
    return m + 1;
  endfunction

  // Slot in which the finished output is read out of the ring.
  function automatic int tdf_y_slot(order_flat_t o, int n);
    return slot_of(o, n, n - 1);
  endfunction

  // 1 when that read returns the output of the previous sample.
  function automatic bit tdf_y_prev(order_flat_t o, int n);
    return !(slot_of(o, n, 0) < slot_of(o, n, n - 1));
  endfunction

endpackage
