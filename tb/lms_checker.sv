// lms_checker: stimulus generator and bit-exact reference model for the
// DA/OBC LMS adaptive filter (testbench helper).
//
// It identifies an unknown sparse FIR plant (four taps of magnitude 1/8 to
// 1/4): x(n) is random full-scale, d(n) is the
// plant output plus noise of -1..1 (saturated to B bits). Samples are offered with random idle
// gaps; now and then d(n) is set to the model's own y(n) to produce a zero
// error. The model keeps its own delay line and weights and, for every
// accepted sample n, computes
//   y(n) = sum over 4-tap blocks of floor(sum_k x(n-k) w_k / 2^(L-1)),
//   e(n) = d(n) - y(n),
//   w(n+1) = w(n) +/- (x(n-1-k) >>> t(e(n-1)))  (adaptation delay 1),
//   t(e)   = clamp(TOFF - floor(log2|e|), 0, B-1), no update for e = 0,
// and checks y_out, e_out, the weights and the latency (L+2 clock edges
// from accept to y_valid) when the filter reports the sample. It also checks
// that the error shrinks: the mean |e| of the last 32 samples must be below
// half that of the first 32, or inside the dead zone 2^(TOFF-B+1) where the
// weight resolution stops the adaptation and counts every mechanism of the design; one that never occurs
// counts as a failure.
module lms_checker #(
  parameter int N     = 4,
  parameter int B     = 8,
  parameter int L     = 8,
  parameter int MU_I  = 0,
  parameter int NSAMP = 2000,
  parameter int YW    = B + $clog2(N) + 1,
  parameter int EW    = YW + 1
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic signed [B-1:0]  x_in,
  output logic signed [B-1:0]  d_in,
  input  logic                 y_valid,
  input  logic signed [YW-1:0] y_out,
  input  logic signed [EW-1:0] e_out,
  input  logic signed [L-1:0]  w_out [N],
  output logic                 done,
  output int                   checks,
  output int                   failures
);

  localparam int WIN  = 32;
  localparam int TOFF = $clog2(N) + MU_I + 2 * (B - 1) - (L - 1);
  // smallest |e| that still moves the weights (below it: dead zone)
  localparam int DZ   = 1 << ((TOFF - (B - 1) > 0) ? TOFF - (B - 1) : 0);

  typedef struct {
    int y;
    int e;
    int w [N];
    int cyc;
  } exp_t;

  exp_t q [$];
  int   xm [N+1];    // model delay line x(n-k)
  int   wm [N];      // model weights w(n)
  int   h  [N];      // plant
  int   prev_e;
  bit   have_prev;
  int   cyc = 0, n_acc = 0, n_done = 0, last_acc = -1000;
  longint abs_first = 0, abs_last = 0;
  // mechanism counters
  int n_b2b = 0, n_gap = 0, n_add = 0, n_sub = 0, n_zero = 0, n_skip = 0;
  int n_fold = 0, n_msbneg = 0;

  function automatic int wrapl(int v);
    return int'($signed(L'(v)));
  endfunction

  function automatic int sat_b(int v);
    if (v > (1 << (B-1)) - 1) return (1 << (B-1)) - 1;
    if (v < -(1 << (B-1)))    return -(1 << (B-1));
    return v;
  endfunction

  // model output for the vector xv with the current model weights
  function automatic int model_y(int xv [N+1]);
    longint acc;
    int y = 0;
    for (int b = 0; b < N / 4; b++) begin
      acc = 0;
      for (int k = 4*b; k < 4*b + 4; k++) acc += longint'(xv[k]) * longint'(wm[k]);
      y += int'(acc >>> (L - 1));
    end
    return y;
  endfunction

  // values offered to the filter for the next sample
  int x_off, d_off;
  int holdoff = 0;

  task automatic make_sample();
    int xv [N+1];
    longint p = 0;
    x_off = int'($urandom % (1 << B)) - (1 << (B-1));
    xv[0] = x_off;
    for (int k = 1; k <= N; k++) xv[k] = xm[k-1];
    for (int k = 0; k < N; k++) p += longint'(xv[k]) * longint'(h[k]);
    // plant output plus a little measurement noise
    d_off = sat_b(int'(p >>> (L - 1)) + int'($urandom % 3) - 1);
    if ($urandom % 20 == 0) d_off = sat_b(model_y(xv));
  endtask

  // model step at the accept of sample n
  task automatic accept_sample();
    exp_t ex;
    int xold [N+1];
    int mag, lg, t, dlt;
    xold = xm;
    for (int k = N; k > 0; k--) xm[k] = xm[k-1];
    xm[0] = x_off;
    for (int b = 0; b < N / 4; b++)
      for (int j = 0; j < L - 1; j++)
        if ((wm[4*b+3] >> j) & 1) n_fold++;
    for (int b = 0; b < N / 4; b++) if (wm[4*b+3] >= 0) n_msbneg++;
    ex.y = model_y(xm);
    ex.e = d_off - ex.y;
    if (ex.e == 0) n_zero++;
    // update with the previous error and the previous input vector
    if (have_prev && prev_e != 0) begin
      mag = prev_e < 0 ? -prev_e : prev_e;
      lg = 0;
      while ((mag >> (lg + 1)) != 0) lg++;
      t = TOFF - lg;
      if (t < 0) t = 0;
      if (t > B - 1) n_skip++;
      else if (prev_e < 0) n_sub++;
      else n_add++;
      if (t <= B - 1) for (int k = 0; k < N; k++) begin
        dlt = xold[k] >>> t;
        wm[k] = wrapl(prev_e < 0 ? wm[k] - dlt : wm[k] + dlt);
      end
    end
    prev_e = ex.e;
    have_prev = 1;
    ex.w = wm;
    ex.cyc = cyc;
    q.push_back(ex);
    if (n_acc < WIN)            abs_first += (ex.e < 0 ? -ex.e : ex.e);
    if (n_acc >= NSAMP - WIN)   abs_last  += (ex.e < 0 ? -ex.e : ex.e);
    if (n_acc > 0) begin
      if (cyc - last_acc == L) n_b2b++; else n_gap++;
      checks++;
      if (cyc - last_acc < L) failures++;
    end
    last_acc = cyc;
    n_acc++;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) accept_sample();
    if (rst_n && y_valid) begin
      exp_t ex;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("N=%0d: result without a sample", N);
      end else begin
        ex = q.pop_front();
        checks += 3 + N;
        if (int'(y_out) != ex.y) failures++;
        if (int'(e_out) != ex.e) failures++;
        if (cyc - ex.cyc != L + 2) failures++;
        for (int k = 0; k < N; k++) if (int'(w_out[k]) != ex.w[k]) failures++;
        if (failures > 0 && failures < 4)
          $display("N=%0d sample %0d: y %0d/%0d e %0d/%0d lat %0d", N, n_done,
                   y_out, ex.y, e_out, ex.e, cyc - ex.cyc);
      end
      n_done++;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    rst_n = 0; in_valid = 0; x_in = '0; d_in = '0;
    have_prev = 0; prev_e = 0;
    for (int k = 0; k <= N; k++) xm[k] = 0;
    // plant: four taps of magnitude 1/8 to 1/4 at random positions
    for (int k = 0; k < N; k++) begin
      wm[k] = 0;
      h[k] = 0;
    end
    for (int i = 0; i < 4; i++)
      h[(i == 0) ? 0 : int'($urandom % N)] = (($urandom % 2) ? 1 : -1) *
          ((1 << (L-1)) / 8 + int'($urandom % ((1 << (L-1)) / 8 + 1)));
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (n_acc < NSAMP) begin
      @(negedge clk);
      if (holdoff > 0) holdoff--;
      if (!in_valid) begin
        if (holdoff == 0) begin
          make_sample();
          x_in = B'(x_off);
          d_in = B'(d_off);
          in_valid = 1;
        end
      end
      @(posedge clk);
      #1;
      if (in_valid && last_acc == cyc - 1) begin
        in_valid = 0;
        holdoff = ($urandom % 4 == 0) ? L + int'($urandom % 10) : 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3 * L) @(negedge clk);
    checks += 2;
    if (n_done != NSAMP) failures++;
    if (abs_last * 2 > abs_first && abs_last > longint'(WIN) * DZ) failures++;
    $display("N=%0d L=%0d mu_i=%0d: samples=%0d mean|e| first %0d samples=%0d/1000 last ones=%0d/1000",
             N, L, MU_I, n_done, WIN, int'(abs_first * 1000 / WIN), int'(abs_last * 1000 / WIN));
    $display("N=%0d: back-to-back=%0d after-gap=%0d add-updates=%0d sub-updates=%0d zero-errors=%0d below-resolution-skips=%0d folded-slices=%0d msb-negations=%0d",
             N, n_b2b, n_gap, n_add, n_sub, n_zero, n_skip, n_fold, n_msbneg);
    checks += 8;
    if (n_b2b == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_add == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_skip == 0) failures++;
    if (n_fold == 0) failures++;
    if (n_msbneg == 0) failures++;
    done = 1;
  end

endmodule
