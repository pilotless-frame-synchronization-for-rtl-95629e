// tb_frame_sync_top: end-to-end test of the pilotless frame synchronizer.
//
// The bench builds real codewords of the quasi-cyclic code (random information bits, parity
// from the dual-diagonal structure of the base matrix), scrambles each with a frame-aligned
// PN sequence (x^7 + x^4 + 1, restarted every frame), places M frames at a random offset m
// in an N*(M+1)-bit buffer, optionally flips bits (a binary symmetric channel) and streams the
// buffer into the synchronizer, sometimes with idle cycles. Its own model evaluates every
// constraint of every window position directly from the base matrix and predicts mu_hat,
// min_U and found for both decision methods. It also checks the number of bits taken and
// the 3-cycle latency from the last bit to done, and counts how often each mechanism ran:
// noise-free lock, noisy maximum decision, RAM accumulation, threshold hit, threshold miss,
// early threshold stop, reduced constraint set, input stalls, list-method runs with the
// second pass over the buffered bits, and candidates pushed out of the full list.
module tb_frame_sync_top;
  import ldpc_sync_pkg::*;

  localparam int unsigned Z  = 5;
  localparam int unsigned M  = 2;
  localparam int unsigned GAMMA = 10;
  localparam int unsigned N  = NB * Z;
  localparam int unsigned NC = MB * Z;
  localparam int unsigned MU_W  = $clog2(N);
  localparam int unsigned SUM_W = $clog2(M * NC + 1);
  localparam int unsigned L  = N * (M + 1);
  localparam int LIST_RUNS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NC-1:0] syndrome, con_en, con_en_s1;
  sync_method_e method;
  logic [SUM_W-1:0] u_thresh;
  logic start = 1'b0, busy, done, bit_valid = 1'b0, bit_in = 1'b0, bit_ready, found;
  logic [MU_W-1:0] mu_hat;
  logic [SUM_W-1:0] min_u;

  frame_sync_top #(.Z(Z), .M(M), .GAMMA(GAMMA)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_lock = 0, n_noisy = 0, n_accum = 0, n_thr_hit = 0, n_thr_miss = 0, n_early = 0;
  int n_masked = 0, n_stall = 0, n_list = 0, n_evict = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.b_valid && dut.b_frame != '0) n_accum <= n_accum + 1;
    if (bit_valid === 1'b0 && busy && bit_ready) n_stall <= n_stall + 1;
    if (dut.list_ins && dut.cand_vld[GAMMA-1] && dut.u_list.better[GAMMA-1]) n_evict <= n_evict + 1;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- stimulus model ----------------
  bit buffer [L];
  bit [NC-1:0] syn_m;
  bit [NC-1:0] en_m;
  bit [NC-1:0] en1_m;   // list method, stage 1

  function automatic bit pn_bit(int unsigned idx);
    logic [6:0] s = 7'h5d;
    bit b = 0;
    for (int unsigned t = 0; t <= idx; t++) begin
      b = s[6] ^ s[3];
      s = {s[5:0], b};
    end
    return b;
  endfunction

  bit cw [N];        // codeword under construction
  bit z [N];         // PN sequence of one frame
  bit stream [N * (M + 2)];

  // circulant product (P^s x)[k] = x[(k+s) mod Z], x is base-column block bc of cw
  function automatic bit blk(int unsigned bc, int unsigned k, int s);
    return cw[bc * Z + ((k + s) % Z)];
  endfunction

  // fill cw with a random codeword
  function automatic void encode();
    bit lam [MB][Z];
    bit p [MB][Z];
    for (int unsigned t = 0; t < 12 * Z; t++) cw[t] = 1'($urandom);
    for (int unsigned r = 0; r < MB; r++)
      for (int unsigned k = 0; k < Z; k++) begin
        lam[r][k] = 0;
        for (int unsigned c = 0; c < 12; c++)
          if (BASE[r][c] >= 0) lam[r][k] ^= blk(c, k, BASE[r][c]);
      end
    for (int unsigned k = 0; k < Z; k++) begin
      p[0][k] = 0;
      for (int unsigned r = 0; r < MB; r++) p[0][k] ^= lam[r][k];
    end
    for (int unsigned k = 0; k < Z; k++) p[1][k] = lam[0][k] ^ p[0][(k + 1) % Z];
    for (int unsigned r = 1; r < MB - 1; r++)
      for (int unsigned k = 0; k < Z; k++) begin
        p[r + 1][k] = lam[r][k] ^ p[r][k];
        if (BASE[r][12] >= 0) p[r + 1][k] ^= p[0][(k + BASE[r][12]) % Z];
      end
    for (int unsigned r = 0; r < MB; r++)
      for (int unsigned k = 0; k < Z; k++) cw[(12 + r) * Z + k] = p[r][k];
  endfunction

  // parity of constraint (r, k) over buffer[base +: N], or over z when of_pn is set
  function automatic bit con_parity(bit of_pn, int unsigned base, int unsigned r,
                                    int unsigned k);
    bit par = 0;
    for (int unsigned c = 0; c < NB; c++)
      if (BASE[r][c] >= 0) begin
        int unsigned v = c * Z + ((k + BASE[r][c]) % Z);
        par ^= of_pn ? z[v] : buffer[base + v];
      end
    return par;
  endfunction

  // number of unsatisfied examined constraints of v[base +: N] against syndrome syn
  function automatic int unsigned unsat_count(int unsigned base,
                                              bit [NC-1:0] syn, bit [NC-1:0] en);
    int unsigned u = 0;
    for (int unsigned r = 0; r < MB; r++)
      for (int unsigned k = 0; k < Z; k++)
        if ((con_parity(0, base, r, k) ^ syn[r * Z + k]) && en[r * Z + k]) u++;
    return u;
  endfunction

  // build the buffer: frames at offset m, bit flips with probability flip_ppm / 1e6
  function automatic void build(int unsigned m, int unsigned flip_ppm, bit coded);
    for (int unsigned t = 0; t < N; t++) z[t] = pn_bit(t);
    for (int unsigned f = 0; f < M + 2; f++) begin
      encode();
      for (int unsigned t = 0; t < N; t++)
        stream[f * N + t] = coded ? (cw[t] ^ z[t]) : 1'($urandom);
    end
    for (int unsigned t = 0; t < L; t++) begin
      buffer[t] = stream[t + N - m];
      if (($urandom % 1000000) < flip_ppm) buffer[t] ^= 1'b1;
    end
    for (int unsigned r = 0; r < MB; r++)
      for (int unsigned k = 0; k < Z; k++) syn_m[r * Z + k] = con_parity(1, 0, r, k);
  endfunction

  // ---------------- one acquisition ----------------
  task automatic run(input sync_method_e meth, input int unsigned thr, input bit gaps,
                     input int unsigned m, input bit expect_lock, input string tag);
    int unsigned totals [N];
    int unsigned totals1 [N];
    bit listed [N];
    int unsigned exp_mu = 0, exp_u = '1, exp_last = N - 1;
    bit exp_found = 0;
    int unsigned idx = 0, accepted = 0, last_acc_cyc = 0, done_cyc = 0;
    bit acc = 0, got_done = 0;

    for (int unsigned mu = 0; mu < N; mu++) begin
      totals[mu] = 0;
      for (int unsigned i = 0; i < M; i++) totals[mu] += unsat_count(mu + i * N, syn_m, en_m);
    end
    if (meth == METHOD_LIST) begin
      // stage 1: the GAMMA offsets with the smallest stage-1 totals, earlier offsets first
      for (int unsigned mu = 0; mu < N; mu++) begin
        totals1[mu] = 0;
        for (int unsigned i = 0; i < M; i++) totals1[mu] += unsat_count(mu + i * N, syn_m, en1_m);
      end
      for (int unsigned mu = 0; mu < N; mu++) begin
        int unsigned rank;
        rank = 0;
        for (int unsigned o = 0; o < N; o++)
          if (totals1[o] < totals1[mu] || (totals1[o] == totals1[mu] && o < mu)) rank++;
        listed[mu] = (rank < GAMMA);
      end
      exp_found = 1;
      for (int unsigned mu = 0; mu < N; mu++)
        if (listed[mu] && totals[mu] < exp_u) begin exp_u = totals[mu]; exp_mu = mu; end
    end else if (meth == METHOD_MAXIMUM) begin
      exp_found = 1;
      for (int unsigned mu = 0; mu < N; mu++)
        if (totals[mu] < exp_u) begin exp_u = totals[mu]; exp_mu = mu; end
    end else begin
      for (int unsigned mu = 0; mu < N; mu++)
        if (!exp_found && totals[mu] <= thr) begin
          exp_found = 1; exp_u = totals[mu]; exp_mu = mu; exp_last = mu;
        end
      if (!exp_found) exp_u = '1;
    end

    syndrome = syn_m;
    con_en = en_m;
    con_en_s1 = en1_m;
    method = meth;
    u_thresh = SUM_W'(thr);
    @(posedge clk); #1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!got_done) begin
      if (acc) begin
        if (idx == exp_last + (M - 1) * N + N - 1) last_acc_cyc = cyc - 1;
        idx++;
        accepted++;
      end
      if (done) begin
        got_done = 1;
        done_cyc = cyc;
      end
      bit_valid = (idx < L) && !(gaps && ($urandom % 4 == 0));
      bit_in = (idx < L) ? buffer[idx] : 1'b0;
      acc = bit_valid && bit_ready;
      if (!got_done) begin
        @(posedge clk); #1;
      end
    end
    bit_valid = 1'b0;
    check(found == exp_found, $sformatf("%s found %0d exp %0d", tag, found, exp_found));
    if (exp_found) begin
      check(mu_hat == MU_W'(exp_mu), $sformatf("%s mu_hat %0d exp %0d", tag, mu_hat, exp_mu));
      check(min_u == SUM_W'(exp_u), $sformatf("%s min_u %0d exp %0d", tag, min_u, exp_u));
    end
    if (expect_lock) check(mu_hat == MU_W'(m), $sformatf("%s lock %0d vs m=%0d", tag, mu_hat, m));
    // bits taken: every bit up to the one completing the deciding window (plus those taken
    // while an early threshold decision is still in the pipeline)
    if (exp_last == N - 1)
      check(accepted == L - 1, $sformatf("%s accepted %0d exp %0d", tag, accepted, L - 1));
    else
      check(accepted >= exp_last + M * N && accepted <= exp_last + M * N + 2,
            $sformatf("%s accepted %0d exp %0d", tag, accepted, exp_last + M * N));
    check(done_cyc - last_acc_cyc == ((meth == METHOD_LIST) ? L + 6 : 3),
          $sformatf("%s latency %0d", tag, done_cyc - last_acc_cyc));
    check(!busy, {tag, " busy after done"});
    if (meth == METHOD_THRESHOLD && exp_found) n_thr_hit++;
    if (meth == METHOD_THRESHOLD && !exp_found) n_thr_miss++;
    if (meth == METHOD_THRESHOLD && exp_found && exp_last < N - 1) n_early++;
    // let the pipeline drain before the next start
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    int unsigned m;
    for (int unsigned c = 0; c < NC; c++) begin
      en_m[c] = 1;
      en1_m[c] = 1;
    end
    syndrome = '0; con_en = '1; con_en_s1 = '1; method = METHOD_MAXIMUM; u_thresh = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // noise-free lock, maximum method
    for (int t = 0; t < 4; t++) begin
      m = $urandom % N;
      build(m, 0, 1);
      run(METHOD_MAXIMUM, 0, t[0], m, 1, "clean");
      n_lock++;
    end
    // noisy channel, maximum method
    for (int t = 0; t < 4; t++) begin
      m = $urandom % N;
      build(m, 30000, 1);
      run(METHOD_MAXIMUM, 0, 1, m, 0, "noisy");
      n_noisy++;
    end
    // threshold method: passing offset (ends early) and no passing offset
    for (int t = 0; t < 3; t++) begin
      m = $urandom % N;
      build(m, 10000, 1);
      run(METHOD_THRESHOLD, M * NC / 8, t[0], m, 0, "thr");
    end
    build(7, 0, 0);
    run(METHOD_THRESHOLD, 0, 0, 7, 0, "thr-miss");
    // half of the constraints examined
    for (int unsigned c = 0; c < NC; c++) en_m[c] = 1'($urandom);
    for (int t = 0; t < 3; t++) begin
      m = $urandom % N;
      build(m, 20000, 1);
      run(METHOD_MAXIMUM, 0, 1, m, 0, "masked");
      n_masked++;
    end

    // list method: half of the constraints in stage 1, all of them in stage 2
    for (int unsigned c = 0; c < NC; c++) begin
      en_m[c] = 1;
      en1_m[c] = 1'($urandom);
    end
    for (int t = 0; t < LIST_RUNS; t++) begin
      m = $urandom % N;
      build(m, (t == 0) ? 0 : 40000, 1);
      run(METHOD_LIST, 0, t[0], m, t == 0, "list");
      n_list++;
    end

    $display("events: lock=%0d noisy=%0d accum=%0d thr_hit=%0d thr_miss=%0d early=%0d masked=%0d stall=%0d list=%0d evict=%0d",
             n_lock, n_noisy, n_accum, n_thr_hit, n_thr_miss, n_early, n_masked, n_stall, n_list, n_evict);
    check(n_lock > 0, "no clean lock");
    check(n_noisy > 0, "no noisy run");
    check(n_accum > 0, "no RAM accumulation");
    check(n_thr_hit > 0, "no threshold hit");
    check(n_thr_miss > 0, "no threshold miss");
    check(n_early > 0, "no early threshold stop");
    check(n_masked > 0, "no masked run");
    check(n_stall > 0, "no input stall");
    check(n_list > 0, "no list run");
    check(n_evict > 0, "no candidate evicted from the list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
