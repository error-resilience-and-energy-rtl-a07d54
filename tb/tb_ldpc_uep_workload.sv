// tb_ldpc_uep_workload: the supply schedules of the UEP study over an AWGN channel.
//
// For each channel SNR (Eb/N0 in dB, BPSK) a set of random codewords is sent twice through
// the decoder with the memory error model on and its default error rates: first with
// every iteration at 1.0 V (the reference decoder), then with the schedule chosen for that
// SNR (0.75 V for iterations 1-2 at 3.3 dB, 0.75 V for iteration 1 above, 0.80 V after).
// Both runs see the same channel LLRs. Channel LLRs are 2y/sigma^2, rounded and limited to
// +-15.
// Checked per codeword:
//   - the latency is 72 cycles per iteration, plus 2 per supply switch, plus 3;
//   - the number of switches follows the schedule: at most one inside a codeword, plus
//     one at its start when the previous codeword ended at another level;
//   - a run at scaled supply that saw no memory bit flip gives the same bits and iteration
//     count as the reference run (the supply only adds stall cycles);
//   - a converged reference result is a codeword.
// Reported: frame errors and average iterations of both runs, and a relative energy
// estimate from the published energy per bit and iteration (1.0 V 9.89, 0.8 V 6.11,
// 0.7 V 4.82 pJ; 0.75 V taken as 5.47, the mean of its neighbours). The UEP schedule must
// come out cheaper. A last pass puts 0.70 V (error rate 3e-3) on the first two iterations
// and reports how many codewords still decode. The published study ran 50000 codewords per SNR; this test runs
// NCW per SNR.
module tb_ldpc_uep_workload;
  import ldpc_pkg::*;
  import ldpc_tb_pkg::*;

  localparam int    NCW   = 12;
  localparam int    NSNR  = 3;
  localparam real   RATE  = 13.0 / 16.0;
  localparam real   SNR_DB [NSNR] = '{3.3, 3.7, 4.3};
  localparam real   E_LV [NLEVEL] = '{4.82, 5.47, 6.11, 7.84, 9.89};  // pJ/bit/iteration

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready;
  llr_t              in_llr [P];
  logic              out_valid, out_last;
  logic [COL_W-1:0]  out_col;
  logic [P-1:0]      out_bits;
  logic              cfg_we;
  logic [$clog2(L_MAX)-1:0] cfg_iter;
  logic [LVL_W-1:0]  cfg_level;
  logic              busy, dec_done, dec_converged, dvs_stall;
  logic [ITER_W-1:0] dec_iters;
  logic [LVL_W-1:0]  vdd_sel;
  logic [15:0]       switch_cnt;
  logic [31:0]       mem_flips;

  ldpc_decoder_top #(.MODEL_MEM_ERRORS(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  int n_switch = 0, n_multi = 0, n_maxit = 0;
  code_c code;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom()) + 1.0) / 4294967297.0;
    u2 = real'($urandom()) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic program_schedule(input int lv [L_MAX]);
    for (int i = 0; i < L_MAX; i++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_iter = ($clog2(L_MAX))'(i); cfg_level = LVL_W'(lv[i]);
    end
    @(negedge clk) cfg_we = 1'b0;
  endtask

  function automatic int exp_switches(input int lv [L_MAX], input int prev, input int it);
    int cur, n;
    cur = prev;
    n = 0;
    for (int i = 0; i < it; i++) begin
      int t;
      t = (i == 0 || lv[i] > cur) ? lv[i] : cur;
      if (t != cur) n++;
      cur = t;
    end
    return n;
  endfunction

  // Energy of `it` iterations under schedule lv, in pJ per bit.
  function automatic real energy(input int lv [L_MAX], input int it);
    real e;
    int  cur;
    e = 0.0;
    cur = lv[0];
    for (int i = 0; i < it; i++) begin
      if (lv[i] > cur) cur = lv[i];
      e += E_LV[cur];
    end
    return e;
  endfunction

  task automatic decode(input int llr [N], output cw_t y, output int iters,
                        output bit conv, output int lat);
    int t0;
    y = '0;
    for (int c = 0; c < NB_COL; c++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int b = 0; b < P; b++) in_llr[b] = llr_t'(llr[c*P + b]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 1'b0;
    t0 = 0;
    lat = -1;
    forever begin
      @(posedge clk);
      t0++;
      if (out_valid) begin
        if (lat < 0) lat = t0;
        for (int b = 0; b < P; b++) y[int'(out_col)*P + b] = out_bits[b];
      end
      if (dec_done) break;
    end
    iters = int'(dec_iters);
    conv  = dec_converged;
  endtask

  int   llrs  [NCW][N];
  cw_t  xs    [NCW];
  cw_t  yref  [NCW];
  int   itref [NCW];
  bit   cvref [NCW];

  initial begin
    cw_t y;
    int  it, lat, sw0, nsw, prev, f0, fer_ref, fer_uep, sum_ref, sum_uep;
    bit  conv;
    int  lv_ref [L_MAX];
    int  lv_uep [L_MAX];
    real sigma, e_ref, e_uep;
    in_valid = 0; cfg_we = 0; cfg_iter = '0; cfg_level = '0;
    for (int b = 0; b < P; b++) in_llr[b] = '0;
    for (int i = 0; i < L_MAX; i++) lv_ref[i] = int'(VDD_1V00);
    code = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int s = 0; s < NSNR; s++) begin
      sigma = $sqrt(1.0 / (2.0 * RATE * (10.0 ** (SNR_DB[s] / 10.0))));
      for (int k = 0; k < NCW; k++) begin
        xs[k] = code.random_codeword();
        for (int b = 0; b < N; b++) begin
          real yv, l;
          yv = (xs[k][b] ? -1.0 : 1.0) + sigma * gauss();
          l  = 2.0 * yv / (sigma * sigma);
          if (l > 15.0) l = 15.0;
          if (l < -15.0) l = -15.0;
          llrs[k][b] = int'(l);   // rounds to nearest
        end
      end
      for (int i = 0; i < L_MAX; i++)
        lv_uep[i] = (i < (SNR_DB[s] < 3.4 ? 2 : 1)) ? int'(VDD_0V75) : int'(VDD_0V80);

      // reference decoder: nominal supply throughout
      program_schedule(lv_ref);
      fer_ref = 0; sum_ref = 0; e_ref = 0.0;
      for (int k = 0; k < NCW; k++) begin
        sw0 = int'(switch_cnt);
        decode(llrs[k], yref[k], itref[k], cvref[k], lat);
        nsw = int'(switch_cnt) - sw0;
        check(lat == 72 * itref[k] + 2 * nsw + 3, $sformatf("reference latency %0d for %0d iterations", lat, itref[k]));
        if (cvref[k]) check(code.syndrome_weight(yref[k]) == 0, "converged reference output is a codeword");
        if (yref[k] != xs[k]) fer_ref++;
        if (itref[k] > 1) n_multi++;
        if (itref[k] == L_MAX) n_maxit++;
        sum_ref += itref[k];
        e_ref += energy(lv_ref, itref[k]);
      end

      // UEP decoder: the schedule for this SNR, same channel values
      program_schedule(lv_uep);
      fer_uep = 0; sum_uep = 0; e_uep = 0.0;
      for (int k = 0; k < NCW; k++) begin
        f0   = int'(mem_flips);
        sw0  = int'(switch_cnt);
        prev = int'(vdd_sel);
        decode(llrs[k], y, it, conv, lat);
        nsw = int'(switch_cnt) - sw0;
        check(nsw == exp_switches(lv_uep, prev, it) && nsw - int'(prev != lv_uep[0]) <= 1,
              $sformatf("%.1f dB codeword %0d: %0d switches in %0d iterations", SNR_DB[s], k, nsw, it));
        check(lat == 72 * it + 2 * nsw + 3, $sformatf("UEP latency %0d (%0d it, %0d sw)", lat, it, nsw));
        if (int'(mem_flips) == f0)
          check(y == yref[k] && it == itref[k] && conv == cvref[k],
                $sformatf("%.1f dB codeword %0d: UEP run without flips matches reference", SNR_DB[s], k));
        if (y != xs[k]) fer_uep++;
        if (nsw > 0) n_switch++;
        sum_uep += it;
        e_uep += energy(lv_uep, it);
      end
      $display("%.1f dB: reference %0d/%0d frame errors, %.2f iterations; UEP %0d/%0d frame errors, %.2f iterations; energy %.1f vs %.1f pJ/bit (%.0f%% saved)",
               SNR_DB[s], fer_ref, NCW, real'(sum_ref) / NCW, fer_uep, NCW, real'(sum_uep) / NCW,
               e_uep / NCW, e_ref / NCW, 100.0 * (1.0 - e_uep / e_ref));
      check(e_uep < e_ref, $sformatf("%.1f dB: UEP schedule uses less energy", SNR_DB[s]));
    end

    // 0.70 V (error rate 3e-3) for iterations 1-2, 0.80 V after, on the last SNR's words:
    // reported only. Flips of high-order APP bits stay in the APP memory, so most of these
    // codewords are expected to fail; at least the flips themselves must occur.
    begin
      int lv70 [L_MAX];
      int ok70, fl70;
      for (int i = 0; i < L_MAX; i++) lv70[i] = (i < 2) ? int'(VDD_0V70) : int'(VDD_0V80);
      program_schedule(lv70);
      ok70 = 0;
      f0 = int'(mem_flips);
      for (int k = 0; k < 4; k++) begin
        decode(llrs[k], y, it, conv, lat);
        if (y == xs[k]) ok70++;
      end
      fl70 = int'(mem_flips) - f0;
      $display("%.1f dB with 0.70 V in iterations 1-2: %0d/4 decoded, %0d bit flips",
               SNR_DB[NSNR-1], ok70, fl70);
      check(fl70 > 0, "memory bit flips at 0.70 V");
    end

    $display("mechanisms: switch=%0d multi=%0d maxit=%0d flips=%0d", n_switch, n_multi, n_maxit, int'(mem_flips));
    check(n_switch > 0, "supply switch seen");
    check(n_multi > 0, "multi-iteration decoding seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
