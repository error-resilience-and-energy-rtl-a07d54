// tb_ldpc_decoder_full: the decoder with every parameter at its default (error-free
// APP RAM, 2-cycle supply switch, 15 iterations). Decodes noiseless and noisy random
// codewords at the nominal supply and under a 0.75 V / 0.80 V schedule, and checks the
// decoded bits, their syndrome, the iteration count and the latency
// (72 cycles per iteration + 2 per supply switch + 3 from last input to first output).
module tb_ldpc_decoder_full;
  import ldpc_pkg::*;
  import ldpc_tb_pkg::*;

  localparam int SWC = 2;

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

  ldpc_decoder_top dut (.*);

  int checks = 0, failures = 0;
  int n_early = 0, n_multi = 0, n_switch = 0;
  code_c code;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic program_schedule(input int lv [L_MAX]);
    for (int i = 0; i < L_MAX; i++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_iter = ($clog2(L_MAX))'(i); cfg_level = LVL_W'(lv[i]);
    end
    @(negedge clk) cfg_we = 1'b0;
  endtask

  // Level changes the schedule lv needs for `it` iterations, starting from level `prev`.
  function automatic int exp_switches(input int lv [L_MAX], input int prev, input int it);
    int cur = prev, n = 0;
    for (int i = 0; i < it; i++) begin
      int t = (i == 0 || lv[i] > cur) ? lv[i] : cur;
      if (t != cur) n++;
      cur = t;
    end
    return n;
  endfunction

  // Decode one codeword: returns the hard decisions, iterations, convergence and latency.
  task automatic decode(input int llr [N], output cw_t y, output int iters,
                        output bit conv, output int lat);
    int t0, cyc;
    cyc = 0;
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

  initial begin
    int   llr [N];
    cw_t  x, y;
    int   it, lat, sw0, nsw, prev;
    bit   conv;
    int   lv [L_MAX];
    in_valid = 0; cfg_we = 0; cfg_iter = '0; cfg_level = '0;
    for (int b = 0; b < P; b++) in_llr[b] = '0;
    code = new();
    $display("H rank %0d, code dimension %0d", code.rank, N - code.rank);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. noiseless codewords at nominal supply: one iteration, exact latency
    for (int k = 0; k < 2; k++) begin
      x = code.random_codeword();
      check(code.syndrome_weight(x) == 0, "generated word is a codeword");
      make_llr(x, 3, 7, 0, 1, llr);
      decode(llr, y, it, conv, lat);
      check(y == x, "noiseless codeword decoded");
      check(code.syndrome_weight(y) == 0, "noiseless output is a codeword");
      check(conv && it == 1, $sformatf("noiseless: converged=%0d iters=%0d", conv, it));
      check(lat == 72 * it + 3, $sformatf("noiseless latency %0d", lat));
      if (conv && it < L_MAX) n_early++;
    end

    // 2. noisy codewords at nominal supply
    for (int k = 0; k < 4; k++) begin
      x = code.random_codeword();
      make_llr(x, 2, 7, 8, 2, llr);
      decode(llr, y, it, conv, lat);
      check(conv, $sformatf("noisy codeword %0d converged (iters %0d)", k, it));
      check(y == x, $sformatf("noisy codeword %0d decoded", k));
      check(lat == 72 * it + 3, $sformatf("noisy latency %0d for %0d iterations", lat, it));
      if (conv && it > 1) n_multi++;
      if (conv && it < L_MAX) n_early++;
    end

    // 3. Table III schedule for 3.5 dB: 0.75 V in iteration 1, 0.80 V after
    for (int i = 0; i < L_MAX; i++) lv[i] = (i < 1) ? int'(VDD_0V75) : int'(VDD_0V80);
    program_schedule(lv);
    for (int k = 0; k < 2; k++) begin
      sw0  = int'(switch_cnt);
      prev = int'(vdd_sel);
      x = code.random_codeword();
      make_llr(x, 2, 7, 6, 2, llr);
      decode(llr, y, it, conv, lat);
      nsw = int'(switch_cnt) - sw0;
      check(nsw == exp_switches(lv, prev, it), $sformatf("switches %0d for %0d iterations", nsw, it));
      check(lat == 72 * it + SWC * nsw + 3, $sformatf("UEP latency %0d (%0d it, %0d sw)", lat, it, nsw));
      check(conv && y == x, $sformatf("UEP codeword %0d decoded (conv %0d, iters %0d)", k, conv, it));
      if (nsw > 0) n_switch++;
    end

    $display("mechanisms: early=%0d multi=%0d switch=%0d", n_early, n_multi, n_switch);
    check(n_early > 0, "early termination seen");
    check(n_multi > 0, "multi-iteration decoding seen");
    check(n_switch > 0, "supply switch seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
