// tb_cnb: check node block against a direct min-sum reference.
//
// For random layers of degree 14..16 the testbench feeds APP values three per cycle,
// waits one cycle, then reads the updated APP values three per cycle. The reference,
// kept per layer in the testbench, uses the textbook form: the message to entry e is the
// sign product times the minimum magnitude over all other entries, with variable-to-check
// magnitudes clipped at 15; the old message is subtracted first and the APP value
// saturates at +-63. Also checked: parity of the hard decisions read, the sign-change
// flag of every write cycle, and that `clear` forgets the stored messages.
module tb_cnb;
  import ldpc_pkg::*;

  localparam int NL = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     clear, acc_en, acc_first, commit;
  logic [$clog2(NL)-1:0]    layer;
  logic [IDX_W-1:0]         acc_base, wr_base;
  logic [NSLOT-1:0]         acc_slot_vld, wr_slot_vld;
  app_t                     lam_in [NSLOT];
  app_t                     lam_out [NSLOT];
  logic                     sign_change, parity;

  cnb #(.NS(NSLOT), .DCMAX(MAX_DC), .NLAYER(NL)) dut (.*);

  int checks = 0, failures = 0;
  int rmsg [NL][MAX_DC];   // reference check-to-variable messages per layer

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sat(input int v, input int m);
    return v > m ? m : (v < -m ? -m : v);
  endfunction

  task automatic run_layer(input int l, input int dc, input int lam [MAX_DC], output int lnew [MAX_DC]);
    int q [MAX_DC];
    int ncyc = (dc + NSLOT - 1) / NSLOT;
    int par = 0;
    // reference
    for (int e = 0; e < dc; e++) begin
      q[e] = lam[e] - rmsg[l][e];
      par ^= (lam[e] < 0);
    end
    for (int e = 0; e < dc; e++) begin
      int mn = MAG_MAX, sg = 0;
      for (int f = 0; f < dc; f++) if (f != e) begin
        int a = q[f] < 0 ? -q[f] : q[f];
        if (a > MAG_MAX) a = MAG_MAX;
        if (a < mn) mn = a;
        sg ^= (q[f] < 0);
      end
      rmsg[l][e] = sg ? -mn : mn;
      lnew[e] = sat(q[e] + rmsg[l][e], APP_MAX);
    end
    // read phase
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      layer = ($clog2(NL))'(l);
      acc_en = 1; acc_first = (c == 0); acc_base = IDX_W'(c * NSLOT);
      for (int k = 0; k < NSLOT; k++) begin
        int e = c * NSLOT + k;
        acc_slot_vld[k] = (e < dc);
        lam_in[k] = (e < dc) ? app_t'(lam[e]) : app_t'($urandom());
      end
    end
    @(negedge clk);
    acc_en = 0; acc_slot_vld = '0;
    // write phase
    for (int c = 0; c < ncyc; c++) begin
      bit exp_sc = 0;
      @(negedge clk);
      commit = (c == 0); wr_base = IDX_W'(c * NSLOT);
      for (int k = 0; k < NSLOT; k++) begin
        int e = c * NSLOT + k;
        wr_slot_vld[k] = (e < dc);
      end
      #1;
      if (c == 0) check(parity == par[0], $sformatf("layer %0d parity", l));
      for (int k = 0; k < NSLOT; k++) begin
        int e = c * NSLOT + k;
        if (e < dc) begin
          check(int'(lam_out[k]) == lnew[e],
                $sformatf("layer %0d entry %0d: lam %0d exp %0d", l, e, lam_out[k], lnew[e]));
          if ((lam[e] < 0) != (lnew[e] < 0)) exp_sc = 1;
        end
      end
      check(sign_change == exp_sc, $sformatf("layer %0d cycle %0d sign change", l, c));
    end
    @(negedge clk);
    commit = 0; wr_slot_vld = '0;
  endtask

  initial begin
    int lam [NL][MAX_DC];
    int lnew [MAX_DC];
    int dcs [NL] = '{14, 15, 16};
    clear = 0; acc_en = 0; acc_first = 0; commit = 0; layer = '0;
    acc_base = '0; wr_base = '0; acc_slot_vld = '0; wr_slot_vld = '0;
    for (int k = 0; k < NSLOT; k++) lam_in[k] = '0;
    for (int l = 0; l < NL; l++) for (int e = 0; e < MAX_DC; e++) rmsg[l][e] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int l = 0; l < NL; l++)
      for (int e = 0; e < MAX_DC; e++) lam[l][e] = int'($urandom() % 41) - 20;
    // a few hand-made cases in layer 0: an exact tie of minima and a zero value
    lam[0][3] = 2; lam[0][7] = -2; lam[0][9] = 0;
    // several iterations over the layers, carrying the APP values
    for (int it = 0; it < 6; it++)
      for (int l = 0; l < NL; l++) begin
        run_layer(l, dcs[l], lam[l], lnew);
        for (int e = 0; e < MAX_DC; e++) lam[l][e] = (e < dcs[l]) ? lnew[e] : lam[l][e];
        // new channel-like disturbance so values keep moving
        if (it == 2) for (int e = 0; e < dcs[l]; e++) lam[l][e] = sat(lam[l][e] + int'($urandom() % 61) - 30, APP_MAX);
      end
    // large values: saturation of magnitudes and APP
    for (int e = 0; e < MAX_DC; e++) lam[1][e] = (e % 2 != 0) ? 63 : -60;
    run_layer(1, 15, lam[1], lnew);
    // clear: the next layer starts without old messages
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int l = 0; l < NL; l++) for (int e = 0; e < MAX_DC; e++) rmsg[l][e] = 0;
    run_layer(2, 16, lam[2], lnew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
