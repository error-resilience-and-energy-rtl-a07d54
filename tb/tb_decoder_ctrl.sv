// tb_decoder_ctrl: the top controller on its own, with the DVS handshake answered at once
// and the CNB status flags driven by the testbench. A cycle monitor checks:
//   - per layer, ceil(dc/3) read cycles, one gap cycle, ceil(dc/3) write cycles; dc read
//     and written entries, the written columns equal to the read ones; one commit
//   - the shifter offset delivered with each read's data equals (shift - rotation last
//     written to that column) mod 21, with the rotations tracked by the testbench from the
//     observed writes (0 after loading); for the readout (21 - rotation) mod 21
//   - 72 cycles per iteration, the stopping rule (parity or sign change in an iteration
//     forces another one, L_MAX at most) and the reported iteration count/convergence.
module tb_decoder_ctrl;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             load_en, load_done, out_start, out_rd_en, out_done;
  logic [COL_W-1:0] out_rd_col;
  logic             iter_req, iter_go;
  logic [$clog2(L_MAX)-1:0] iter_idx;
  logic [NSLOT-1:0] rd_en, wr_en, acc_slot_vld, wr_slot_vld;
  logic [COL_W-1:0] rd_addr [NSLOT];
  logic [COL_W-1:0] wr_addr [NSLOT];
  logic [SH_W-1:0]  rot_off [NSLOT];
  logic             cnb_clear, acc_en, acc_first, commit, any_parity, any_sign_change;
  logic [LAYER_W-1:0] layer;
  logic [IDX_W-1:0] acc_base, wr_base;
  logic             busy, dec_done, dec_converged;
  logic [ITER_W-1:0] dec_iters;

  decoder_ctrl #(.LMAX(L_MAX)) dut (.*);

  assign iter_go = iter_req;

  int checks = 0, failures = 0;
  int rot [NB_COL];
  int dirty_iters;              // iterations (from 1) that report a parity failure
  int iter_seen;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- monitor ----
  int exp_off [NSLOT];
  bit exp_vld [NSLOT];
  int rd_cyc = 0;
  int cur_iter_start, nread, nwrite, ncommit, rdcols [$];
  // sampled mid-cycle, after the inputs driven at the falling edge have settled
  always begin
    @(negedge clk);
    #2;
    if (rst_n) monitor();
  end
  task automatic monitor();
    if (|rd_en && rd_cyc == 0) rdcols.delete();
    // offsets of data returning this cycle
    for (int k = 0; k < NSLOT; k++)
      if (exp_vld[k]) check(int'(rot_off[k]) == exp_off[k],
                            $sformatf("slot %0d offset %0d exp %0d", k, rot_off[k], exp_off[k]));
    for (int k = 0; k < NSLOT; k++) exp_vld[k] = 0;
    for (int k = 0; k < NSLOT; k++) if (rd_en[k]) begin
      entry_t e = layer_entry(int'(layer), rd_cyc * NSLOT + k);
      exp_vld[k] = 1;
      exp_off[k] = (int'(e.shift) - rot[rd_addr[k]] + P) % P;
      check(e.col == rd_addr[k], "read column");
      rdcols.push_back(int'(rd_addr[k]));
      nread++;
    end
    rd_cyc = (|rd_en) ? rd_cyc + 1 : 0;
    if (out_rd_en) begin
      exp_vld[0] = 1;
      exp_off[0] = (P - rot[out_rd_col]) % P;
    end
    for (int k = 0; k < NSLOT; k++) if (wr_en[k]) begin
      entry_t e = layer_entry(int'(layer), int'(wr_base) + k);
      check(int'(wr_addr[k]) inside {rdcols}, "written column was read in this layer");
      rot[wr_addr[k]] = int'(e.shift);
      nwrite++;
    end
    if (commit) ncommit++;
    if (cnb_clear) for (int c = 0; c < NB_COL; c++) rot[c] = 0;
    if (commit) begin
      // at the first write cycle of a layer all reads of the layer have been issued
      check(nread == layer_dc(int'(layer)),
            $sformatf("layer %0d reads %0d exp %0d", layer, nread, layer_dc(int'(layer))));
      nread = 0;
    end
  endtask
  // CNB status: parity failures in iterations up to dirty_iters
  always_comb begin
    any_parity      = (iter_seen <= dirty_iters);
    any_sign_change = 1'b0;
  end
  always @(posedge clk) if (iter_req && iter_go) iter_seen = int'(iter_idx) + 1;

  task automatic run_codeword(input int ndirty, input int exp_iters, input bit exp_conv);
    int t, t_start, t_out;
    dirty_iters = ndirty;
    @(negedge clk);
    check(load_en, "controller waits for a codeword");
    load_done = 1;
    @(negedge clk) load_done = 0;
    t = 0; t_out = -1;
    while (!out_start && t < 2000) begin @(posedge clk); #1; t++; end
    t_out = t;
    check(int'(dec_iters) == exp_iters, $sformatf("iterations %0d exp %0d", dec_iters, exp_iters));
    check(dec_converged == exp_conv, "convergence flag");
    check(t_out == 72 * exp_iters, $sformatf("decode cycles %0d exp %0d", t_out, 72 * exp_iters));
    // readout: emulate the I/O block
    for (int c = 0; c < NB_COL; c++) begin
      @(negedge clk); out_rd_en = 1; out_rd_col = COL_W'(c);
    end
    @(negedge clk); out_rd_en = 0; out_done = 1;
    @(negedge clk); out_done = 0;
    check(dec_done == 1'b1, "done pulse after the readout");
  endtask

  initial begin
    out_rd_en = 0; out_rd_col = '0; out_done = 0; load_done = 0;
    iter_seen = 0; nread = 0; nwrite = 0; ncommit = 0; dirty_iters = 0;
    for (int c = 0; c < NB_COL; c++) rot[c] = 0;
    for (int k = 0; k < NSLOT; k++) begin exp_vld[k] = 0; exp_off[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_codeword(0, 1, 1);
    check(ncommit == NB_ROW, $sformatf("commits %0d in one iteration", ncommit));
    check(nwrite == 90, $sformatf("writes %0d in one iteration", nwrite));
    run_codeword(3, 4, 1);
    run_codeword(L_MAX, L_MAX, 0);
    run_codeword(1, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
